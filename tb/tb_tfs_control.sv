// tb_tfs_control: programs the dwell table and checks the sampling counter
// clock by clock against a model: after start the code is 255 and it stays
// on level D for max(1, table[D]) clocks, stopping at 0. A second frame uses
// the table that makes level D start floor(65535/(D+1)) clocks after start;
// there the code must equal floor(65535/t) - 1 or floor(65535/t) at time t.
module tb_tfs_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        start, sram_we, sample_tick;
  logic [7:0]  sram_addr, data;
  logic [15:0] sram_wdata;
  int          tbl [256];

  tfs_control u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic load(int kind);
    for (int d = 0; d < 256; d++) begin
      tbl[d] = (kind == 0) ? $urandom_range(0, 4) :
               (d == 0) ? 1 : (d == 255) ? 65535 / d : 65535 / d - 65535 / (d + 1);
      @(negedge clk);
      sram_we = 1; sram_addr = 8'(d); sram_wdata = 16'(tbl[d]);
    end
    @(negedge clk) sram_we = 0;
  endtask

  // run one frame and compare with the model; returns total clocks to zero
  task automatic frame(output int total);
    int lvl = 255, cnt = 0, steps = 0;
    total = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    #1;
    check(data == 8'd255, "full scale after start");
    while (lvl > 0 && total < 300000) begin
      int dw = (tbl[lvl] == 0) ? 1 : tbl[lvl];
      check(sample_tick == (cnt + 1 >= dw), $sformatf("sample tick lvl %0d cnt %0d dw %0d", lvl, cnt, dw));
      if (cnt + 1 >= dw) begin lvl--; cnt = 0; steps++; end
      else cnt++;
      @(negedge clk);
      total++;
      if (tbl[1] > 100) begin
        automatic int ideal = 65535 / total;
        if (ideal <= 255) check(int'(data) <= ideal && int'(data) + 1 >= ideal,
                                $sformatf("t=%0d code %0d, 65535/t = %0d", total, data, ideal));
      end
      check(data == 8'(lvl), $sformatf("level %0d expected %0d", data, lvl));
    end
    check(steps == 255, "255 steps");
    repeat (3) @(negedge clk);
    check(data == 0 && !sample_tick, "stops at zero");
  endtask

  initial begin
    int t;
    start = 0; sram_we = 0; sram_addr = 0; sram_wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load(0);
    frame(t);
    load(1);
    frame(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
