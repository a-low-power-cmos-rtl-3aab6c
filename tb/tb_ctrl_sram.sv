// tb_ctrl_sram: writes every word of the 256 x 16 control SRAM with random
// data and reads it back, and checks that a read sees a write only after
// the clock edge.
module tb_ctrl_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        we;
  logic [7:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [256];

  ctrl_sram u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 255; i >= 0; i--) begin
      raddr = 8'(i); #1;
      check(rdata == ref_mem[i], $sformatf("word %0d", i));
    end
    @(negedge clk);
    raddr = 8'd7; we = 1; waddr = 8'd7; wdata = ~ref_mem[7]; #1;
    check(rdata == ref_mem[7], "old data before the edge");
    @(posedge clk); #1;
    check(rdata == ~ref_mem[7], "new data after the edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
