// tb_tfs_pixel: walks one pixel through a whole frame and checks each step
// of start -> event -> row request -> row acknowledge -> column request ->
// column acknowledge -> self reset -> stand-by, with the row request rising
// one clock after the time to first spike, and that the pixel stays silent
// in stand-by until the next start.
module tb_tfs_pixel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        start, wrd_ack, col_ack, wrd_req, col_req, standby;
  logic [7:0]  iph;
  logic [16:0] vn;

  tfs_pixel u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int vals[$] = '{200, 50, 9};
    start = 0; wrd_ack = 0; col_ack = 0; iph = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(standby && !wrd_req && !col_req, "stand-by after reset");
    foreach (vals[i]) begin
      automatic int tf = (65535 + vals[i] - 1) / vals[i];
      automatic int k = 0;
      iph = 8'(vals[i]); start = 1;
      @(negedge clk); start = 0;
      check(!standby && !wrd_req, "integrating");
      while (!wrd_req && k < 70000) begin @(negedge clk); k++; end
      check(k == tf + 1, $sformatf("row request after %0d clocks, expected %0d", k, tf + 1));
      check(!col_req, "no column request before row acknowledge");
      // the row is not acknowledged for a while: the request stays
      repeat (5) @(negedge clk);
      check(wrd_req && !col_req, "request held while waiting");
      wrd_ack = 1; #1;
      check(col_req, "column request with row acknowledge");
      @(negedge clk);
      check(wrd_req && col_req && !standby, "waits for column acknowledge");
      col_ack = 1;
      @(negedge clk);
      check(standby && !wrd_req && !col_req, "self reset into stand-by");
      @(negedge clk);
      check(vn == 17'h1FFFF, "sensing node recharged");
      wrd_ack = 0; col_ack = 0;
      repeat (3 * tf) @(negedge clk);
      check(standby && !wrd_req, "no second request in the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
