// tb_pixel_array: a 4 x 5 array with a random mix of bright, equal and dark
// pixels. The test plays row and column acknowledge by hand and checks the
// wired-OR row and column lines against the pixels that must have fired,
// that only the acknowledged row drives the column lines, and that exactly
// the served pixels go to stand-by.
module tb_pixel_array;
  localparam int R = 4, C = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         start;
  logic [7:0]   iph [R][C];
  logic [R-1:0] wrd_ack, wrd_req;
  logic [C-1:0] col_ack, col_req;
  logic [C-1:0] standby [R];

  pixel_array #(.ROWS(R), .COLS(C)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int tf [R][C];
    bit fired [R][C];
    start = 0; wrd_ack = 0; col_ack = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      automatic int v = $urandom_range(0, 4);
      iph[r][c] = (v == 0) ? 8'd0 : (v == 1) ? 8'd128 : 8'($urandom_range(60, 255));
      tf[r][c]  = (iph[r][c] == 0) ? 1 << 30 : (65535 + int'(iph[r][c]) - 1) / int'(iph[r][c]);
    end
    iph[0][0] = 8'd128; iph[1][0] = 8'd128;  // at least one column collision
    tf[0][0] = 512; tf[1][0] = 512;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // let everything that can fire fire (no acknowledge yet)
    repeat (1200) @(negedge clk);
    for (int r = 0; r < R; r++) begin
      automatic bit any = 0;
      for (int c = 0; c < C; c++) begin
        fired[r][c] = (tf[r][c] < 1200);
        any |= fired[r][c];
      end
      check(wrd_req[r] == any, $sformatf("row %0d request line", r));
    end
    check(col_req == '0, "no column requests without row acknowledge");
    // serve row by row
    for (int r = 0; r < R; r++) begin
      automatic logic [C-1:0] exp = '0;
      for (int c = 0; c < C; c++) exp[c] = fired[r][c];
      wrd_ack = R'(1) << r; #1;
      check(col_req == exp, $sformatf("row %0d column lines %b expected %b", r, col_req, exp));
      col_ack = exp;
      @(negedge clk);
      wrd_ack = 0; col_ack = 0; #1;
      for (int c = 0; c < C; c++) check(standby[r][c] == fired[r][c],
                                        $sformatf("stand-by of (%0d,%0d)", r, c));
      check(!wrd_req[r], $sformatf("row %0d released", r));
    end
    check(wrd_req == '0 && col_req == '0, "all lines idle");
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
