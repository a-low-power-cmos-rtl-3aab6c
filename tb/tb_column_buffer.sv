// tb_column_buffer: directed test of the column buffer: a request is latched
// only while capture is high, acknowledged to the pixel at once, kept until
// the column AER serves it, and not latched again while capture is low.
module tb_column_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic col_req, capture, ack_caer, req_caer, col_ack;

  column_buffer u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic step(logic rq, logic cp, logic ak);
    @(negedge clk);
    col_req = rq; capture = cp; ack_caer = ak;
    #1;
  endtask

  initial begin
    col_req = 0; capture = 1; ack_caer = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    step(0, 1, 0); check(!req_caer && !col_ack, "empty");
    step(1, 0, 0); check(!req_caer, "not latched without capture");
    step(1, 1, 0); check(!req_caer, "latched at the next edge");
    step(1, 0, 0); check(req_caer && col_ack, "held and acknowledged");
    step(0, 0, 0); check(req_caer && col_ack, "held after the pixel let go");
    step(0, 0, 1); check(req_caer, "served at the next edge");
    step(1, 0, 0); check(!req_caer && !col_ack, "released; late request ignored while capture low");
    step(1, 0, 0); check(!req_caer, "still ignored");
    step(0, 1, 0); check(!req_caer, "nothing to capture");
    step(1, 1, 1); check(!req_caer, "ack without held request does nothing");
    step(0, 1, 0); check(req_caer, "captured again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
