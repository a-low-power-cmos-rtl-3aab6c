// tb_row_buffer: directed test of the row buffer.
//
// Checks, clock by clock: the request is passed while not killed; an
// acknowledgement is blocked while the column AER is busy and passed one
// clock after it becomes idle; an acknowledgement already passed survives
// the rising busy for exactly one clock and the request is then killed;
// the kill lasts until busy falls, after which a still-pending request is
// made again.
module tb_row_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wrd_req, ack_raer, ca_busy, req_raer, wrd_ack;

  row_buffer u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // drive at negedge, then look at the outputs
  task automatic step(logic rq, logic ak, logic bz);
    @(negedge clk);
    wrd_req = rq; ack_raer = ak; ca_busy = bz;
    #1;
  endtask

  initial begin
    wrd_req = 0; ack_raer = 0; ca_busy = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    step(0, 0, 0); check(!req_raer && !wrd_ack, "idle");
    step(1, 0, 0); check(req_raer && !wrd_ack, "request passed");
    // column AER busy with another row: acknowledgement blocked (M20)
    step(1, 1, 1); check(req_raer && !wrd_ack, "ack blocked while busy");
    step(1, 1, 1); check(!wrd_ack, "still blocked");
    step(1, 1, 0); check(!wrd_ack, "ack registered next clock");
    step(1, 1, 0); check(wrd_ack && req_raer, "ack passed once idle");
    // column AER takes the row: busy rises
    step(1, 1, 1); check(wrd_ack && req_raer, "ack held in the clock busy rises");
    step(1, 1, 1); check(!wrd_ack && !req_raer, "row killed (M17) and ack withdrawn");
    step(1, 0, 1); check(!req_raer && !wrd_ack, "kill holds while busy");
    step(1, 0, 0); check(!req_raer, "kill still registered in the clock busy falls");
    step(1, 0, 0); check(req_raer, "pending request made again after busy");
    step(0, 0, 0); check(!req_raer && !wrd_ack, "request withdrawn");
    // an acknowledgement that ends before busy rises is simply withdrawn
    step(1, 1, 0);
    step(1, 1, 0); check(wrd_ack, "ack passed");
    step(1, 0, 0); check(wrd_ack, "ack registered: still high");
    step(1, 0, 0); check(!wrd_ack, "ack follows ack_raer down");

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
