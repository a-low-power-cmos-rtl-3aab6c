// tb_pixel_frontend: checks the discrete photodiode model. For a set of
// photocurrents the event must appear exactly ceil((Vdd - VTH) / iph) clocks
// after start (the time-to-first-spike law), vn must fall linearly by iph per
// clock, hold must keep vn at Vdd with no event, and a dark pixel must never
// fire.
module tb_pixel_frontend;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        start, hold, event_x;
  logic [7:0]  iph;
  logic [16:0] vn;

  pixel_frontend u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int currents[$] = '{255, 254, 200, 128, 100, 64, 33, 16, 7, 3, 1};
    start = 0; hold = 0; iph = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (currents[i]) begin
      automatic int tf = (65535 + currents[i] - 1) / currents[i];
      automatic int k = 0;
      @(negedge clk); iph = 8'(currents[i]); start = 1;
      @(negedge clk); start = 0;
      check(vn == 17'h1FFFF && !event_x, "Vdd after start");
      while (!event_x && k < 70000) begin
        @(negedge clk); k++;
        if (k < 5) check(vn == 17'(131071 - k * currents[i]), "linear discharge");
      end
      check(k == tf, $sformatf("iph %0d: event after %0d clocks, expected %0d", currents[i], k, tf));
    end
    // hold (self reset) keeps the node charged
    @(negedge clk); iph = 8'd255; hold = 1;
    repeat (300) @(negedge clk);
    check(vn == 17'h1FFFF && !event_x, "hold keeps Vdd");
    hold = 0;
    // dark pixel
    @(negedge clk); iph = 0; start = 1;
    @(negedge clk); start = 0;
    repeat (1000) @(negedge clk);
    check(!event_x && vn == 17'h1FFFF, "dark pixel never fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
