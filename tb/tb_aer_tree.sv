// tb_aer_tree: tests the arbiter tree.
//
// 1. Depth: trees for the radix / size pairs of the delay comparison
//    (r = 2, 4 and m = 16, 64) and the 128-row tree must have
//    ceil(log_r m) levels.
// 2. The 128-leaf radix-4 tree is driven by random clients that request,
//    drop their request the clock after their acknowledge, and wait a random
//    time before requesting again. Every clock: at most one acknowledge, only
//    to a requesting leaf, and some acknowledge whenever any leaf requests
//    (the root acknowledges itself). At the end every request was served.
// 3. Fairness across the tree: leaves 0 and 127 (different sub-trees) and
//    leaves 4 and 5 (same cell) request together several times; the one
//    served last in a round must not be served first in the next round, so
//    the stream of services alternates.
module tb_aer_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] req, ack;
  logic         up;
  aer_tree u_dut (.clk, .rst_n, .req, .req_up(up), .ack_up(up), .ack);

  // trees of the delay table, only their depth is checked
  logic [15:0] r16;  logic [63:0] r64;
  logic [15:0] a2_16, a4_16; logic [63:0] a2_64, a4_64;
  logic u2_16, u4_16, u2_64, u4_64;
  assign r16 = '0; assign r64 = '0;
  aer_tree #(.N(16), .RADIX(2)) t2_16 (.clk, .rst_n, .req(r16), .req_up(u2_16), .ack_up(1'b1), .ack(a2_16));
  aer_tree #(.N(64), .RADIX(2)) t2_64 (.clk, .rst_n, .req(r64), .req_up(u2_64), .ack_up(1'b1), .ack(a2_64));
  aer_tree #(.N(16), .RADIX(4)) t4_16 (.clk, .rst_n, .req(r16), .req_up(u4_16), .ack_up(1'b1), .ack(a4_16));
  aer_tree #(.N(64), .RADIX(4)) t4_64 (.clk, .rst_n, .req(r64), .req_up(u4_64), .ack_up(1'b1), .ack(a4_64));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // which of two leaves is served first when both request together
  task automatic race(int a, int b, output int first, output int second);
    first = -1; second = -1;
    @(negedge clk);
    req = '0; req[a] = 1; req[b] = 1;
    for (int i = 0; i < 6; i++) begin
      #1;
      if (ack != 0 && first < 0) first = $clog2(ack);
      else if (ack != 0 && second < 0 && $clog2(ack) != first) second = $clog2(ack);
      @(negedge clk);
      req = req & ~ack;
    end
    check(req == '0, "race: both served");
  endtask

  initial begin
    int wait_cnt [128];
    int requests = 0, served = 0;
    check(t2_16.L == 4 && t2_64.L == 6, "radix-2 depths log2(16)=4, log2(64)=6");
    check(t4_16.L == 2 && t4_64.L == 3, "radix-4 depths log4(16)=2, log4(64)=3");
    check(u_dut.L == 4, "128 rows, radix 4: 4 levels");
    req = '0;
    foreach (wait_cnt[i]) wait_cnt[i] = $urandom_range(0, 20);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // clients
      for (int i = 0; i < 128; i++) begin
        if (req[i] && ack[i]) begin
          req[i] = 0; served++; wait_cnt[i] = $urandom_range(0, 300);
        end else if (!req[i] && cyc < 18000) begin
          if (wait_cnt[i] == 0) begin req[i] = 1; requests++; end
          else wait_cnt[i]--;
        end
      end
      #1;
      check($onehot0(ack), "one acknowledge at most");
      check((ack & ~req) == '0, "acknowledge only to a requester");
      check((req != 0) == (ack != 0), "a requester is always acknowledged");
      check(up == |req, "root request");
    end
    // drain
    for (int cyc = 0; cyc < 400 && req != 0; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < 128; i++) if (req[i] && ack[i]) begin req[i] = 0; served++; end
    end
    check(requests > 1000 && served == requests, $sformatf("served %0d of %0d", served, requests));

    begin
      int f, s, last;
      race(0, 127, f, last);
      for (int k = 0; k < 4; k++) begin
        race(0, 127, f, s);
        check(f != last && s == last, $sformatf("different sub-trees alternate (%0d after %0d)", f, last));
        last = s;
      end
      race(4, 5, f, last);
      for (int k = 0; k < 4; k++) begin
        race(4, 5, f, s);
        check(f != last && s == last, $sformatf("same cell alternates (%0d after %0d)", f, last));
        last = s;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
