// tb_aer_cell: self-checking test of the fair AER building block.
//
// Part 1 (RADIX = 2) replays the fair-arbitration sequence: req0 and req1
// together are served 0 then 1, a lone req0 is served, and the next
// simultaneous pair is served 1 first. Each requester behaves as a 4-phase
// client: it drops its request on the clock after it sees its acknowledge.
// Part 2 (RADIX = 4) drives random requests and compares every acknowledge
// with a reference model of the round-robin priority, and checks that four
// inputs requesting all the time are served in strict rotation.
module tb_aer_cell;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- radix 2 ----------------
  logic [1:0] req2, ack2;
  logic       up2;
  aer_cell #(.RADIX(2)) u2 (.clk, .rst_n, .req(req2), .req_up(up2), .ack_up(up2), .ack(ack2));

  // ---------------- radix 4 ----------------
  logic [3:0] req4, ack4;
  logic       up4, ackup4;
  aer_cell #(.RADIX(4)) u4 (.clk, .rst_n, .req(req4), .req_up(up4), .ack_up(ackup4), .ack(ack4));

  // serve the pending radix-2 requests and return the order of service
  task automatic serve2(output int order[$]);
    order = {};
    repeat (8) begin
      @(negedge clk);
      if (ack2 != 0) begin
        order.push_back(ack2[1] ? 1 : 0);
        check($countones(ack2) == 1, "radix-2 ack one-hot");
        req2 = req2 & ~ack2;
      end
    end
  endtask

  // reference model for radix 4
  int m_g = -1, m_ptr = 0;
  function automatic logic [3:0] model_step(logic [3:0] r, logic au);
    bit keep = (m_g >= 0) && r[m_g];
    bit rel  = (m_g >= 0) && !keep;
    int pe   = rel ? (m_g + 1) % 4 : m_ptr;
    int g    = keep ? m_g : -1;
    if (!keep) for (int k = 0; k < 4; k++) if (g < 0 && r[(pe + k) % 4]) g = (pe + k) % 4;
    m_g = g; m_ptr = pe;
    return (au && g >= 0) ? 4'(1 << g) : 4'b0;
  endfunction

  initial begin
    int order[$];
    int cycles = 0;
    req2 = 0; req4 = 0; ackup4 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Fig.-5 style sequence
    @(negedge clk) req2 = 2'b11;
    serve2(order);
    check(order.size() == 2 && order[0] == 0 && order[1] == 1, "simultaneous pair served 0 then 1");
    @(negedge clk) req2 = 2'b01;
    serve2(order);
    check(order.size() == 1 && order[0] == 0, "lone req0 served");
    @(negedge clk) req2 = 2'b11;
    serve2(order);
    check(order.size() == 2 && order[0] == 1 && order[1] == 0, "after toggle, pair served 1 then 0");
    check(up2 == 0, "no request left");

    // radix 4, random, against the model (model sees the same inputs)
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] exp;
      @(negedge clk);
      // clients: drop when acknowledged last clock, otherwise request at random
      req4   = (req4 & ~ack4) | 4'($urandom_range(0, 15) & $urandom_range(0, 15));
      ackup4 = ($urandom_range(0, 3) != 0);
      #1;
      exp = model_step(req4, ackup4);
      check(ack4 == exp, $sformatf("radix-4 ack %b expected %b (req %b)", ack4, exp, req4));
      check(up4 == |req4, "radix-4 req_up");
      @(posedge clk);
    end

    // radix 4, all requesting all the time: strict rotation 0,1,2,3,0,...
    begin
      int seq[$];
      @(negedge clk) begin req4 = 4'b0000; ackup4 = 1; end
      @(negedge clk); @(negedge clk);
      req4 = 4'b1111;
      for (int i = 0; i < 12; i++) begin
        #1;
        check($countones(ack4) == 1, "full load: one ack");
        seq.push_back($clog2(ack4));
        @(negedge clk);
        req4 = 4'b1111 & ~ack4;  // served client pauses for one clock
      end
      for (int i = 1; i < 12; i++)
        check(seq[i] == (seq[i-1] + 1) % 4, $sformatf("rotation step %0d: %0d after %0d", i, seq[i], seq[i-1]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
