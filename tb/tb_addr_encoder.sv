// tb_addr_encoder: exhaustive test of the one-hot to binary encoder at
// N = 128 (every single line, and no line) and at a non-power-of-two size.
module tb_addr_encoder;
  int checks = 0, failures = 0;
  logic [127:0] oh;
  logic [6:0]   addr;
  logic         valid;
  logic [4:0]   oh5;
  logic [2:0]   addr5;
  logic         valid5;

  addr_encoder u_dut (.onehot(oh), .addr(addr), .valid(valid));
  addr_encoder #(.N(5)) u_small (.onehot(oh5), .addr(addr5), .valid(valid5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    oh = '0; oh5 = '0; #1;
    check(valid == 0 && valid5 == 0, "no line: not valid");
    for (int i = 0; i < 128; i++) begin
      oh = '0; oh[i] = 1'b1; #1;
      check(valid && addr == 7'(i), $sformatf("line %0d -> %0d", i, addr));
    end
    for (int i = 0; i < 5; i++) begin
      oh5 = '0; oh5[i] = 1'b1; #1;
      check(valid5 && addr5 == 3'(i), $sformatf("small line %0d -> %0d", i, addr5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
