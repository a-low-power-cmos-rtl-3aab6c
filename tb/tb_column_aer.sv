// tb_column_aer: tests the hierarchical column AER at its full size
// (128 columns, eight 16-input sub-trees, radix 4).
//
// The column buffers are modelled in the test: a random set of columns is
// loaded for a random row, the served column is removed on the clock its
// acknowledge is given. Checked every clock: ca_busy equals "any column
// held"; an offered event names a held column and the row loaded with it,
// even though row_addr changes while the row is processed; the acknowledge
// goes to exactly that column; and every held column leaves exactly once,
// one per clock in which out_ready is high.
module tb_column_aer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] held, ack_caer;
  logic [6:0]   row_addr, out_row, out_col;
  logic         out_ready, ca_busy, out_valid;
  int           multi_sub = 0;

  column_aer u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    held = '0; row_addr = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      automatic logic [127:0] pattern = '0;
      automatic logic [6:0]   row = 7'($urandom);
      automatic int n = 0, ready_clocks = 0, density = $urandom_range(1, 100);
      for (int c = 0; c < 128; c++) pattern[c] = ($urandom_range(1, 100) <= density);
      if (pattern == '0) pattern[$urandom_range(0, 127)] = 1'b1;
      n = $countones(pattern);
      // load: row address presented while idle, then the columns latch
      @(negedge clk);
      row_addr = row;
      #1 check(!ca_busy, "idle before the row");
      @(negedge clk);
      held = pattern;
      row_addr = 7'($urandom);   // row AER has moved on
      while (held != '0 && ready_clocks < 1000) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        check(ca_busy, "busy while columns are held");
        check(out_valid, "event offered while columns are held");
        check(held[out_col], $sformatf("offered column %0d is held", out_col));
        check(out_row == row, "row address of the processed row");
        check(ack_caer == (out_ready ? (128'(1) << out_col) : '0), "acknowledge to the offered column");
        begin
          automatic int subs = 0;
          for (int s = 0; s < 8; s++) subs += (held[s*16 +: 16] != 0);
          if (subs > 1) multi_sub++;
        end
        if (out_ready) ready_clocks++;
        @(negedge clk);
        held = held & ~ack_caer;
      end
      check(ready_clocks == n, $sformatf("%0d columns in %0d ready clocks", n, ready_clocks));
      out_ready = 0;
      #1 check(!ca_busy && !out_valid, "idle after the row");
    end
    check(multi_sub > 0, "several sub-trees active together");
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
