// tb_imager_env: stimulus, scoreboard and coverage counters for end-to-end
// tests of tfs_imager. It is instantiated next to the imager by the test
// benches, which connect the imager's ports and a few internal nets.
//
// One frame: reset, load the dwell table of the sampling counter, give every
// pixel a photocurrent (a share of dark pixels that never fire, and a small
// set of repeated values so that many pixels fire in the same clock), pulse
// start, then accept events with a randomly stalling receiver until every lit
// pixel has been read. Each event is checked against the pixels: it must be a
// lit pixel, read only once, not earlier than its time to first spike
// ceil((Vdd - VTH)/iph) plus the clocks to request, and its data word must
// equal a model of the sampling counter and, with the table loaded here, may
// not exceed the pixel's photocurrent code. At the end every lit pixel must have
// been read, every pixel must be in stand-by except the dark ones, and no
// further event may appear.
//
// Coverage: row collisions at the row AER, a row acknowledge held back while
// the column AER is busy (pipelining), a row request killed, several columns
// latched together, several column sub-trees busy at once, receiver stalls,
// sampling-counter steps, and a row requested again after its kill. A
// mechanism that never occurred counts as a failure.
module tb_imager_env #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 32,
  parameter int unsigned SUB   = 16,
  parameter int unsigned IW    = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned TW    = 16,
  parameter int unsigned FRAMES = 2,
  parameter int unsigned MIN_IPH = 64,
  parameter int unsigned WATCHDOG = 200000
) (
  output logic                    clk,
  output logic                    rst_n,
  output logic                    start,
  output logic [IW-1:0]           iph [ROWS][COLS],
  output logic                    sram_we,
  output logic [DW-1:0]           sram_addr,
  output logic [TW-1:0]           sram_wdata,
  output logic                    out_ready,
  input  logic                    out_valid,
  input  logic [$clog2(ROWS)-1:0] out_row,
  input  logic [$clog2(COLS)-1:0] out_col,
  input  logic [DW-1:0]           out_data,
  input  logic                    ca_busy,
  input  logic                    all_standby,
  input  logic                    sample_tick,
  // internal nets of the imager, for coverage
  input  logic [ROWS-1:0]         req_raer,
  input  logic [ROWS-1:0]         ack_raer,
  input  logic [ROWS-1:0]         wrd_ack,
  input  logic [COLS-1:0]         req_caer
);
  localparam int unsigned NSUB = COLS / SUB;
  localparam int VDD_MINUS_VTH = 65535;  // Vdd - VTH of the pixel model

  int checks = 0, failures = 0;
  int cyc = 0;          // clocks since the start edge
  int n_row_collision = 0, n_ack_blocked = 0, n_kill = 0, n_multi_capture = 0;
  int n_multi_sub = 0, n_stall = 0, n_counter_step = 0, n_rerequest = 0;
  int n_linear = 0;     // events whose code is within 2 of the photocurrent

  int  tbl [2**DW];
  int  tf  [ROWS][COLS];
  bit  lit [ROWS][COLS];
  bit  seen [ROWS][COLS];
  int  n_lit = 0, n_seen = 0;
  int  m_data = 0, m_cnt = 0;   // sampling counter model
  bit  running = 0;
  logic [ROWS-1:0] killed_rows = '0;

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // sampling counter model, same clock as the imager
  always @(posedge clk) begin
    if (start) begin
      m_data <= 2**DW - 1; m_cnt <= 0; cyc <= 0;
    end else begin
      automatic int dw = (tbl[m_data] == 0) ? 1 : tbl[m_data];
      cyc <= cyc + 1;
      if (m_data != 0) begin
        if (m_cnt + 1 >= dw) begin m_data <= m_data - 1; m_cnt <= 0; end
        else m_cnt <= m_cnt + 1;
      end
    end
  end

  // scoreboard and coverage, sampled between edges
  always @(negedge clk) begin
    if (rst_n && running) begin
      automatic int subs = 0;
      if ($countones(req_raer) > 1) n_row_collision++;
      if ((ack_raer & ~wrd_ack) != 0 && ca_busy) n_ack_blocked++;
      if (wrd_ack != 0 && ca_busy) begin
        n_kill++;
        killed_rows |= wrd_ack;
      end
      if ((req_raer & killed_rows & ~wrd_ack) != 0 && !ca_busy) n_rerequest++;
      if ($countones(req_caer) > 1) n_multi_capture++;
      for (int s = 0; s < NSUB; s++) subs += (req_caer[s*SUB +: SUB] != 0);
      if (subs > 1) n_multi_sub++;
      if (out_valid && !out_ready) n_stall++;
      begin
        automatic int dwm = (tbl[m_data] == 0) ? 1 : tbl[m_data];
        check(sample_tick == (m_data != 0 && m_cnt + 1 >= dwm), "sampling clock pulse");
      end
      if (out_valid && out_ready) begin
        automatic int r = int'(out_row), c = int'(out_col);
        check(r < ROWS && c < COLS, "address in range");
        if (r < ROWS && c < COLS) begin
          check(lit[r][c], $sformatf("event from dark pixel (%0d,%0d)", r, c));
          check(!seen[r][c], $sformatf("pixel (%0d,%0d) read twice", r, c));
          check(cyc >= tf[r][c] + 2, $sformatf("pixel (%0d,%0d) read at %0d before its spike at %0d", r, c, cyc, tf[r][c]));
          check(int'(out_data) == m_data, $sformatf("data %0d expected %0d", out_data, m_data));
          check(int'(out_data) <= int'(iph[r][c]), $sformatf("data %0d above photocurrent %0d", out_data, iph[r][c]));
          if (int'(out_data) + 2 >= int'(iph[r][c])) n_linear++;
          if (!seen[r][c]) n_seen++;
          seen[r][c] = 1;
        end
      end
    end
  end

  // receiver: ready most of the time
  always @(posedge clk) out_ready <= ($urandom_range(0, 7) != 0);

  initial begin
    int last_data;
    rst_n = 0; start = 0; sram_we = 0; sram_addr = '0; sram_wdata = '0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) iph[r][c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // dwell table with K = Vdd - VTH: level d starts floor(K/(d+1)) clocks
    // after start (the top level at 0), i.e. it lasts floor(K/d) -
    // floor(K/(d+1)) clocks, so the code at time t is about K/t: a pixel read
    // right after its spike at K/iph gets a code just below iph
    for (int d = 0; d < 2**DW; d++) begin
      tbl[d] = (d == 0) ? 1 : (d == 2**DW - 1) ? VDD_MINUS_VTH / d
                                               : VDD_MINUS_VTH / d - VDD_MINUS_VTH / (d + 1);
      if (tbl[d] >= 2**TW) tbl[d] = 2**TW - 1;
      @(negedge clk);
      sram_we = 1; sram_addr = DW'(d); sram_wdata = TW'(tbl[d]);
    end
    @(negedge clk) sram_we = 0;

    for (int f = 0; f < FRAMES; f++) begin
      automatic int vals[6] = '{255, 200, 160, 128, 100, MIN_IPH};
      n_lit = 0; n_seen = 0; killed_rows = '0;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        automatic int v = $urandom_range(0, 9);
        automatic int cur = (v == 0) ? 0 : (v < 7) ? vals[v - 1] : $urandom_range(MIN_IPH, 255);
        iph[r][c]  = IW'(cur);
        lit[r][c]  = (cur != 0);
        seen[r][c] = 0;
        tf[r][c]   = (cur == 0) ? 0 : (VDD_MINUS_VTH + cur - 1) / cur;
        n_lit     += lit[r][c];
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      running = 1;
      last_data = -1;
      while (n_seen < n_lit && cyc < WATCHDOG) begin
        @(negedge clk);
        if (int'(out_data) != last_data) begin
          if (last_data >= 0) n_counter_step++;
          last_data = int'(out_data);
        end
      end
      repeat (VDD_MINUS_VTH / MIN_IPH + 50) @(negedge clk);
      running = 0;
      check(n_seen == n_lit, $sformatf("frame %0d: %0d of %0d lit pixels read", f, n_seen, n_lit));
      check(!out_valid && !ca_busy, "no event left");
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
        check(lit[r][c] == seen[r][c], $sformatf("pixel (%0d,%0d) lit %0d read %0d", r, c, lit[r][c], seen[r][c]));
      // dark pixels keep integrating; all others are in stand-by
      check(all_standby == (n_lit == ROWS * COLS), "stand-by state of the array");
      $display("frame %0d: %0d events in %0d clocks", f, n_seen, cyc);
    end

    $display("coverage: row collisions %0d, blocked row acks %0d, kills %0d, re-requests %0d, multi-column captures %0d, parallel sub-trees %0d, stalls %0d, counter steps %0d, codes within 2 of iph %0d",
             n_row_collision, n_ack_blocked, n_kill, n_rerequest, n_multi_capture, n_multi_sub, n_stall, n_counter_step, n_linear);
    check(n_row_collision > 0, "row collision happened");
    check(n_ack_blocked > 0,   "row acknowledge blocked while column AER busy (pipelining)");
    check(n_kill > 0,          "row request killed");
    check(n_rerequest > 0,     "row requested again after its kill");
    check(n_multi_capture > 0, "several columns latched together");
    check(n_multi_sub > 0 || NSUB == 1, "several sub-trees busy together");
    check(n_stall > 0,         "receiver stall");
    check(n_counter_step > 0,  "sampling counter stepped");
    check(n_linear > 0,        "code equal to the photocurrent for promptly read pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG * FRAMES + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
