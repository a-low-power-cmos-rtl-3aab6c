// tfs_imager: Time-to-First-Spike image sensor with fair, pipelined AER
// read-out.
//
// Every pixel converts its brightness into the delay of a single spike after
// a global start: bright pixels fire early, dark ones late. A pixel that has
// fired asks for the bus once, is read once and then resets itself and waits
// for the next frame, so no pixel loads the bus more than once per frame.
//
// Read-out path of one event:
//   pixel -> row line -> row_buffer -> row AER tree (fair arbitration over
//   rows) -> row_buffer lets the acknowledgement through when the column AER
//   is idle -> all fired pixels of that row drive their column lines ->
//   column_buffers latch them and acknowledge the pixels together, which
//   reset themselves -> column AER (eight 16-input sub-trees and a top tree)
//   sends the latched columns one per clock as (row, column, data).
// As soon as the column AER holds a row (ca_busy) the row buffer withdraws
// that row's request, so the row AER arbitrates the next row while the
// columns of the current row are still being sent: row and column
// arbitration run as a two-stage pipeline. The data word is the value of a
// sampling counter whose step times come from an SRAM table, which maps the
// 1/I time-to-first-spike into the desired brightness code.
//
// Interface: clk, rst_n (active low), start (one-clock start of
// integration), iph[ROWS][COLS] photocurrent codes, SRAM write port of the
// control circuit, output bus out_valid/out_ready/out_row/out_col/out_data,
// ca_busy, all_standby (every pixel read) and sample_tick (the modulated
// sampling clock, one pulse per counter step) for observation.
// Timing: one event per clock leaves while out_ready is high and the column
// AER holds requests; a row costs about three clocks of row/column handshake
// that overlap the transfer of the previous row.
// The structure follows the described sensor; the clocked handshakes, the
// output bus protocol and all widths other than the array and tree sizes are
// this design's choices.
module tfs_imager #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned COLS  = 128,
  parameter int unsigned SUB   = 16,
  parameter int unsigned RADIX = 4,
  parameter int unsigned VW    = 17,
  parameter int unsigned IW    = 8,
  parameter logic [VW-1:0] VTH = VW'(1) << (VW - 1),
  parameter int unsigned DW    = 8,
  parameter int unsigned TW    = 16,
  parameter int unsigned RAW   = $clog2(ROWS),
  parameter int unsigned CAW   = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [IW-1:0]  iph [ROWS][COLS],
  input  logic           sram_we,
  input  logic [DW-1:0]  sram_addr,
  input  logic [TW-1:0]  sram_wdata,
  input  logic           out_ready,
  output logic           out_valid,
  output logic [RAW-1:0] out_row,
  output logic [CAW-1:0] out_col,
  output logic [DW-1:0]  out_data,
  output logic           ca_busy,
  output logic           all_standby,
  output logic           sample_tick
);

  logic [ROWS-1:0] wrd_req, wrd_ack, req_raer, ack_raer;
  logic [COLS-1:0] col_req, col_ack, req_caer, ack_caer;
  logic [COLS-1:0] standby [ROWS];
  logic            row_any, row_ack_valid;
  logic [RAW-1:0]  row_addr;

  pixel_array #(.ROWS(ROWS), .COLS(COLS), .VW(VW), .IW(IW), .VTH(VTH)) u_array (
    .clk, .rst_n, .start, .iph,
    .wrd_ack, .col_ack, .wrd_req, .col_req, .standby
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_rowbuf
    row_buffer u_rb (
      .clk, .rst_n,
      .wrd_req  (wrd_req[r]),
      .ack_raer (ack_raer[r]),
      .ca_busy,
      .req_raer (req_raer[r]),
      .wrd_ack  (wrd_ack[r])
    );
  end

  // row AER: its root acknowledges itself, blocking is done by the row buffers
  aer_tree #(.N(ROWS), .RADIX(RADIX)) u_row_aer (
    .clk, .rst_n,
    .req    (req_raer),
    .req_up (row_any),
    .ack_up (row_any),
    .ack    (ack_raer)
  );

  addr_encoder #(.N(ROWS), .AW(RAW)) u_row_enc (
    .onehot (wrd_ack),
    .addr   (row_addr),
    .valid  (row_ack_valid)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_colbuf
    column_buffer u_cb (
      .clk, .rst_n,
      .col_req  (col_req[c]),
      .capture  (!ca_busy),
      .ack_caer (ack_caer[c]),
      .req_caer (req_caer[c]),
      .col_ack  (col_ack[c])
    );
  end

  column_aer #(.COLS(COLS), .SUB(SUB), .RADIX(RADIX), .RAW(RAW), .CAW(CAW)) u_col_aer (
    .clk, .rst_n,
    .held     (req_caer),
    .row_addr,
    .out_ready,
    .ack_caer,
    .ca_busy,
    .out_valid,
    .out_row,
    .out_col
  );

  tfs_control #(.DW(DW), .TW(TW)) u_ctrl (
    .clk, .rst_n, .start,
    .sram_we, .sram_addr, .sram_wdata,
    .data        (out_data),
    .sample_tick
  );

  // every pixel has been read (or was never started): the frame is complete
  always_comb begin
    all_standby = 1'b1;
    for (int unsigned r = 0; r < ROWS; r++) all_standby &= &standby[r];
  end

  a_capture_has_row: assert property (@(posedge clk) disable iff (!rst_n)
                                       (!ca_busy && col_req != '0) |-> row_ack_valid)
    else $error("tfs_imager: column requests without an acknowledged row");
  a_row_ack_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wrd_ack))
    else $error("tfs_imager: two rows acknowledged at once");

endmodule
