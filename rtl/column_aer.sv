// column_aer: hierarchical column address-event arbiter.
//
// The COLS column-buffer requests are split into COLS/SUB blocks of SUB
// columns. Each block has its own arbiter tree and its own address encoder,
// so the blocks of a row are arbitrated in parallel. A top tree built from
// the same fair cells picks which block drives the single shared output bus;
// its encoded choice forms the upper column-address bits and the block's
// local address the lower bits.
//
// The column AER also produces ca_busy, high while any column buffer still
// holds a request, which tells the row buffers that a row is being processed.
// The encoded row address is stored while ca_busy is low and held while it
// is high, so each event leaves with the row it belongs to even though the
// row AER has meanwhile moved on to the next row.
//
// Interface: held[COLS] (column buffer requests), row_addr, out_ready in;
// ack_caer[COLS] (the column served this clock), ca_busy, out_valid,
// out_row, out_col out.
// Timing: out_valid/out_col are combinational from held; one event leaves
// per clock in which out_ready is high, and the served column buffer drops
// its request at that edge. The top tree and the bus handshake are this
// design's choices; the split into SUB-input sub-trees with their own
// encoders follows the described design.
module column_aer #(
  parameter int unsigned COLS  = 128,
  parameter int unsigned SUB   = 16,
  parameter int unsigned RADIX = 4,
  parameter int unsigned RAW   = 7,
  parameter int unsigned CAW   = $clog2(COLS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] held,
  input  logic [RAW-1:0]  row_addr,
  input  logic            out_ready,
  output logic [COLS-1:0] ack_caer,
  output logic            ca_busy,
  output logic            out_valid,
  output logic [RAW-1:0]  out_row,
  output logic [CAW-1:0]  out_col
);

  localparam int unsigned NSUB = COLS / SUB;
  localparam int unsigned LAW  = (SUB > 1) ? $clog2(SUB) : 1;
  localparam int unsigned SAW  = (NSUB > 1) ? $clog2(NSUB) : 1;

  logic [NSUB-1:0] sub_req, sub_ack, sub_valid;
  logic [COLS-1:0] gnt;
  logic [LAW-1:0]  sub_addr [NSUB];
  logic [LAW-1:0]  bus_local;
  logic [SAW-1:0]  sub_sel;
  logic            top_valid;
  logic [RAW-1:0]  row_q;

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    aer_tree #(.N(SUB), .RADIX(RADIX)) u_tree (
      .clk, .rst_n,
      .req    (held[s*SUB +: SUB]),
      .req_up (sub_req[s]),
      .ack_up (sub_ack[s]),
      .ack    (gnt[s*SUB +: SUB])
    );
    addr_encoder #(.N(SUB), .AW(LAW)) u_enc (
      .onehot (gnt[s*SUB +: SUB]),
      .addr   (sub_addr[s]),
      .valid  (sub_valid[s])
    );
  end

  aer_tree #(.N(NSUB), .RADIX(RADIX)) u_top (
    .clk, .rst_n,
    .req    (sub_req),
    .req_up (ca_busy),
    .ack_up (1'b1),
    .ack    (sub_ack)
  );

  addr_encoder #(.N(NSUB), .AW(SAW)) u_top_enc (
    .onehot (sub_ack),
    .addr   (sub_sel),
    .valid  (top_valid)
  );

  // shared data bus: only the acknowledged sub-tree drives its address
  always_comb begin
    bus_local = '0;
    for (int unsigned s = 0; s < NSUB; s++) begin
      if (sub_ack[s]) bus_local = bus_local | sub_addr[s];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        row_q <= '0;
    else if (!ca_busy) row_q <= row_addr;
  end

  if (NSUB > 1) begin : g_col_multi
    assign out_col = CAW'({sub_sel, bus_local});
  end else begin : g_col_single
    assign out_col = CAW'(bus_local);
  end

  assign out_valid = top_valid && |sub_valid;
  assign out_row   = row_q;
  assign ack_caer  = out_ready ? gnt : '0;

  a_one_served: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack_caer))
    else $error("column_aer: more than one column served");

endmodule
