// column_buffer: holds one column request for the column AER.
//
// While the column AER is idle (capture high) a column request from the
// acknowledged row is latched. The latched request is acknowledged back to
// the pixel at once (col_ack), so all fired pixels of a row are released
// together instead of one by one, and is presented to the column AER
// (req_caer) until the column AER serves it (ack_caer).
//
// Interface (active high): col_req, capture, ack_caer in; req_caer, col_ack
// out, both equal to the held bit.
// Timing: the request is held from the edge after col_req & capture to the
// edge after ack_caer. Latching only while the column AER is idle is this
// design's choice; it keeps a pixel that is still requesting while being
// served from being latched twice.
module column_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic col_req,
  input  logic capture,
  input  logic ack_caer,
  output logic req_caer,
  output logic col_ack
);

  logic held_q;

  always_ff @(posedge clk) begin
    if (!rst_n)      held_q <= 1'b0;
    else if (held_q) held_q <= !ack_caer;
    else             held_q <= col_req && capture;
  end

  assign req_caer = held_q;
  assign col_ack  = held_q;

endmodule
