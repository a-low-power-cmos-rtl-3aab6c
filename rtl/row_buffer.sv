// row_buffer: decouples one pixel row from the row AER so that row and
// column arbitration can overlap (pipelining).
//
// The row request is passed to the row AER (req_raer). An acknowledgement
// from the row AER is let through to the pixels (wrd_ack) only while the
// column AER is idle; once let through it is kept. When the column AER
// reports that it has taken the row (ca_busy) while this row is
// acknowledged, the buffer kills its request, so the row AER can already
// arbitrate the next row, and withdraws wrd_ack. The kill is lifted when the
// column AER becomes idle again; a pixel of this row that fired meanwhile
// then requests the row once more.
//
// Interface (active high): wrd_req in, ack_raer in, ca_busy in;
// req_raer out (combinational), wrd_ack out (registered).
// Timing: wrd_ack rises the clock after ack_raer when ca_busy is low, and
// falls on the edge at which ca_busy is seen with wrd_ack high.
// The kill and the blocking follow the row buffer described; their exact
// clock-level timing is this design's choice.
module row_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic wrd_req,
  input  logic ack_raer,
  input  logic ca_busy,
  output logic req_raer,
  output logic wrd_ack
);

  logic killed_q, killed_d;

  // kill (M17): the column AER has taken this row
  always_comb begin
    if (!ca_busy)     killed_d = 1'b0;
    else if (wrd_ack) killed_d = 1'b1;
    else              killed_d = killed_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      killed_q <= 1'b0;
      wrd_ack  <= 1'b0;
    end else begin
      killed_q <= killed_d;
      // block (M20): a new acknowledgement waits for the column AER
      wrd_ack  <= ack_raer && !killed_d && (wrd_ack || !ca_busy);
    end
  end

  assign req_raer = wrd_req && !killed_q;

endmodule
