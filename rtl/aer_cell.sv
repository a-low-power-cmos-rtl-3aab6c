// aer_cell: fair building block of the AER arbiter trees.
//
// The block has three parts. The arbitration part chooses one of RADIX
// requests and keeps that choice as long as the chosen request stays up, like
// the cross-coupled latch it models. The propagation part sends one request
// upward when any input requests. The acknowledgement part passes the
// acknowledgement from above to the chosen input only.
//
// Fairness: a priority pointer decides between simultaneous requests and
// moves after every arbitration, i.e. every time the chosen request is
// withdrawn. With RADIX = 2 the pointer toggles, as the switch of the
// two-input block does: requests arriving together are served 0 then 1, a
// following lone request 0 is served, and the next simultaneous pair is
// served 1 first. With RADIX > 2 the pointer moves to the input after the
// one just served (round robin), so no input is passed over twice by the
// same competitor. Priority starts at input 0 after reset.
//
// Interface: req[RADIX] in, req_up out, ack_up in, ack[RADIX] out.
// Timing: a choice is made in the clock in which requests are present
// (combinational path req -> ack) and stored at the edge; when the chosen
// request drops, a waiting one is chosen in the same clock. ack is one-hot
// or zero and only set on a requesting input. The stepping rule for
// RADIX > 2 is this design's own generalisation of the toggle.
module aer_cell #(
  parameter int unsigned RADIX = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RADIX-1:0] req,
  output logic             req_up,
  input  logic             ack_up,
  output logic [RADIX-1:0] ack
);

  localparam int unsigned PW = (RADIX > 1) ? $clog2(RADIX) : 1;

  logic [RADIX-1:0] gnt_q, gnt_d;
  logic [PW-1:0]    ptr_q, ptr_eff, gnt_idx;
  logic             keep, released;

  // first requesting input at or after the pointer, cyclically
  function automatic logic [RADIX-1:0] pick(logic [RADIX-1:0] r, logic [PW-1:0] p);
    logic [RADIX-1:0] g = '0;
    for (int unsigned k = 0; k < RADIX; k++) begin
      logic [PW-1:0] idx = PW'((int'(p) + k) % RADIX);
      if (g == '0 && r[idx]) g[idx] = 1'b1;
    end
    return g;
  endfunction

  always_comb begin
    keep     = |(gnt_q & req);
    released = (|gnt_q) && !keep;
    gnt_idx = '0;
    for (int unsigned k = 0; k < RADIX; k++) if (gnt_q[k]) gnt_idx = PW'(k);
    if (!released)                    ptr_eff = ptr_q;
    else if (RADIX == 2)              ptr_eff = ~ptr_q;          // switch toggles
    else if (gnt_idx == PW'(RADIX-1)) ptr_eff = '0;              // round robin
    else                              ptr_eff = gnt_idx + 1'b1;
    gnt_d = keep ? gnt_q : pick(req, ptr_eff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt_q <= '0;
      ptr_q <= '0;
    end else begin
      gnt_q <= gnt_d;
      ptr_q <= ptr_eff;
    end
  end

  assign req_up = |req;
  assign ack    = ack_up ? gnt_d : '0;

  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_d))
    else $error("aer_cell: more than one grant");
  a_gnt_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt_d & ~req) == '0)
    else $error("aer_cell: grant without request");

endmodule
