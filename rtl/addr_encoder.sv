// addr_encoder: one-hot to binary address encoder.
//
// Turns the acknowledgement lines of an AER tree (at most one high) into the
// binary address of the acknowledged line. Address bit b is the OR of all
// lines whose index has bit b set, as in a ROM-style encoder; valid is the OR
// of all lines.
//
// Interface: onehot[N] in; addr[AW] and valid out, combinational.
module addr_encoder #(
  parameter int unsigned N  = 128,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  onehot,
  output logic [AW-1:0] addr,
  output logic          valid
);

  always_comb begin
    addr = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (onehot[i]) addr = addr | AW'(i);
    end
  end

  assign valid = |onehot;

endmodule
