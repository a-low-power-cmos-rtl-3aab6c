// ctrl_sram: the data SRAM of the control circuit.
//
// DEPTH = 2**DW words of TW bits: one dwell time per quantisation level of
// the sampling counter. Synchronous write port, combinational read port. The
// contents are not reset, as in an SRAM; they must be written before use.
//
// Interface: we, waddr, wdata in (written at the clock edge); raddr in,
// rdata out (same clock).
module ctrl_sram #(
  parameter int unsigned DW = 8,
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [DW-1:0] waddr,
  input  logic [TW-1:0] wdata,
  input  logic [DW-1:0] raddr,
  output logic [TW-1:0] rdata
);

  logic [TW-1:0] mem [2**DW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
