// aer_tree: arbiter tree of aer_cell blocks over N requests.
//
// The leaves are padded up to RADIX**L inputs, L = ceil(log_RADIX N) levels
// (at least one); padded inputs never request. Level 0 holds the leaf
// requests, level l+1 the req_up outputs of the cells of level l. The root
// request is req_up; the acknowledgement ack_up enters at the root and is
// steered down to exactly one requesting leaf. A raised radix reduces the
// depth L, which is what sets the tree delay.
//
// Interface: req[N] in, req_up out, ack_up in, ack[N] out (one-hot or zero).
// Timing: purely combinational from req/ack_up to ack within a clock; each
// cell stores its choice at the clock edge (see aer_cell).
module aer_tree
  import tfs_pkg::*;
#(
  parameter int unsigned N     = 128,
  parameter int unsigned RADIX = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic         req_up,
  input  logic         ack_up,
  output logic [N-1:0] ack
);

  localparam int unsigned L = clog_r(N, RADIX);
  localparam int unsigned P = RADIX ** L;

  logic [P-1:0] lreq [L+1];
  logic [P-1:0] lack [L+1];

  assign lreq[0] = P'(req);
  assign ack     = lack[0][N-1:0];

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NODES = RADIX ** (L - 1 - l);
    for (genvar n = 0; n < NODES; n++) begin : g_node
      aer_cell #(.RADIX(RADIX)) u_cell (
        .clk, .rst_n,
        .req    (lreq[l][n*RADIX +: RADIX]),
        .req_up (lreq[l+1][n]),
        .ack_up (lack[l+1][n]),
        .ack    (lack[l][n*RADIX +: RADIX])
      );
    end
    if (NODES < P) begin : g_pad
      assign lreq[l+1][P-1:NODES] = '0;
      assign lack[l+1][P-1:NODES] = '0;
    end
  end

  assign req_up     = lreq[L][0];
  assign lack[L][0] = ack_up;

endmodule
