// pixel_array: ROWS x COLS TFS pixels on shared row and column lines.
//
// Every pixel of a row drives the row's request line and listens to the
// row's acknowledgement line; every pixel of a column drives the column's
// request line and listens to the column's acknowledgement line. The lines
// are wired-OR in silicon; here they are OR reductions of the active-high
// pixel requests. Since a pixel drives its column request only while its row
// is acknowledged, the column lines carry the fired pixels of the
// acknowledged row.
//
// Interface: iph[r][c] is the photocurrent of pixel (r, c); wrd_ack[r],
// col_ack[c] in; wrd_req[r], col_req[c] out; standby[r][c] per pixel.
// Timing is that of tfs_pixel; the array adds no registers.
module pixel_array #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  parameter int unsigned VW   = 17,
  parameter int unsigned IW   = 8,
  parameter logic [VW-1:0] VTH = VW'(1) << (VW - 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IW-1:0]   iph [ROWS][COLS],
  input  logic [ROWS-1:0] wrd_ack,
  input  logic [COLS-1:0] col_ack,
  output logic [ROWS-1:0] wrd_req,
  output logic [COLS-1:0] col_req,
  output logic [COLS-1:0] standby [ROWS]
);

  logic [COLS-1:0] row_req_m [ROWS];  // row_req_m[r][c]: pixel (r,c) requests its row
  logic [ROWS-1:0] col_req_m [COLS];  // col_req_m[c][r]: pixel (r,c) requests its column

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [VW-1:0] vn_unused;
      tfs_pixel #(.VW(VW), .IW(IW), .VTH(VTH)) u_px (
        .clk, .rst_n, .start,
        .iph     (iph[r][c]),
        .wrd_ack (wrd_ack[r]),
        .col_ack (col_ack[c]),
        .wrd_req (row_req_m[r][c]),
        .col_req (col_req_m[c][r]),
        .standby (standby[r][c]),
        .vn      (vn_unused)
      );
    end
    assign wrd_req[r] = |row_req_m[r];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_color
    assign col_req[c] = |col_req_m[c];
  end

endmodule
