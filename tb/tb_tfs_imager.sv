// tb_tfs_imager: end-to-end test of the imager at a reduced size (16 rows,
// 32 columns, two 16-column sub-trees, radix 4), two frames. Stimulus and
// checks are in tb_imager_env.
module tb_tfs_imager;
  localparam int unsigned ROWS = 16, COLS = 32;
  logic           clk, rst_n, start, sram_we, out_ready, out_valid, ca_busy, all_standby, sample_tick;
  logic [7:0]     iph [ROWS][COLS];
  logic [7:0]     sram_addr, out_data;
  logic [15:0]    sram_wdata;
  logic [3:0]     out_row;
  logic [4:0]     out_col;

  tfs_imager #(.ROWS(ROWS), .COLS(COLS)) u_dut (.*);

  tb_imager_env #(.ROWS(ROWS), .COLS(COLS), .FRAMES(2), .MIN_IPH(64), .WATCHDOG(20000)) u_env (
    .clk, .rst_n, .start, .iph, .sram_we, .sram_addr, .sram_wdata, .out_ready,
    .out_valid, .out_row, .out_col, .out_data, .ca_busy, .all_standby, .sample_tick,
    .req_raer (u_dut.req_raer),
    .ack_raer (u_dut.ack_raer),
    .wrd_ack  (u_dut.wrd_ack),
    .req_caer (u_dut.req_caer)
  );
endmodule
