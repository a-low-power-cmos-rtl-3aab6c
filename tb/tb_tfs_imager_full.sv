// tb_tfs_imager_full: one complete frame of the imager at its full size
// (128 x 128 pixels, eight 16-column sub-trees, radix-4 trees, 8-bit data)
// with every imager parameter at its default. Photocurrents span 16..255, so
// the last pixel fires about 2000 clocks after start; all 16384 pixels are
// scoreboarded by tb_imager_env.
module tb_tfs_imager_full;
  logic           clk, rst_n, start, sram_we, out_ready, out_valid, ca_busy, all_standby, sample_tick;
  logic [7:0]     iph [128][128];
  logic [7:0]     sram_addr, out_data;
  logic [15:0]    sram_wdata;
  logic [6:0]     out_row, out_col;

  tfs_imager u_dut (.*);

  tb_imager_env #(.ROWS(128), .COLS(128), .FRAMES(1), .MIN_IPH(16), .WATCHDOG(60000)) u_env (
    .clk, .rst_n, .start, .iph, .sram_we, .sram_addr, .sram_wdata, .out_ready,
    .out_valid, .out_row, .out_col, .out_data, .ca_busy, .all_standby, .sample_tick,
    .req_raer (u_dut.req_raer),
    .ack_raer (u_dut.ack_raer),
    .wrd_ack  (u_dut.wrd_ack),
    .req_caer (u_dut.req_caer)
  );
endmodule
