// tfs_control: sampling counter with SRAM-programmed quantisation levels.
//
// The time to first spike is inversely proportional to the photocurrent, so
// a plain time counter would give a code proportional to 1/I with coarse
// steps for bright pixels and fine steps for dark ones. Here the counter is
// stepped by a modulated clock: at start it is loaded with its maximum and it
// counts down, staying on level D for SRAM[D] base clocks (a stored 0 counts
// as 1) and stopping at 0. Writing SRAM[D] proportional to 1/(D*(D+1)) makes
// the code approximately proportional to the photocurrent; any other
// transfer curve can be loaded. The value of the counter is the data sent
// with every event.
//
// Interface: start (one clock) in; sram_we/sram_addr/sram_wdata write port
// in; data (current level) and sample_tick (one pulse per level step, the
// modulated sampling clock) out.
// Timing: data = 2**DW-1 on the clock after start; it steps down on the edge
// that ends the dwell. The counting direction and the table format are this
// design's choices.
module tfs_control #(
  parameter int unsigned DW = 8,
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          sram_we,
  input  logic [DW-1:0] sram_addr,
  input  logic [TW-1:0] sram_wdata,
  output logic [DW-1:0] data,
  output logic          sample_tick
);

  logic [TW-1:0] dwell, tick_cnt;

  ctrl_sram #(.DW(DW), .TW(TW)) u_sram (
    .clk,
    .we    (sram_we),
    .waddr (sram_addr),
    .wdata (sram_wdata),
    .raddr (data),
    .rdata (dwell)
  );

  assign sample_tick = !start && (data != '0) && (tick_cnt + 1'b1 >= dwell);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data     <= '0;
      tick_cnt <= '0;
    end else if (start) begin
      data     <= '1;
      tick_cnt <= '0;
    end else if (sample_tick) begin
      data     <= data - 1'b1;
      tick_cnt <= '0;
    end else if (data != '0) begin
      tick_cnt <= tick_cnt + 1'b1;
    end
  end

endmodule
