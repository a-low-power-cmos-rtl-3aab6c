// pixel_frontend: behavioural model of the analog front end of a TFS pixel.
//
// The photodiode, its capacitance, the two reset transistors and the
// current-feedback event generator are analog; this model replaces them by
// discrete-time integer arithmetic that synthesises and simulates like logic.
// The sensing-node voltage vn is a VW-bit number whose all-ones value stands
// for Vdd. Each clock the photocurrent code iph is subtracted (saturating at
// zero), i.e. the node discharges linearly as in the real pixel. The event
// output event_x is high while vn is at or below the inverter threshold VTH.
// With iph constant the event appears Tf = ceil((Vdd - VTH) / iph) clocks
// after start, the discrete form of Tf = (Vdd - VTH) * Cd / Id.
//
// Interface and timing:
//   start  one-clock pulse of the global reset: vn is loaded with Vdd.
//   hold   self reset (ASR): vn is kept at Vdd, no event is produced.
//   vn, event_x  registered value and its comparison, visible the clock
//          after the step that produced them.
// The threshold, the widths and the integer time base are choices of this
// model; the sharp transition of the feedback event generator is idealised
// into a comparator.
module pixel_frontend #(
  parameter int unsigned VW  = 17,
  parameter int unsigned IW  = 8,
  parameter logic [VW-1:0] VTH = VW'(1) << (VW - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          hold,
  input  logic [IW-1:0] iph,
  output logic [VW-1:0] vn,
  output logic          event_x
);

  localparam logic [VW-1:0] VDD = '1;

  always_ff @(posedge clk) begin
    if (!rst_n || start || hold) vn <= VDD;
    else if (vn > VW'(iph))      vn <= vn - VW'(iph);
    else                         vn <= '0;
  end

  assign event_x = (vn <= VTH);

endmodule
