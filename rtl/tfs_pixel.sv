// tfs_pixel: one Time-to-First-Spike pixel with its AER handshake.
//
// After the global start the front end integrates. When the sensing node
// crosses the threshold the pixel raises its row request (WrdReq). Once the
// row is acknowledged (WrdAck) the pixel drives its column request (ColReq).
// When both WrdAck and ColAck are present it resets its own sensing node
// (ASR) and enters stand-by, where it stays, drawing no bus, until the next
// global start. Each pixel therefore sends exactly one event per frame.
//
// Interface (all signals active high; the circuit uses active-low lines):
//   start            global start of integration, one clock
//   iph              photocurrent code
//   wrd_ack/col_ack  row and column acknowledgements (shared lines)
//   wrd_req/col_req  row and column requests (wire-ORed by the array)
//   standby          pixel has been read in this frame (or never started)
// Timing: wrd_req rises the clock after event_x; col_req follows wrd_ack
// combinationally; stand-by is entered on the clock edge at which wrd_ack and
// col_ack are both seen. The request order follows the pixel described; the
// clocked state machine in place of transistors m8-m14 is this model's own.
module tfs_pixel
  import tfs_pkg::*;
#(
  parameter int unsigned VW  = 17,
  parameter int unsigned IW  = 8,
  parameter logic [VW-1:0] VTH = VW'(1) << (VW - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] iph,
  input  logic          wrd_ack,
  input  logic          col_ack,
  output logic          wrd_req,
  output logic          col_req,
  output logic          standby,
  output logic [VW-1:0] vn
);

  pixel_state_e state;
  logic event_x;

  pixel_frontend #(.VW(VW), .IW(IW), .VTH(VTH)) u_fe (
    .clk, .rst_n, .start,
    .hold   (state == PX_STANDBY && !start),
    .iph,
    .vn,
    .event_x
  );

  always_ff @(posedge clk) begin
    if (!rst_n) state <= PX_STANDBY;
    else if (start) state <= PX_INTEGRATE;
    else begin
      unique case (state)
        PX_INTEGRATE: if (event_x) state <= PX_FIRED;
        PX_FIRED:     if (wrd_ack && col_ack) state <= PX_STANDBY;  // self reset
        default:      state <= PX_STANDBY;
      endcase
    end
  end

  assign wrd_req = (state == PX_FIRED);
  assign col_req = (state == PX_FIRED) && wrd_ack;
  assign standby = (state == PX_STANDBY);

endmodule
