// set_dec: header state machine of a router stage.
//
// Tracks where the router is in a packet with the document's encoding:
// 00 idle (clear or latch), 01 decrement (the flit present is the address
// flit), 10 pass (every later flit, until EOP). The next state follows the
// document's truth table over route (a data wire w3..w0 is high) and the
// present state s:
//   route=1: 00->01, 01->10, 10->10      route=0: 00->00, 01->10, 10->10
// The state register takes the next state whenever step is high. The router
// steps it when a data flit returns to null, still presenting route = 1, so
// the next state computed for the flit is latched once the flit has gone:
// the address flit sees 00 (dec 01), the second flit 01 (dec 10), the rest
// 10 (dec 10). eop_reset, raised when the EOP flit has been handled,
// returns it to 00.
//
// Interface: dec = {n[1] & route, n[0] & route} tells the decrement unit what
// to do with the flit present (01 decrement, 10 pass). dec is combinational;
// s changes one clk step after step.
module set_dec
  import oof_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       route,
  input  logic       step,
  input  logic       eop_reset,
  output hdr_state_e s,
  output logic [1:0] dec
);
  hdr_state_e n;

  always_comb begin
    unique case (s)
      HDR_IDLE: n = route ? HDR_DEC : HDR_IDLE;
      HDR_DEC:  n = HDR_PASS;
      HDR_PASS: n = HDR_PASS;
      default:  n = HDR_IDLE;
    endcase
    dec = n & {2{route}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         s <= HDR_IDLE;
    else if (eop_reset) s <= HDR_IDLE;
    else if (step)      s <= n;
  end
endmodule
