// route_control: chooses and holds the output of a router stage.
//
// When the address flit is present (dec0 high), route_x (w3|w2|w1: the
// address is not zero) sets sx, meaning "stay in this dimension", and
// route_y (w0: the address is zero) sets sy, meaning "change dimension".
// Each select feeds back into its own C-element so that it stays set for
// the whole packet; eop_done, raised once the EOP flit has been handed on,
// clears both for the next packet.
//
// Interface: registered sx/sy, one clk step after dec0. As in the document's
// route control, with its C-elements rendered as registers. The EOP wire of
// flit plays no part in the choice and is not read.
module route_control
  import oof_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t flit,
  input  logic  dec0,
  input  logic  eop_done,
  output logic  sx,
  output logic  sy
);
  logic route_x, route_y;
  assign route_x = flit[3] | flit[2] | flit[1];
  assign route_y = flit[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sx <= 1'b0;
      sy <= 1'b0;
    end else if (eop_done) begin
      sx <= 1'b0;
      sy <= 1'b0;
    end else begin
      sx <= sx | (dec0 & route_x);
      sy <= sy | (dec0 & route_y);
    end
  end

  a_one_route: assert property (@(posedge clk) disable iff (!rst_n) !(sx && sy));
endmodule
