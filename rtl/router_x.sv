// router_x: input router of the X channel of a node.
//
// Two router stages in series. The first (Router_xy) reads the relative X
// address: if it is not zero it is decremented and the packet continues on
// xx to the X output; if it is zero it is stripped and the packet goes on xr
// to the second stage (Router_yp). That stage reads the relative Y address:
// not zero, decremented, packet to the Y output on xy; zero, stripped,
// packet to the node's processor on xp. A packet arriving on X can thus
// leave on any of the three outputs.
//
// Interface: xin/xin_ack from the neighbour, and the four-phase channels
// xx, xy and xp toward the switch. Structure as in the document's node
// diagram.
module router_x
  import oof_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t xin_data,
  output logic  xin_ack,
  output flit_t xx_data,
  input  logic  xx_ack,
  output flit_t xy_data,
  input  logic  xy_ack,
  output flit_t xp_data,
  input  logic  xp_ack
);
  flit_t xr_data;
  logic  xr_ack;

  sub_router #(.HAS_OUT2(1'b1)) u_router_xy (
    .clk(clk), .rst_n(rst_n),
    .in_data(xin_data), .in_ack(xin_ack),
    .out1_data(xx_data), .out1_ack(xx_ack),
    .out2_data(xr_data), .out2_ack(xr_ack)
  );

  sub_router #(.HAS_OUT2(1'b1)) u_router_yp (
    .clk(clk), .rst_n(rst_n),
    .in_data(xr_data), .in_ack(xr_ack),
    .out1_data(xy_data), .out1_ack(xy_ack),
    .out2_data(xp_data), .out2_ack(xp_ack)
  );
endmodule
