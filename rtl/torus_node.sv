// torus_node: one node (D_N) of the torus network.
//
// Three input routers (X, Y, processor P) decide from each packet's relative
// address where it goes, a switch arbitrates and merges the packets that
// want the same output, and a pipeline latch buffers each of the three
// outputs (X, Y, P). Routing is dimension order: X first, then Y, then the
// processor. Packets are switched cut-through: a packet holds its path
// through the node from its first flit to its EOP, while the flits behind
// the head keep moving.
//
//   X input -> router_x (Router_xy, Router_yp) -> xx, xy, xp
//   Y input -> sub_router (Y router)           -> yy, yp
//   P input -> router_p (PROC Router_xy, PROC Router_y) -> px, py
//   switch: X <- {xx, px}, Y <- {xy, yy, py}, P <- {xp, yp}
//
// Interface: six one-of-five four-phase channels (data 5 bits plus ack).
// PIPE_STAGES sets the length of the output pipeline latches (two, as in
// the document's figure). Block structure follows the document.
module torus_node
  import oof_pkg::*;
#(
  parameter int PIPE_STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t xin_data,  output logic xin_ack,
  input  flit_t yin_data,  output logic yin_ack,
  input  flit_t pin_data,  output logic pin_ack,
  output flit_t xout_data, input  logic xout_ack,
  output flit_t yout_data, input  logic yout_ack,
  output flit_t pout_data, input  logic pout_ack
);
  flit_t xx_data, xy_data, xp_data, yy_data, yp_data, px_data, py_data;
  logic  xx_ack, xy_ack, xp_ack, yy_ack, yp_ack, px_ack, py_ack;
  flit_t xmp_data, ymp_data, pmp_data;
  logic  xmp_ack, ymp_ack, pmp_ack;

  router_x u_router_x (
    .clk(clk), .rst_n(rst_n),
    .xin_data(xin_data), .xin_ack(xin_ack),
    .xx_data(xx_data), .xx_ack(xx_ack),
    .xy_data(xy_data), .xy_ack(xy_ack),
    .xp_data(xp_data), .xp_ack(xp_ack)
  );

  sub_router #(.HAS_OUT2(1'b1)) u_router_y (
    .clk(clk), .rst_n(rst_n),
    .in_data(yin_data), .in_ack(yin_ack),
    .out1_data(yy_data), .out1_ack(yy_ack),
    .out2_data(yp_data), .out2_ack(yp_ack)
  );

  router_p u_router_p (
    .clk(clk), .rst_n(rst_n),
    .pin_data(pin_data), .pin_ack(pin_ack),
    .px_data(px_data), .px_ack(px_ack),
    .py_data(py_data), .py_ack(py_ack)
  );

  switch u_switch (
    .clk(clk), .rst_n(rst_n),
    .xx_data(xx_data), .xx_ack(xx_ack),
    .px_data(px_data), .px_ack(px_ack),
    .xy_data(xy_data), .xy_ack(xy_ack),
    .yy_data(yy_data), .yy_ack(yy_ack),
    .py_data(py_data), .py_ack(py_ack),
    .xp_data(xp_data), .xp_ack(xp_ack),
    .yp_data(yp_data), .yp_ack(yp_ack),
    .xmp_data(xmp_data), .xmp_ack(xmp_ack),
    .ymp_data(ymp_data), .ymp_ack(ymp_ack),
    .pmp_data(pmp_data), .pmp_ack(pmp_ack)
  );

  pipeline_latch #(.STAGES(PIPE_STAGES)) u_pl_x (
    .clk(clk), .rst_n(rst_n),
    .in_data(xmp_data), .in_ack(xmp_ack), .out_data(xout_data), .out_ack(xout_ack)
  );
  pipeline_latch #(.STAGES(PIPE_STAGES)) u_pl_y (
    .clk(clk), .rst_n(rst_n),
    .in_data(ymp_data), .in_ack(ymp_ack), .out_data(yout_data), .out_ack(yout_ack)
  );
  pipeline_latch #(.STAGES(PIPE_STAGES)) u_pl_p (
    .clk(clk), .rst_n(rst_n),
    .in_data(pmp_data), .in_ack(pmp_ack), .out_data(pout_data), .out_ack(pout_ack)
  );
endmodule
