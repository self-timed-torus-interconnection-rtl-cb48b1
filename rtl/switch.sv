// switch: arbitration and merging for the three outputs of a node.
//
//   X output: arbiter over xx (from the X router) and px (processor), Merge.
//   Y output: arbiter tree over xy, yy and py, Merge3.
//   P output: arbiter over xp and yp, Merge.
// Each output is owned by one packet from its first flit to its EOP; a
// packet that loses arbitration waits with its first flit on its channel.
// The acks of the merges go back to the routers' output channels.
//
// Interface: the seven router-side channels and the three merged channels
// xmp, ymp and pmp toward the output pipeline latches. Which input feeds
// which output is taken from the document's node diagram.
module switch
  import oof_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t xx_data, output logic xx_ack,
  input  flit_t px_data, output logic px_ack,
  input  flit_t xy_data, output logic xy_ack,
  input  flit_t yy_data, output logic yy_ack,
  input  flit_t py_data, output logic py_ack,
  input  flit_t xp_data, output logic xp_ack,
  input  flit_t yp_data, output logic yp_ack,
  output flit_t xmp_data, input logic xmp_ack,
  output flit_t ymp_data, input logic ymp_ack,
  output flit_t pmp_data, input logic pmp_ack
);
  flit_t      x_in [2];
  flit_t      y_in [3];
  flit_t      p_in [2];
  logic [1:0] x_gnt, p_gnt, x_ack, p_ack;
  logic [2:0] y_gnt, y_ack;
  logic       x_rel, y_rel, p_rel;

  assign x_in = '{xx_data, px_data};
  assign y_in = '{xy_data, yy_data, py_data};
  assign p_in = '{xp_data, yp_data};

  arbiter u_arb_x (.clk(clk), .rst_n(rst_n), .req_data(x_in), .release_i(x_rel), .gnt(x_gnt));
  merge #(.N(2)) u_merge_x (
    .clk(clk), .rst_n(rst_n), .in_data(x_in), .in_ack(x_ack), .gnt(x_gnt),
    .out_data(xmp_data), .out_ack(xmp_ack), .release_o(x_rel)
  );

  arbiter_tree u_arb_y (.clk(clk), .rst_n(rst_n), .req_data(y_in), .release_i(y_rel), .gnt(y_gnt));
  merge #(.N(3)) u_merge_y (
    .clk(clk), .rst_n(rst_n), .in_data(y_in), .in_ack(y_ack), .gnt(y_gnt),
    .out_data(ymp_data), .out_ack(ymp_ack), .release_o(y_rel)
  );

  arbiter u_arb_p (.clk(clk), .rst_n(rst_n), .req_data(p_in), .release_i(p_rel), .gnt(p_gnt));
  merge #(.N(2)) u_merge_p (
    .clk(clk), .rst_n(rst_n), .in_data(p_in), .in_ack(p_ack), .gnt(p_gnt),
    .out_data(pmp_data), .out_ack(pmp_ack), .release_o(p_rel)
  );

  assign xx_ack = x_ack[0];
  assign px_ack = x_ack[1];
  assign xy_ack = y_ack[0];
  assign yy_ack = y_ack[1];
  assign py_ack = y_ack[2];
  assign xp_ack = p_ack[0];
  assign yp_ack = p_ack[1];
endmodule
