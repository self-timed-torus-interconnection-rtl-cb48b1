// torus_network: self-timed K-ary 2-cube (torus) interconnection network
// with one-of-five encoded channels.
//
// K x K nodes, node n = K*row + col. The X output of node (row, col) feeds
// the X input of (row, col+1 mod K) and the Y output feeds the Y input of
// (row+1 mod K, col), so every row and every column is a unidirectional
// ring with a wrap-around link. Each node has a processor port (pin/pout).
//
// A packet is a sequence of one-of-five flits: relative X address, relative
// Y address (each one flit, the number of hops still to go in that
// dimension, 0..3), any number of two-bit data flits, then EOP. Each node
// on the way decrements the address of the dimension it forwards in and
// strips it when it reaches zero; the destination delivers the data flits
// and the EOP to its processor. Relative addresses count hops in the
// direction of the links, so any node can reach any other in at most three
// X hops and three Y hops.
//
// Interface: per node, a processor input channel pin_data/pin_ack and an
// output channel pout_data/pout_ack, four-phase return-to-zero. The
// processors themselves are not part of the network. K defaults to 4 (the
// document's 4 by 4 network); with one address flit per dimension K can be
// at most 4.
//
// Note on deadlock: as in the document, packets hold their channels from
// head to tail and there are no virtual channels, so packets whose paths
// form a cycle around a ring can block each other for good.
module torus_network
  import oof_pkg::*;
#(
  parameter int K           = 4,
  parameter int PIPE_STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t pin_data  [K*K],
  output logic  pin_ack   [K*K],
  output flit_t pout_data [K*K],
  input  logic  pout_ack  [K*K]
);
  if (K < 2 || K > 4) begin : g_bad_k
    $error("torus_network: K must be 2..4, one address flit holds 0..3");
  end

  flit_t xout_data [K*K];
  logic  xout_ack  [K*K];
  flit_t yout_data [K*K];
  logic  yout_ack  [K*K];

  for (genvar r = 0; r < K; r++) begin : g_row
    for (genvar c = 0; c < K; c++) begin : g_col
      localparam int N   = r * K + c;
      localparam int XPR = r * K + (c + K - 1) % K;    // node west of N
      localparam int YPR = ((r + K - 1) % K) * K + c;  // node north of N
      torus_node #(.PIPE_STAGES(PIPE_STAGES)) u_node (
        .clk(clk), .rst_n(rst_n),
        .xin_data(xout_data[XPR]), .xin_ack(xout_ack[XPR]),
        .yin_data(yout_data[YPR]), .yin_ack(yout_ack[YPR]),
        .pin_data(pin_data[N]),    .pin_ack(pin_ack[N]),
        .xout_data(xout_data[N]),  .xout_ack(xout_ack[N]),
        .yout_data(yout_data[N]),  .yout_ack(yout_ack[N]),
        .pout_data(pout_data[N]),  .pout_ack(pout_ack[N])
      );
    end
  end
endmodule
