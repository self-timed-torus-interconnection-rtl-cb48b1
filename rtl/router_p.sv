// router_p: input router of the processor channel of a node.
//
// Two router stages in series. PROC Router_xy reads the relative X address:
// not zero, decremented, packet to the X output on px; zero, stripped,
// packet on pr to PROC Router_y. That stage reads the relative Y address:
// not zero, decremented, packet to the Y output on py. A zero Y address
// after a zero X address would send the packet back to the processor it
// came from; the stage has no output for that and gives the packet up
// (every flit up to EOP is acknowledged and discarded).
//
// Interface: pin/pin_ack from the processor, px and py toward the switch.
// Structure and the give-up case as in the document's node diagram and FSM.
module router_p
  import oof_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t pin_data,
  output logic  pin_ack,
  output flit_t px_data,
  input  logic  px_ack,
  output flit_t py_data,
  input  logic  py_ack
);
  flit_t pr_data;
  logic  pr_ack;
  flit_t unused_out2;

  sub_router #(.HAS_OUT2(1'b1)) u_proc_router_xy (
    .clk(clk), .rst_n(rst_n),
    .in_data(pin_data), .in_ack(pin_ack),
    .out1_data(px_data), .out1_ack(px_ack),
    .out2_data(pr_data), .out2_ack(pr_ack)
  );

  sub_router #(.HAS_OUT2(1'b0)) u_proc_router_y (
    .clk(clk), .rst_n(rst_n),
    .in_data(pr_data), .in_ack(pr_ack),
    .out1_data(py_data), .out1_ack(py_ack),
    .out2_data(unused_out2), .out2_ack(1'b0)
  );
endmodule
