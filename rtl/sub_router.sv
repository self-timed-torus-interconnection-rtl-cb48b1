// sub_router: one router stage of a node (Router_xy, Router_yp, the Y
// router, PROC Router_xy, PROC Router_y).
//
// The first flit of a packet is the relative address for this stage's
// dimension. If it is not zero the packet stays in the dimension: the
// address is decremented and the packet leaves on out1. If it is zero the
// address flit is stripped (acknowledged and dropped) and the packet leaves
// on out2, the next dimension or the processor. All later flits pass
// unchanged to the same output until EOP; then the stage is cleared for the
// next packet. A stage with HAS_OUT2 = 0 (the processor's Y stage, which
// must not send a packet back to its own processor) gives up a packet whose
// address is zero: it acknowledges and discards every flit up to EOP.
//
// Structure, after the document's router figure:
//   set_dec       header state 00/01/10; dec = 01 for the address flit,
//                 10 for the others. It steps when the input returns to null.
//   decrement     applies dec to the flit (EOP always passes).
//   route_control sets sx (address not zero) or sy (zero) from the address
//                 flit and holds it until the packet is done.
//   out1/out2     rows of asymmetric C-elements: a = decremented flit,
//                 b = inverted ack of the output, "+" input = sx or sy. A row
//                 latches the flit once its select is set and falls when the
//                 flit has gone and the output has acknowledged; the select
//                 does not take part in the fall.
//   dec_w0        C-element that acknowledges a zero address flit (strip).
//   drop          acknowledges flits of a given-up packet (and a stray EOP
//                 with no route), this design's addition for the give-up case.
//   in_ack        OR of out1, out2, dec_w0 and drop (completion detection).
// The packet is done when the ack of an EOP flit returns to zero; that
// clears route_control and set_dec.
//
// Interface: in_data/in_ack upstream, out1_*/out2_* downstream, all
// one-of-five four-phase channels. Timing: an address flit reaches its
// output two clk steps after it arrives (select, then latch), later flits
// one step. With HAS_OUT2 = 0, out2_data is null and out2_ack is not read.
module sub_router
  import oof_pkg::*;
#(
  parameter bit HAS_OUT2 = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_data,
  output logic  in_ack,
  output flit_t out1_data,
  input  logic  out1_ack,
  output flit_t out2_data,
  input  logic  out2_ack
);
  logic       route;      // a data wire is high
  logic       route_q;
  logic       step;
  logic       first;      // the address flit has just arrived
  logic       eop_done;
  logic [1:0] dec;
  hdr_state_e hdr_s;
  flit_t      dec_flit;
  logic       sx, sy;
  logic       strip_q;
  logic       drop_en, drop_q;
  logic       in_ack_q, acked_eop;
  flit_t      out2_q;

  assign route = |in_data[3:0];

  // Step the header state when the input returns to null after a data flit.
  always_ff @(posedge clk) begin
    if (!rst_n) route_q <= 1'b0;
    else        route_q <= route;
  end
  assign step  = route_q & ~route;
  assign first = route & ~route_q & (hdr_s == HDR_IDLE);

  // set_dec sees route for one extra step so that the state latched on the
  // return to null is the next state of a present flit (the flit is gone by
  // then, so the extra dec step has nothing to act on).
  set_dec u_set_dec (
    .clk(clk), .rst_n(rst_n),
    .route(route | route_q), .step(step), .eop_reset(eop_done),
    .s(hdr_s), .dec(dec)
  );

  decrement u_decrement (
    .flit_in(in_data), .dec(dec), .flit_out(dec_flit)
  );

  route_control u_route_control (
    .clk(clk), .rst_n(rst_n),
    .flit(in_data), .dec0(dec[0]), .eop_done(eop_done),
    .sx(sx), .sy(sy)
  );

  // Output latches with the select on the asymmetric input.
  c_element #(.WIDTH(5)) u_out1 (
    .clk(clk), .rst_n(rst_n),
    .a(dec_flit), .b({5{~out1_ack}}), .c({5{sx}}),
    .z(out1_data)
  );

  if (HAS_OUT2) begin : g_out2
    c_element #(.WIDTH(5)) u_out2 (
      .clk(clk), .rst_n(rst_n),
      .a(dec_flit), .b({5{~out2_ack}}), .c({5{sy}}),
      .z(out2_q)
    );
  end else begin : g_no_out2
    assign out2_q = FLIT_NULL;
  end
  assign out2_data = out2_q;

  // Strip: a zero address flit is acknowledged here and goes nowhere.
  c_element #(.WIDTH(1)) u_dec_w0 (
    .clk(clk), .rst_n(rst_n),
    .a(in_data[0]), .b(dec[0]), .c(1'b1),
    .z(strip_q)
  );

  // Give-up: flits of a zero-address packet in a stage without out2, and an
  // EOP that arrives with no route selected, are acknowledged and dropped.
  assign drop_en = (sy & ~HAS_OUT2) | (~sx & ~sy & in_data[EOP_BIT]);
  c_element #(.WIDTH(1)) u_drop (
    .clk(clk), .rst_n(rst_n),
    .a(flit_valid(dec_flit)), .b(flit_valid(dec_flit)), .c(drop_en),
    .z(drop_q)
  );

  assign in_ack = flit_valid(out1_data) | flit_valid(out2_q) | strip_q | drop_q;

  // The packet is finished when the ack of its EOP falls.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_ack_q  <= 1'b0;
      acked_eop <= 1'b0;
    end else begin
      in_ack_q <= in_ack;
      if (in_ack & ~in_ack_q) acked_eop <= in_data[EOP_BIT];
    end
  end
  assign eop_done = in_ack_q & ~in_ack & acked_eop;

  // A flit is only handed on once the address flit has been dealt with, and
  // only one output is ever selected.
  a_send_after_hdr: assert property (@(posedge clk) disable iff (!rst_n)
                                     flit_valid(out1_data) |-> (hdr_s != HDR_IDLE || dec[0]));
  a_first_dec:      assert property (@(posedge clk) disable iff (!rst_n)
                                     first |-> dec == 2'b01);
  a_one_out:        assert property (@(posedge clk) disable iff (!rst_n)
                                     !(flit_valid(out1_data) && flit_valid(out2_q)));
  a_in_onehot0:     assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_data));
endmodule
