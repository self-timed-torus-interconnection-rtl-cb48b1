// decrement: decrements or passes a one-of-five code word.
//
// With dec = 01 the two-bit value is lowered by one: w3->w2, w2->w1,
// w1->w0 (w0 is never decremented: a zero address is stripped by the router
// instead, so it yields null here). With dec = 10 the data wires pass
// unchanged. The EOP wire passes whatever dec is. dec = 00 gives null on the
// data wires.
//
// Interface: purely combinational, flit_in/dec to flit_out. In the document
// the outputs sit behind asymmetric C-elements; here the latching is done by
// the output C-element rows of the router stage that uses this block.
module decrement
  import oof_pkg::*;
(
  input  flit_t      flit_in,
  input  logic [1:0] dec,
  output flit_t      flit_out
);
  always_comb begin
    flit_out = {flit_in[4], 4'b0000};
    if (dec[0])      flit_out[2:0] = flit_in[3:1];
    else if (dec[1]) flit_out[3:0] = flit_in[3:0];
  end
endmodule
