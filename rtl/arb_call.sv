// arb_call: arbitrated call block.
//
// Lets two clients share one resource through a mutex. The client that wins
// the mutex has its request passed up as the block's own request; the grant
// coming down is returned to that client only. Blocks nest into a tree: the
// request/grant pair of one block is a client of the next (see
// arbiter_tree). A client holds its mutex while its request or its grant is
// high, so the four-phase request/grant cycle completes before the other
// client can win.
//
// Interface: req1/gnt1 and req2/gnt2 toward the clients, req/gnt toward the
// resource (tie gnt to req at the root). Grants are combinational from gnt
// and the registered mutex outputs. Structure after the document's call
// block; the holding of the mutex by the grant is as drawn there.
module arb_call (
  input  logic clk,
  input  logic rst_n,
  input  logic req1,
  output logic gnt1,
  input  logic req2,
  output logic gnt2,
  output logic req,
  input  logic gnt
);
  logic m1, m2;

  mutex u_mutex (
    .clk(clk), .rst_n(rst_n),
    .r1(req1 | gnt1), .r2(req2 | gnt2),
    .g1(m1), .g2(m2)
  );

  assign req  = (req1 & m1) | (req2 & m2);
  assign gnt1 = gnt & m1;
  assign gnt2 = gnt & m2;
endmodule
