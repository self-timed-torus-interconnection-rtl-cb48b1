// arbiter_tree: three-input arbiter of an output channel, built as a tree of
// arbitrated call blocks.
//
// Inputs 0 and 1 meet in a leaf call block; its request and input 2 meet in
// the root block, whose grant is its own request. Each input has a request
// latch, set by the first flit of a packet and cleared by release once the
// merge has passed that packet's EOP (as in arbiter). Used for the Y output,
// which can be fed by the X router, the Y router and the processor router.
//
// Interface: req_data[i] forward code word of input i, gnt[i] one-hot grant,
// release from the merge. Latency: request latch plus one mutex step per tree
// level. Tree shape after the document's arbitration tree figure; the
// assignment of inputs to leaves is this design's own.
module arbiter_tree
  import oof_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       req_data [3],
  input  logic        release_i,
  output logic [2:0]  gnt
);
  logic [2:0] hold;
  logic       leaf_req, leaf_gnt, root_req;

  always_ff @(posedge clk) begin
    if (!rst_n) hold <= '0;
    else begin
      for (int i = 0; i < 3; i++) begin
        if (release_i) hold[i] <= hold[i] & ~gnt[i];
        else           hold[i] <= hold[i] | flit_valid(req_data[i]);
      end
    end
  end

  arb_call u_leaf (
    .clk(clk), .rst_n(rst_n),
    .req1(hold[0]), .gnt1(gnt[0]),
    .req2(hold[1]), .gnt2(gnt[1]),
    .req(leaf_req), .gnt(leaf_gnt)
  );

  arb_call u_root (
    .clk(clk), .rst_n(rst_n),
    .req1(leaf_req), .gnt1(leaf_gnt),
    .req2(hold[2]),  .gnt2(gnt[2]),
    .req(root_req),  .gnt(root_req)
  );

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
