// arbiter: two-input arbiter of an output channel.
//
// A request latch per input records that the input's sender has put the
// first flit of a packet on its channel (OR of the five wires). The latches
// feed one arbitrated call block (mutex inside), whose grant goes to the
// merge. A request latch stays set for the whole packet and is cleared only
// when the merge reports, through release, that the packet's EOP has left;
// this keeps the output channel owned by one packet at a time, which is what
// cut-through routing needs. A losing input waits with its request latched.
//
// Interface: req_data[i] is input i's forward code word (only its validity
// is used), gnt[i] the grant to the merge, release from the merge.
// Latency: request latch one clk step, mutex one more. Following the
// document's arbiter; the clearing through release is this design's way of
// detecting the end of the packet.
module arbiter
  import oof_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       req_data [2],
  input  logic        release_i,
  output logic [1:0]  gnt
);
  logic [1:0] hold;
  logic       root_req;

  always_ff @(posedge clk) begin
    if (!rst_n) hold <= '0;
    else begin
      for (int i = 0; i < 2; i++) begin
        if (release_i) hold[i] <= hold[i] & ~gnt[i];
        else           hold[i] <= hold[i] | flit_valid(req_data[i]);
      end
    end
  end

  arb_call u_call (
    .clk(clk), .rst_n(rst_n),
    .req1(hold[0]), .gnt1(gnt[0]),
    .req2(hold[1]), .gnt2(gnt[1]),
    .req(root_req), .gnt(root_req)
  );

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
