// merge: joins N input channels into one output channel behind an arbiter.
//
// The code word of the granted input is ORed onto a row of five C-elements
// (the output latch), which takes it when the downstream ack is low and
// returns to null when the input is null and the downstream ack is high. The
// OR of the latch is the ack returned to the granted input only. After the
// latch has carried an EOP and gone back to null, the packet is complete:
// the merge raises release, which makes the arbiter drop the grant, and lets
// nothing through until all grants are low. Used with N = 2 (Merge) and
// N = 3 (Merge3).
//
// Interface: in_data[i]/in_ack[i] four-phase input channels, gnt[i] one-hot
// grant from the arbiter, out_data/out_ack the merged channel, release_o to
// the arbiter. One clk step from input to output. OR-merge and output
// C-element latch follow the document; the end-of-packet release state is
// this design's.
module merge
  import oof_pkg::*;
#(
  parameter int N = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in_data [N],
  output logic  [N-1:0] in_ack,
  input  logic  [N-1:0] gnt,
  output flit_t         out_data,
  input  logic          out_ack,
  output logic          release_o
);
  typedef enum logic [1:0] {PKT_OPEN, PKT_EOP_SEEN, PKT_DONE} pkt_state_e;
  pkt_state_e pkt;
  flit_t      sel;

  always_comb begin
    sel = FLIT_NULL;
    for (int i = 0; i < N; i++)
      if (gnt[i] && pkt != PKT_DONE) sel |= in_data[i];
  end

  c_element #(.WIDTH(5)) u_latch (
    .clk(clk), .rst_n(rst_n),
    .a(sel), .b({5{~out_ack}}), .c('1),
    .z(out_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) pkt <= PKT_OPEN;
    else begin
      unique case (pkt)
        PKT_OPEN:     if (out_data[EOP_BIT]) pkt <= PKT_EOP_SEEN;
        PKT_EOP_SEEN: if (!flit_valid(out_data)) pkt <= PKT_DONE;
        PKT_DONE:     if (gnt == '0) pkt <= PKT_OPEN;
        default:      pkt <= PKT_OPEN;
      endcase
    end
  end

  assign release_o = (pkt == PKT_DONE);
  assign in_ack    = gnt & {N{flit_valid(out_data)}};

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_onehot_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_data));
endmodule
