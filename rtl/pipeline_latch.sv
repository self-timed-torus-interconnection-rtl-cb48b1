// pipeline_latch: output-channel buffer made of one-of-five C-element
// latch stages.
//
// Each stage is a row of five C-elements. A stage latches a code word when
// its input carries one and the stage behind it has returned its ack to
// zero (inverted ack on the C-element's second input), and returns to null
// when its input is null and the stage behind acknowledges. The ack a stage
// gives to the stage before it is the OR of its five outputs (completion
// detection). With STAGES = 2 (the document's two-stage latch) the buffer
// holds up to one code word and one spacer per stage, so a slow receiver
// does not stall the switch immediately.
//
// Interface: in_data/in_ack is the four-phase channel from the merge;
// out_data/out_ack goes to the next node or processor. Each stage adds one
// clk step of forward latency (see c_element). The structure follows the
// document; the stage count is a parameter.
module pipeline_latch
  import oof_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_data,
  output logic  in_ack,
  output flit_t out_data,
  input  logic  out_ack
);
  flit_t stage_q [STAGES];
  logic  ack_from_next [STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    flit_t d;
    if (s == 0) begin : g_first
      assign d = in_data;
    end else begin : g_rest
      assign d = stage_q[s-1];
    end
    if (s == STAGES - 1) begin : g_last
      assign ack_from_next[s] = out_ack;
    end else begin : g_mid
      assign ack_from_next[s] = flit_valid(stage_q[s+1]);
    end
    c_element #(.WIDTH(5)) u_row (
      .clk(clk), .rst_n(rst_n),
      .a(d), .b({5{~ack_from_next[s]}}), .c('1),
      .z(stage_q[s])
    );
  end

  assign in_ack   = flit_valid(stage_q[0]);
  assign out_data = stage_q[STAGES-1];

  // The channel code is one-hot or null on both sides.
  a_in_onehot0:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_data));
  a_out_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_data));
endmodule
