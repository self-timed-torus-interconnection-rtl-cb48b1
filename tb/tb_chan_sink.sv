// tb_chan_sink: behavioural receiver on a one-of-five four-phase channel.
//
// Waits for a code word, optionally lets 0..MAX_DELAY cycles pass (a slow
// receiver), stores the word in q, raises ack, waits for null and lowers
// ack. While stall is high it accepts nothing.
module tb_chan_sink
  import oof_pkg::*;
#(
  parameter int MAX_DELAY = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t data,
  output logic  ack,
  input  logic  stall
);
  flit_t q [$];

  initial begin
    ack = 1'b0;
    forever begin
      @(posedge clk);
      if (rst_n && !stall && data != FLIT_NULL) begin
        if (MAX_DELAY > 0) repeat ($urandom % (MAX_DELAY + 1)) @(posedge clk);
        q.push_back(data);
        ack <= 1'b1;
        do @(posedge clk); while (data != FLIT_NULL);
        ack <= 1'b0;
      end
    end
  end
endmodule
