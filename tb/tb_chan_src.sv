// tb_chan_src: behavioural sender on a one-of-five four-phase channel.
//
// Code words pushed onto q are sent in order: drive the word, wait for ack
// high, drive null, wait for ack low. MAX_GAP > 0 inserts a random idle gap
// of 0..MAX_GAP cycles before each word. sent counts completed handshakes.
module tb_chan_src
  import oof_pkg::*;
#(
  parameter int MAX_GAP = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  output flit_t data,
  input  logic  ack
);
  flit_t q [$];
  int    sent = 0;

  initial begin
    flit_t f;
    data = FLIT_NULL;
    forever begin
      @(posedge clk);
      if (rst_n && q.size() > 0) begin
        if (MAX_GAP > 0) repeat ($urandom % (MAX_GAP + 1)) @(posedge clk);
        f = q.pop_front();
        data <= f;
        do @(posedge clk); while (!ack);
        data <= FLIT_NULL;
        do @(posedge clk); while (ack);
        sent++;
      end
    end
  end
endmodule
