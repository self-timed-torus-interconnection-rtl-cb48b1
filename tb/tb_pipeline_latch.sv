// tb_pipeline_latch: self-checking test of the output pipeline latch.
//
// Sends 200 random code words (data and EOP) through the default two-stage
// latch into a receiver with random delay and checks that they come out in
// order and unchanged. Then, with an always-ready receiver, checks the
// forward latency: a word appears at the output STAGES cycles after it is
// put on the input. Finally, with the receiver stalled, checks that the
// latch acknowledges the first word (it is buffered) and holds it.
module tb_pipeline_latch;
  import oof_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t in_data, out_data;
  logic  in_ack, out_ack;
  logic  stall = 1'b0;
  int    checks = 0, failures = 0;
  flit_t sent [$];

  always #5 clk = ~clk;

  tb_chan_src  #(.MAX_GAP(2))   u_src  (.clk(clk), .rst_n(rst_n), .data(in_data), .ack(in_ack));
  pipeline_latch                dut    (.clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack),
                                        .out_data(out_data), .out_ack(out_ack));
  tb_chan_sink #(.MAX_DELAY(3)) u_sink (.clk(clk), .rst_n(rst_n), .data(out_data), .ack(out_ack),
                                        .stall(stall));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    flit_t f;
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      f = (i % 9 == 8) ? FLIT_EOP : encode2(2'($urandom));
      sent.push_back(f);
      u_src.q.push_back(f);
    end
    while (u_sink.q.size() < 200) @(posedge clk);
    for (int i = 0; i < 200; i++)
      check(u_sink.q[i] == sent[i], $sformatf("word %0d is %b, expected %b", i, u_sink.q[i], sent[i]));
    u_sink.q.delete();

    // Latency: put one word on the idle latch by hand.
    repeat (5) @(posedge clk);
    stall <= 1'b1;
    u_src.q.push_back(FLIT_D10);
    @(posedge clk);
    while (in_data == FLIT_NULL) @(posedge clk);
    t0 = 0;
    while (out_data == FLIT_NULL) begin
      @(posedge clk);
      t0++;
    end
    check(t0 == 2, $sformatf("latency %0d cycles, expected 2 (STAGES)", t0));
    // Stalled receiver: the word is buffered and acknowledged upstream.
    repeat (4) @(posedge clk);
    check(out_data == FLIT_D10, "stalled output does not hold its word");
    check(u_src.sent == 201, "buffered word was not acknowledged upstream");
    stall <= 1'b0;
    repeat (10) @(posedge clk);
    check(u_sink.q.size() == 1 && u_sink.q[0] == FLIT_D10, "word lost after stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
