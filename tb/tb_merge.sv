// tb_merge: test of the merge with grants driven by the testbench.
//
// For 30 packets the testbench grants one input at random while the other
// input also holds a flit on its channel. Checks: the granted input's packet
// appears on the output flit for flit, the other input is never
// acknowledged and never leaks onto the output, release is raised only
// after the EOP has passed, and release falls once the grant is removed.
module tb_merge;
  import oof_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  flit_t      in_data [2];
  logic [1:0] in_ack, gnt = 2'b00;
  flit_t      out_data;
  logic       out_ack, rel;
  int         checks = 0, failures = 0;
  int         winner = 0;

  always #5 clk = ~clk;

  tb_chan_src #(.MAX_GAP(2)) u_src0 (.clk(clk), .rst_n(rst_n), .data(in_data[0]), .ack(in_ack[0]));
  tb_chan_src #(.MAX_GAP(2)) u_src1 (.clk(clk), .rst_n(rst_n), .data(in_data[1]), .ack(in_ack[1]));

  merge dut (.clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack), .gnt(gnt),
             .out_data(out_data), .out_ack(out_ack), .release_o(rel));

  tb_chan_sink #(.MAX_DELAY(2)) u_sink (.clk(clk), .rst_n(rst_n), .data(out_data), .ack(out_ack),
                                        .stall(1'b0));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_ack[1 - winner] && !gnt[1 - winner]) begin
      failures++;
      $display("FAIL: input %0d acknowledged without grant", 1 - winner);
    end
    if (rel && u_sink.q.size() > 0 && u_sink.q[u_sink.q.size() - 1] != FLIT_EOP) begin
      failures++;
      $display("FAIL: release before EOP");
    end
  end

  initial begin
    flit_t pkt [$];
    flit_t blocker;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 30; n++) begin
      winner = int'($urandom % 2);
      pkt.delete();
      repeat (1 + $urandom % 6) pkt.push_back(encode2(2'($urandom)));
      pkt.push_back(FLIT_EOP);
      // The loser puts a flit on its channel that must stay there.
      blocker = FLIT_D11;
      if (winner == 0) u_src1.q.push_back(blocker); else u_src0.q.push_back(blocker);
      foreach (pkt[i]) if (winner == 0) u_src0.q.push_back(pkt[i]); else u_src1.q.push_back(pkt[i]);
      u_sink.q.delete();
      gnt <= 2'(1 << winner);
      while (!rel) @(posedge clk);
      check(u_sink.q.size() == pkt.size(), $sformatf("packet %0d: %0d flits out, %0d sent",
            n, u_sink.q.size(), pkt.size()));
      foreach (pkt[i]) if (i < u_sink.q.size())
        check(u_sink.q[i] == pkt[i], $sformatf("packet %0d flit %0d wrong", n, i));
      gnt <= 2'b00;
      repeat (2) @(posedge clk);
      check(!rel, "release does not fall after the grant is removed");
      // Let the blocker through with its own grant and EOP.
      if (winner == 0) u_src1.q.push_back(FLIT_EOP); else u_src0.q.push_back(FLIT_EOP);
      u_sink.q.delete();
      gnt <= 2'(1 << (1 - winner));
      winner = 1 - winner;
      while (!rel) @(posedge clk);
      check(u_sink.q.size() == 2 && u_sink.q[0] == blocker, "held flit of the other input lost");
      gnt <= 2'b00;
      repeat (2) @(posedge clk);
    end
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
