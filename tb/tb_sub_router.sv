// tb_sub_router: test of one router stage, with and without its second
// output.
//
// 60 packets (address flit 0..3, 0..5 random data flits, EOP) go into two
// stages at once: one with both outputs and one without out2 (the
// processor's Y stage). Reference: a non-zero address leaves on out1
// decremented by one, followed by the rest of the packet unchanged; a zero
// address is stripped and the rest leaves on out2, or, for the stage
// without out2, the whole packet is given up. The receivers are randomly
// slow. Checks every output flit in order and that each case occurred.
module tb_sub_router;
  import oof_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t a_in, a_o1, a_o2, b_in, b_o1, b_o2;
  logic  a_in_ack, a_o1_ack, a_o2_ack, b_in_ack, b_o1_ack;
  int    checks = 0, failures = 0;
  int    n_dec = 0, n_strip = 0;
  flit_t exp_a1 [$], exp_a2 [$], exp_b1 [$];

  always #5 clk = ~clk;

  tb_chan_src #(.MAX_GAP(2)) u_src_a (.clk(clk), .rst_n(rst_n), .data(a_in), .ack(a_in_ack));
  tb_chan_src #(.MAX_GAP(2)) u_src_b (.clk(clk), .rst_n(rst_n), .data(b_in), .ack(b_in_ack));

  sub_router dut (
    .clk(clk), .rst_n(rst_n), .in_data(a_in), .in_ack(a_in_ack),
    .out1_data(a_o1), .out1_ack(a_o1_ack), .out2_data(a_o2), .out2_ack(a_o2_ack)
  );
  sub_router #(.HAS_OUT2(1'b0)) dut_no2 (
    .clk(clk), .rst_n(rst_n), .in_data(b_in), .in_ack(b_in_ack),
    .out1_data(b_o1), .out1_ack(b_o1_ack), .out2_data(b_o2), .out2_ack(1'b0)
  );

  tb_chan_sink #(.MAX_DELAY(3)) u_a1 (.clk(clk), .rst_n(rst_n), .data(a_o1), .ack(a_o1_ack), .stall(1'b0));
  tb_chan_sink #(.MAX_DELAY(3)) u_a2 (.clk(clk), .rst_n(rst_n), .data(a_o2), .ack(a_o2_ack), .stall(1'b0));
  tb_chan_sink #(.MAX_DELAY(3)) u_b1 (.clk(clk), .rst_n(rst_n), .data(b_o1), .ack(b_o1_ack), .stall(1'b0));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic compare(flit_t got [$], flit_t exp [$], string name);
    check(got.size() == exp.size(), $sformatf("%s: %0d flits, expected %0d", name, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i] == exp[i], $sformatf("%s flit %0d: %b, expected %b", name, i, got[i], exp[i]));
  endtask

  always @(posedge clk) if (rst_n) begin
    if (b_o2 != FLIT_NULL) begin
      failures++;
      $display("FAIL: stage without out2 drives out2");
    end
  end

  initial begin
    int addr;
    flit_t body [$];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 60; n++) begin
      addr = int'($urandom % 4);
      body.delete();
      repeat ($urandom % 6) body.push_back(encode2(2'($urandom)));
      body.push_back(FLIT_EOP);
      u_src_a.q.push_back(encode2(2'(addr)));
      u_src_b.q.push_back(encode2(2'(addr)));
      foreach (body[i]) begin
        u_src_a.q.push_back(body[i]);
        u_src_b.q.push_back(body[i]);
      end
      if (addr != 0) begin
        n_dec++;
        exp_a1.push_back(encode2(2'(addr - 1)));
        exp_b1.push_back(encode2(2'(addr - 1)));
        foreach (body[i]) begin
          exp_a1.push_back(body[i]);
          exp_b1.push_back(body[i]);
        end
      end else begin
        n_strip++;
        foreach (body[i]) exp_a2.push_back(body[i]);
      end
    end
    while (u_src_a.q.size() > 0 || u_src_b.q.size() > 0) @(posedge clk);
    repeat (100) @(posedge clk);
    compare(u_a1.q, exp_a1, "out1");
    compare(u_a2.q, exp_a2, "out2");
    compare(u_b1.q, exp_b1, "no-out2 stage out1");
    check(n_dec > 0 && n_strip > 0, "decrement and strip cases not both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
