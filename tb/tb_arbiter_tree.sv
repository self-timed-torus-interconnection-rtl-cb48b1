// tb_arbiter_tree: test of the three-input arbiter tree together with a three-input merge.
//
// All three inputs send 40 packets each (source number, packet number, 0..5
// random data flits, EOP) with random gaps into one output whose receiver
// is randomly slow. Checks: every packet arrives whole, in order per source
// and never interleaved with the other source's flits; grants are one-hot;
// at least two inputs wanted the output at the same time at least once
// (contention).
module tb_arbiter_tree;
  import oof_pkg::*;

  localparam int NIN = 3;
  localparam int NPK = 40;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  flit_t        in_data [NIN];
  logic [NIN-1:0] in_ack, gnt;
  flit_t        out_data;
  logic         out_ack, rel;
  int           checks = 0, failures = 0;
  int           contention = 0;
  flit_t        expq [NIN][$];

  always #5 clk = ~clk;

  tb_chan_src #(.MAX_GAP(3)) u_src0 (.clk(clk), .rst_n(rst_n), .data(in_data[0]), .ack(in_ack[0]));
  tb_chan_src #(.MAX_GAP(3)) u_src1 (.clk(clk), .rst_n(rst_n), .data(in_data[1]), .ack(in_ack[1]));
  tb_chan_src #(.MAX_GAP(3)) u_src2 (.clk(clk), .rst_n(rst_n), .data(in_data[2]), .ack(in_ack[2]));

  arbiter_tree dut (.clk(clk), .rst_n(rst_n), .req_data(in_data), .release_i(rel), .gnt(gnt));
  merge #(.N(NIN)) u_merge (.clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack), .gnt(gnt),
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
    if (!$onehot0(gnt)) begin
      failures++;
      $display("FAIL: grants not one-hot");
    end
    if (int'(flit_valid(in_data[0])) + int'(flit_valid(in_data[1])) + int'(flit_valid(in_data[2])) > 1)
      contention++;
  end

  function automatic void make_packet(int src, int n);
    flit_t p [$];
    p.push_back(encode2(2'(src)));
    p.push_back(encode2(2'(n >> 4)));
    p.push_back(encode2(2'(n >> 2)));
    p.push_back(encode2(2'(n)));
    repeat ($urandom % 6) p.push_back(encode2(2'($urandom)));
    p.push_back(FLIT_EOP);
    foreach (p[i]) begin
      expq[src].push_back(p[i]);
      if (src == 0) u_src0.q.push_back(p[i]);
      else if (src == 1) u_src1.q.push_back(p[i]);
      else u_src2.q.push_back(p[i]);
    end
  endfunction

  initial begin
    int total, src;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    total = 0;
    for (int n = 0; n < NPK; n++)
      for (int s = 0; s < NIN; s++) make_packet(s, n);
    foreach (expq[s]) total += expq[s].size();
    while (u_sink.q.size() < total) @(posedge clk);
    // Walk the output: each packet starts with its source and must match
    // that source's next expected packet flit for flit.
    src = -1;
    foreach (u_sink.q[i]) begin
      if (src < 0) src = int'(decode2(u_sink.q[i]));
      if (expq[src].size() == 0) begin
        check(1'b0, "more flits than expected");
        break;
      end
      check(u_sink.q[i] == expq[src].pop_front(),
            $sformatf("output flit %0d (source %0d) wrong or interleaved", i, src));
      if (u_sink.q[i] == FLIT_EOP) src = -1;
    end
    check(contention > 0, "the inputs never competed");
    $display("contention cycles %0d", contention);
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
