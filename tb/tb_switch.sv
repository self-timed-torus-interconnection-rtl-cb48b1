// tb_switch: test of a node's switch (three arbiters and merges).
//
// Each of the seven router-side channels sends 30 packets (two-flit source
// tag, two-flit packet number, 0..4 random data flits, EOP) with random
// gaps. By the node diagram xx and px go to X, xy, yy and py to Y, xp and
// yp to P. The three outputs have randomly slow receivers. Each output is
// parsed packet by packet; every packet must equal the next one expected
// from its source (whole, in order, not interleaved). Contention on every
// output must occur.
module tb_switch;
  import oof_pkg::*;

  localparam int NPK = 30;
  localparam int DEST [7] = '{0, 0, 1, 1, 1, 2, 2};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t in_d [7];
  logic  in_a [7];
  flit_t out_d [3];
  logic  out_a [3];
  int    checks = 0, failures = 0;
  flit_t expq [7][$];
  int    contention [3];

  always #5 clk = ~clk;

  for (genvar i = 0; i < 7; i++) begin : g_in
    tb_chan_src #(.MAX_GAP(4)) u_src (.clk(clk), .rst_n(rst_n), .data(in_d[i]), .ack(in_a[i]));
  end
  for (genvar o = 0; o < 3; o++) begin : g_out
    tb_chan_sink #(.MAX_DELAY(2)) u_sink (.clk(clk), .rst_n(rst_n), .data(out_d[o]), .ack(out_a[o]),
                                          .stall(1'b0));
  end

  switch dut (
    .clk(clk), .rst_n(rst_n),
    .xx_data(in_d[0]), .xx_ack(in_a[0]),
    .px_data(in_d[1]), .px_ack(in_a[1]),
    .xy_data(in_d[2]), .xy_ack(in_a[2]),
    .yy_data(in_d[3]), .yy_ack(in_a[3]),
    .py_data(in_d[4]), .py_ack(in_a[4]),
    .xp_data(in_d[5]), .xp_ack(in_a[5]),
    .yp_data(in_d[6]), .yp_ack(in_a[6]),
    .xmp_data(out_d[0]), .xmp_ack(out_a[0]),
    .ymp_data(out_d[1]), .ymp_ack(out_a[1]),
    .pmp_data(out_d[2]), .pmp_ack(out_a[2])
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (int'(in_d[0] != 0) + int'(in_d[1] != 0) > 1) contention[0]++;
    if (int'(in_d[2] != 0) + int'(in_d[3] != 0) + int'(in_d[4] != 0) > 1) contention[1]++;
    if (int'(in_d[5] != 0) + int'(in_d[6] != 0) > 1) contention[2]++;
  end

  function automatic void push_src(int i, flit_t f);
    case (i)
      0: g_in[0].u_src.q.push_back(f);
      1: g_in[1].u_src.q.push_back(f);
      2: g_in[2].u_src.q.push_back(f);
      3: g_in[3].u_src.q.push_back(f);
      4: g_in[4].u_src.q.push_back(f);
      5: g_in[5].u_src.q.push_back(f);
      default: g_in[6].u_src.q.push_back(f);
    endcase
  endfunction

  function automatic void make_packet(int src, int n);
    flit_t p [$];
    p.push_back(encode2(2'(src >> 2)));
    p.push_back(encode2(2'(src)));
    p.push_back(encode2(2'(n >> 2)));
    p.push_back(encode2(2'(n)));
    repeat ($urandom % 5) p.push_back(encode2(2'($urandom)));
    p.push_back(FLIT_EOP);
    foreach (p[k]) begin
      push_src(src, p[k]);
      expq[src].push_back(p[k]);
    end
  endfunction

  task automatic check_output(int o, flit_t got [$]);
    flit_t pk [$];
    int src;
    foreach (got[k]) begin
      pk.push_back(got[k]);
      if (got[k] == FLIT_EOP) begin
        src = (pk.size() > 1) ? int'({decode2(pk[0]), decode2(pk[1])}) : 7;
        if (src > 6 || DEST[src] != o) begin
          check(1'b0, $sformatf("output %0d: packet from wrong source %0d", o, src));
        end else begin
          foreach (pk[j])
            check(expq[src].size() > 0 && pk[j] == expq[src].pop_front(),
                  $sformatf("output %0d: packet from %0d wrong at flit %0d", o, src, j));
        end
        pk.delete();
      end
    end
  endtask

  initial begin
    int total;
    contention = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NPK; n++) for (int s = 0; s < 7; s++) make_packet(s, n);
    total = 0;
    for (int s = 0; s < 7; s++) total += expq[s].size();
    while (g_out[0].u_sink.q.size() + g_out[1].u_sink.q.size() + g_out[2].u_sink.q.size() < total)
      @(posedge clk);
    check_output(0, g_out[0].u_sink.q);
    check_output(1, g_out[1].u_sink.q);
    check_output(2, g_out[2].u_sink.q);
    for (int s = 0; s < 7; s++) check(expq[s].size() == 0, $sformatf("source %0d not drained", s));
    check(contention[0] > 0 && contention[1] > 0 && contention[2] > 0, "an output saw no contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
