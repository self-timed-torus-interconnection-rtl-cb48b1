// tb_torus_node: test of one network node with all three inputs busy.
//
// 60 packets enter each of the X, Y and processor inputs at once, with
// random addresses, 0..4 random data flits and a three-flit tag (input
// number, packet number). Reference, by dimension-order routing:
//   X input  [X, Y, body]: X>0 -> X out [X-1, Y, body]; X=0, Y>0 -> Y out
//            [Y-1, body]; X=Y=0 -> P out [body]
//   Y input  [Y, body]:    Y>0 -> Y out [Y-1, body]; Y=0 -> P out [body]
//   P input  [X, Y, body]: like X, but X=Y=0 is given up
// Packets from different inputs may interleave on an output only whole, so
// each output is parsed packet by packet and every packet is compared with
// the next one expected from its input. Receivers are randomly slow.
// Counts that each route, contention on each output and a give-up happened.
module tb_torus_node;
  import oof_pkg::*;

  localparam int NPK = 60;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t in_d [3];
  logic  in_a [3];
  flit_t out_d [3];
  logic  out_a [3];
  int    checks = 0, failures = 0;
  flit_t expq [3][3][$];   // [output][input] expected flit stream
  int    routes [3][3];    // [input][output] packets sent that way
  int    n_giveup = 0;
  int    contention [3];
  int    hdr_len [3];

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_io
    tb_chan_src  #(.MAX_GAP(3))   u_src  (.clk(clk), .rst_n(rst_n), .data(in_d[i]), .ack(in_a[i]));
    tb_chan_sink #(.MAX_DELAY(3)) u_sink (.clk(clk), .rst_n(rst_n), .data(out_d[i]), .ack(out_a[i]),
                                          .stall(1'b0));
  end

  torus_node dut (
    .clk(clk), .rst_n(rst_n),
    .xin_data(in_d[0]), .xin_ack(in_a[0]),
    .yin_data(in_d[1]), .yin_ack(in_a[1]),
    .pin_data(in_d[2]), .pin_ack(in_a[2]),
    .xout_data(out_d[0]), .xout_ack(out_a[0]),
    .yout_data(out_d[1]), .yout_ack(out_a[1]),
    .pout_data(out_d[2]), .pout_ack(out_a[2])
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_switch.u_arb_x.hold == 2'b11) contention[0]++;
    if ($countones(dut.u_switch.u_arb_y.hold) > 1) contention[1]++;
    if (dut.u_switch.u_arb_p.hold == 2'b11) contention[2]++;
  end

  function automatic void push_src(int i, flit_t f);
    if (i == 0) g_io[0].u_src.q.push_back(f);
    else if (i == 1) g_io[1].u_src.q.push_back(f);
    else g_io[2].u_src.q.push_back(f);
  endfunction

  function automatic void make_packet(int src, int n);
    int ax, ay, o;
    flit_t body [$];
    ax = (src == 1) ? 0 : int'($urandom % 4);
    ay = int'($urandom % 4);
    body.push_back(encode2(2'(src)));
    body.push_back(encode2(2'(n >> 2)));
    body.push_back(encode2(2'(n)));
    repeat ($urandom % 5) body.push_back(encode2(2'($urandom)));
    body.push_back(FLIT_EOP);
    if (src != 1) push_src(src, encode2(2'(ax)));
    push_src(src, encode2(2'(ay)));
    foreach (body[k]) push_src(src, body[k]);
    if (ax != 0) begin
      o = 0;
      expq[0][src].push_back(encode2(2'(ax - 1)));
      expq[0][src].push_back(encode2(2'(ay)));
    end else if (ay != 0) begin
      o = 1;
      expq[1][src].push_back(encode2(2'(ay - 1)));
    end else begin
      o = 2;
    end
    if (src == 2 && o == 2) begin
      n_giveup++;
      return;
    end
    routes[src][o]++;
    foreach (body[k]) expq[o][src].push_back(body[k]);
  endfunction

  function automatic int total_expected();
    int t = 0;
    for (int o = 0; o < 3; o++) for (int s = 0; s < 3; s++) t += expq[o][s].size();
    return t;
  endfunction

  task automatic check_output(int o, flit_t got [$]);
    int src, pos;
    src = -1;
    pos = 0;
    foreach (got[k]) begin
      if (pos == hdr_len[o]) src = int'(decode2(got[k]));
      if (pos >= hdr_len[o] && (src < 0 || src > 2 || expq[o][src].size() == 0)) begin
        check(1'b0, $sformatf("output %0d: unexpected flit %0d", o, k));
        return;
      end
      pos++;
      if (got[k] == FLIT_EOP) pos = 0;
    end
    // Second pass: compare each packet with its input's stream.
    src = -1;
    pos = 0;
    begin
      flit_t pk [$];
      foreach (got[k]) begin
        pk.push_back(got[k]);
        if (got[k] == FLIT_EOP) begin
          src = (pk.size() > hdr_len[o]) ? int'(decode2(pk[hdr_len[o]])) : 0;
          foreach (pk[j]) begin
            if (expq[o][src].size() == 0) begin
              check(1'b0, $sformatf("output %0d: extra flits from input %0d", o, src));
              break;
            end
            check(pk[j] == expq[o][src].pop_front(),
                  $sformatf("output %0d: packet from input %0d wrong at flit %0d", o, src, j));
          end
          pk.delete();
        end
      end
    end
  endtask

  initial begin
    int total;
    hdr_len = '{2, 1, 0};
    contention = '{0, 0, 0};
    for (int s = 0; s < 3; s++) for (int o = 0; o < 3; o++) routes[s][o] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NPK; n++) for (int s = 0; s < 3; s++) make_packet(s, n);
    total = total_expected();
    while (g_io[0].u_sink.q.size() + g_io[1].u_sink.q.size() + g_io[2].u_sink.q.size() < total)
      @(posedge clk);
    repeat (100) @(posedge clk);
    check(g_io[0].u_sink.q.size() + g_io[1].u_sink.q.size() + g_io[2].u_sink.q.size() == total,
          "more flits than expected");
    check_output(0, g_io[0].u_sink.q);
    check_output(1, g_io[1].u_sink.q);
    check_output(2, g_io[2].u_sink.q);
    check(total_expected() == 0, "expected flits left over");
    // Every route of the node diagram was taken.
    check(routes[0][0] > 0 && routes[0][1] > 0 && routes[0][2] > 0, "X input routes");
    check(routes[1][1] > 0 && routes[1][2] > 0, "Y input routes");
    check(routes[2][0] > 0 && routes[2][1] > 0, "P input routes");
    check(n_giveup > 0, "no give-up");
    check(contention[0] > 0 && contention[1] > 0 && contention[2] > 0,
          $sformatf("contention X %0d Y %0d P %0d", contention[0], contention[1], contention[2]));
    $display("contention X %0d Y %0d P %0d, given up %0d", contention[0], contention[1],
             contention[2], n_giveup);
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
