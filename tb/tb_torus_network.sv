// tb_torus_network: end-to-end test of the 4x4 torus at its default
// parameters.
//
// Sixteen behavioural processors each send their share of 100 packets
// (sources 0..3 send seven, the others six) to random other nodes, plus two
// packets addressed to their own node, which the network must give up.
// Every packet carries its source and sequence number in its first four data
// flits, followed by 0..6 random data flits and EOP. Each processor's
// receiver acknowledges after a random delay (0..3 cycles), which creates
// back-pressure. The scoreboard checks that every packet arrives once, at
// the right node, with its data intact and unbroken by other packets, and
// that no given-up packet arrives. Counters watch the mechanisms of the
// design: address decrement, address strip, give-up, output contention,
// wrap-around links, and full output pipeline latches; each must occur at
// least once. A watchdog ends the run with a failure if the traffic does not
// drain.
//
// Deadlock avoidance in the test: channels are held from head to tail and
// there are no virtual channels, so packets that wrap around a ring can
// block each other in a cycle. The processors therefore keep, per X ring and
// per Y ring, a packet that crosses the ring's wrap-around link (from the
// last column to the first, or from the last row to the first) alone in
// that ring: it waits before its first flit until no other packet uses the
// ring, and packets that do not wrap wait while it is in flight. Without a
// wrapping packet a ring behaves like a mesh row, where channel waits cannot
// form a cycle, so the traffic is deadlock-free while destinations stay
// random. A packet holds its claims until it is delivered. Set THROTTLE = 0
// to inject without it.
module tb_torus_network;
  import oof_pkg::*;

  localparam int K  = 4;
  localparam int NN = K * K;
  localparam int NPKT = 100;
  localparam int WATCHDOG = 200000;
  localparam bit THROTTLE = 1'b1;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t pin_data  [NN];
  logic  pin_ack   [NN];
  flit_t pout_data [NN];
  logic  pout_ack  [NN];

  always #5 clk = ~clk;

  torus_network dut (
    .clk(clk), .rst_n(rst_n),
    .pin_data(pin_data), .pin_ack(pin_ack),
    .pout_data(pout_data), .pout_ack(pout_ack)
  );

  int checks = 0;
  int failures = 0;

  // Expected packets, indexed by source*16 + sequence number.
  logic [1:0] exp_data [256][12];
  int         exp_len  [256];
  int         exp_dst  [256];
  bit         exp_live [256];
  bit         got      [256];
  int         txq      [NN][$];   // packet ids, in sending order
  int         exp_dx   [256];
  int         exp_dy   [256];
  bit         wrap_x   [256];      // crosses its X ring's wrap link
  bit         wrap_y   [256];
  int         xring_users [K];   // packets in flight in each ring
  int         yring_users [K];
  bit         xring_excl  [K];   // a wrapping packet owns the ring
  bit         yring_excl  [K];

  function automatic bit ring_free(int id);
    int xr, yr;
    bit okx, oky;
    xr = (id / 16) / K;
    yr = exp_dst[id] % K;
    okx = (exp_dx[id] == 0) || (!xring_excl[xr] && (!wrap_x[id] || xring_users[xr] == 0));
    oky = (exp_dy[id] == 0) || (!yring_excl[yr] && (!wrap_y[id] || yring_users[yr] == 0));
    return okx && oky;
  endfunction

  function automatic void ring_claim(int id, bit take);
    int xr, yr, d;
    xr = (id / 16) / K;
    yr = exp_dst[id] % K;
    d = take ? 1 : -1;
    if (exp_dx[id] != 0) begin
      xring_users[xr] += d;
      if (wrap_x[id]) xring_excl[xr] = take;
    end
    if (exp_dy[id] != 0) begin
      yring_users[yr] += d;
      if (wrap_y[id]) yring_excl[yr] = take;
    end
  endfunction
  bit         tx_done  [NN];
  int         delivered = 0;
  int         expected_total = 0;

  function automatic void add_packet(int src, int dst, int seq, int ndata);
    int sx, sy, dx, dy, id;
    sx = src % K; sy = src / K;
    dx = ((dst % K) - sx + K) % K;
    dy = ((dst / K) - sy + K) % K;
    id = src * 16 + seq;
    txq[src].push_back(id);
    exp_dx[id] = dx;
    exp_dy[id] = dy;
    wrap_x[id] = (sx + dx >= K);
    wrap_y[id] = (sy + dy >= K);
    exp_len[id] = 4 + ndata;
    exp_dst[id] = dst;
    exp_live[id] = (src != dst);
    exp_data[id][0] = 2'(src >> 2); exp_data[id][1] = 2'(src);
    exp_data[id][2] = 2'(seq >> 2); exp_data[id][3] = 2'(seq);
    for (int i = 4; i < 4 + ndata; i++) exp_data[id][i] = 2'($urandom);
    if (src != dst) expected_total++;
  endfunction

  initial begin
    int dst;
    for (int i = 0; i < K; i++) begin
      xring_users[i] = 0; yring_users[i] = 0;
      xring_excl[i] = 1'b0; yring_excl[i] = 1'b0;
    end
    for (int i = 0; i < NPKT; i++) begin
      int src, seq;
      src = i % NN;
      seq = i / NN;
      do dst = int'($urandom % NN); while (dst == src);
      // The shortest and the longest path: one hop, and three hops in each
      // dimension.
      if (i == 0) dst = (src + 1) % NN;
      if (i == 1) dst = (K - 1) * K + (src % K + K - 1) % K;
      add_packet(src, dst, seq, int'($urandom % 7));
    end
    // Packets to their own node: given up by the processor router.
    add_packet(0, 0, 14, 2);
    add_packet(9, 9, 15, 3);
  end

  // Processors: senders and receivers.
  for (genvar g = 0; g < NN; g++) begin : g_proc
    logic [1:0] rx [$];

    task automatic send_flit(flit_t f);
      pin_data[g] <= f;
      do @(posedge clk); while (!pin_ack[g]);
      pin_data[g] <= FLIT_NULL;
      do @(posedge clk); while (pin_ack[g]);
    endtask

    initial begin
      int id;
      pin_data[g] = FLIT_NULL;
      tx_done[g] = 1'b0;
      @(posedge rst_n);
      repeat (3) @(posedge clk);
      while (txq[g].size() > 0) begin
        id = txq[g].pop_front();
        if (THROTTLE) begin
          while (!ring_free(id)) @(posedge clk);
          if (exp_live[id]) ring_claim(id, 1'b1);
        end
        send_flit(encode2(2'(exp_dx[id])));
        send_flit(encode2(2'(exp_dy[id])));
        for (int i = 0; i < exp_len[id]; i++) send_flit(encode2(exp_data[id][i]));
        send_flit(FLIT_EOP);
      end
      tx_done[g] = 1'b1;
    end

    initial begin
      flit_t f;
      int id;
      pout_ack[g] = 1'b0;
      forever begin
        @(posedge clk);
        if (rst_n && pout_data[g] != FLIT_NULL) begin
          repeat ($urandom % 4) @(posedge clk);
          f = pout_data[g];
          pout_ack[g] <= 1'b1;
          do @(posedge clk); while (pout_data[g] != FLIT_NULL);
          pout_ack[g] <= 1'b0;
          @(posedge clk);
          if (f == FLIT_EOP) begin
            checks++;
            if (rx.size() < 4) begin
              failures++;
              $display("node %0d: packet too short (%0d flits)", g, rx.size());
            end else begin
              id = int'({rx[0], rx[1]}) * 16 + int'({rx[2], rx[3]});
              if (!exp_live[id] || got[id] || exp_dst[id] != g || exp_len[id] != rx.size()) begin
                failures++;
                $display("node %0d: unexpected packet id %0d (len %0d)", g, id, rx.size());
              end else begin
                for (int i = 0; i < rx.size(); i++)
                  if (rx[i] != exp_data[id][i]) begin
                    failures++;
                    $display("node %0d: packet %0d flit %0d is %0d, expected %0d",
                             g, id, i, rx[i], exp_data[id][i]);
                    break;
                  end
                got[id] = 1'b1;
                delivered++;
                if (THROTTLE) ring_claim(id, 1'b0);
              end
            end
            rx.delete();
          end else begin
            rx.push_back(decode2(f));
          end
        end
      end
    end
  end

  // Mechanism counters, one per node so that every counter has one writer.
  int n_dec    [NN];
  int n_strip  [NN];
  int n_giveup [NN];
  int n_contend[NN];
  int n_wrap   [NN];
  int n_full   [NN];

  for (genvar g = 0; g < NN; g++) begin : g_mon
    localparam int R = g / K;
    localparam int C = g % K;
    initial begin
      n_dec[g] = 0; n_strip[g] = 0; n_giveup[g] = 0;
      n_contend[g] = 0; n_wrap[g] = 0; n_full[g] = 0;
    end
    always @(posedge clk) if (rst_n) begin
      if (dut.g_row[R].g_col[C].u_node.u_router_x.u_router_xy.first) begin
        if (dut.g_row[R].g_col[C].u_node.u_router_x.u_router_xy.in_data == FLIT_D00) n_strip[g]++;
        else n_dec[g]++;
      end
      if (dut.g_row[R].g_col[C].u_node.u_router_x.u_router_yp.first) begin
        if (dut.g_row[R].g_col[C].u_node.u_router_x.u_router_yp.in_data == FLIT_D00) n_strip[g]++;
        else n_dec[g]++;
      end
      if (dut.g_row[R].g_col[C].u_node.u_router_y.first) begin
        if (dut.g_row[R].g_col[C].u_node.u_router_y.in_data == FLIT_D00) n_strip[g]++;
        else n_dec[g]++;
      end
      if (dut.g_row[R].g_col[C].u_node.u_router_p.u_proc_router_y.first &&
          dut.g_row[R].g_col[C].u_node.u_router_p.u_proc_router_y.in_data == FLIT_D00)
        n_giveup[g]++;
      if (dut.g_row[R].g_col[C].u_node.u_switch.u_arb_x.hold == 2'b11 ||
          dut.g_row[R].g_col[C].u_node.u_switch.u_arb_p.hold == 2'b11 ||
          $countones(dut.g_row[R].g_col[C].u_node.u_switch.u_arb_y.hold) > 1)
        n_contend[g]++;
      if ((C == K - 1 && dut.xout_data[g] != FLIT_NULL) ||
          (R == K - 1 && dut.yout_data[g] != FLIT_NULL))
        n_wrap[g]++;
      if ((dut.g_row[R].g_col[C].u_node.u_pl_x.stage_q[0] != FLIT_NULL &&
           dut.g_row[R].g_col[C].u_node.u_pl_x.stage_q[1] != FLIT_NULL) ||
          (dut.g_row[R].g_col[C].u_node.u_pl_y.stage_q[0] != FLIT_NULL &&
           dut.g_row[R].g_col[C].u_node.u_pl_y.stage_q[1] != FLIT_NULL) ||
          (dut.g_row[R].g_col[C].u_node.u_pl_p.stage_q[0] != FLIT_NULL &&
           dut.g_row[R].g_col[C].u_node.u_pl_p.stage_q[1] != FLIT_NULL))
        n_full[g]++;
    end
  end

  function automatic int total(input int a [NN]);
    int s = 0;
    for (int i = 0; i < NN; i++) s += a[i];
    return s;
  endfunction

  task automatic mechanism(string name, int count);
    checks++;
    $display("mechanism %-22s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  function automatic bit all_sent();
    for (int i = 0; i < NN; i++) if (!tx_done[i]) return 1'b0;
    return 1'b1;
  endfunction

  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    int start_cycle;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    start_cycle = cycles;
    while (!(all_sent() && delivered == expected_total)) @(posedge clk);
    repeat (50) @(posedge clk);
    $display("delivered %0d of %0d packets in %0d cycles", delivered, expected_total,
             cycles - start_cycle);
    checks++;
    if (delivered != expected_total) failures++;
    begin
      int min_hops = 99, max_hops = 0;
      for (int id = 0; id < 256; id++)
        if (exp_live[id] && got[id]) begin
          min_hops = (exp_dx[id] + exp_dy[id] < min_hops) ? exp_dx[id] + exp_dy[id] : min_hops;
          max_hops = (exp_dx[id] + exp_dy[id] > max_hops) ? exp_dx[id] + exp_dy[id] : max_hops;
        end
      $display("path lengths delivered: %0d to %0d hops", min_hops, max_hops);
      checks++;
      if (min_hops != 1 || max_hops != 2 * (K - 1)) begin
        failures++;
        $display("FAIL: expected paths of 1 to %0d hops", 2 * (K - 1));
      end
    end
    mechanism("address decrement", total(n_dec));
    mechanism("address strip", total(n_strip));
    mechanism("give-up (own node)", total(n_giveup));
    mechanism("output contention", total(n_contend));
    mechanism("wrap-around link", total(n_wrap));
    mechanism("output latch full", total(n_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d packets delivered", delivered, expected_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
