// tb_mutex: test of the mutual exclusion element.
//
// First, both requests rise together ten times: exactly one grant must
// follow one cycle later, and the winner must alternate between the sides.
// Then two random four-phase clients (raise request, wait for grant, hold
// a random time, drop request, wait for grant low) run for 3000 cycles: the
// grants must never both be high, a grant must only be high while its
// request is or was high one cycle before, and a lone request must be
// granted one cycle later.
module tb_mutex;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic r1 = 1'b0, r2 = 1'b0;
  logic g1, g2;
  int   checks = 0, failures = 0;
  int   n_grant1 = 0, n_grant2 = 0;
  bit   random_phase = 1'b0;
  logic r1_d, r2_d, g1_d, g2_d;

  always #5 clk = ~clk;

  mutex dut (.clk(clk), .rst_n(rst_n), .r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    r1_d <= r1; r2_d <= r2; g1_d <= g1; g2_d <= g2;
    if (rst_n && random_phase) begin
      check(!(g1 && g2), "both grants high");
      check(!g1 || r1 || r1_d, "g1 without request");
      check(!g2 || r2 || r2_d, "g2 without request");
      if (r1_d && !r2_d && !g2_d && !g1_d) check(g1, "lone r1 not granted in one cycle");
      if (g1 && !g1_d) n_grant1++;
      if (g2 && !g2_d) n_grant2++;
    end
  end

  task automatic client(int side);
    forever begin
      repeat ($urandom % 6) @(posedge clk);
      if (side == 1) r1 <= 1'b1; else r2 <= 1'b1;
      do @(posedge clk); while (side == 1 ? !g1 : !g2);
      repeat ($urandom % 5) @(posedge clk);
      if (side == 1) r1 <= 1'b0; else r2 <= 1'b0;
      do @(posedge clk); while (side == 1 ? g1 : g2);
    end
  endtask

  initial begin
    int last;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    last = -1;
    for (int i = 0; i < 10; i++) begin
      r1 <= 1'b1; r2 <= 1'b1;
      @(posedge clk);
      @(negedge clk);
      check(g1 ^ g2, "tie not resolved to exactly one grant");
      if (last >= 0) check((g1 ? 1 : 2) != last, "tie winner did not alternate");
      last = g1 ? 1 : 2;
      r1 <= 1'b0; r2 <= 1'b0;
      repeat (2) @(posedge clk);
    end
    random_phase = 1'b1;
    fork
      client(1);
      client(2);
    join_none
    repeat (3000) @(posedge clk);
    check(n_grant1 > 50 && n_grant2 > 50,
          $sformatf("unfair or stuck: %0d / %0d grants", n_grant1, n_grant2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
