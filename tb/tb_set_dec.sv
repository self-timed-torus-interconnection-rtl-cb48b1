// tb_set_dec: test of the router header state machine against its truth
// table.
//
// For each present state (reached by stepping from reset) and each value of
// route, checks dec and the state after one step, as listed in the table
// route/state/next: 0/00/00, 0/01/10, 0/10/10, 1/00/01, 1/01/10, 1/10/10.
// Then checks that eop_reset returns the machine to 00 and that without
// step the state holds.
module tb_set_dec;
  import oof_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       route = 1'b0, step = 1'b0, eop_reset = 1'b0;
  hdr_state_e s;
  logic [1:0] dec;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  set_dec dut (.clk(clk), .rst_n(rst_n), .route(route), .step(step),
               .eop_reset(eop_reset), .s(s), .dec(dec));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Bring the machine to state st: 00 by reset, 01 by one step with route,
  // 10 by two steps.
  task automatic goto_state(logic [1:0] st);
    eop_reset <= 1'b1; step <= 1'b0;
    @(posedge clk);
    eop_reset <= 1'b0;
    for (int i = 0; i < int'(st); i++) begin
      route <= 1'b1; step <= 1'b1;
      @(posedge clk);
    end
    step <= 1'b0; route <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    logic [1:0] next_tab [2][3];
    next_tab[0] = '{2'b00, 2'b10, 2'b10};
    next_tab[1] = '{2'b01, 2'b10, 2'b10};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(s == HDR_IDLE, "state after reset is not 00");
    for (int st = 0; st < 3; st++) begin
      for (int r = 0; r < 2; r++) begin
        goto_state(2'(st));
        check(s == hdr_state_e'(st), $sformatf("could not reach state %0d", st));
        route <= r[0];
        #1;
        @(negedge clk);
        check(dec == (next_tab[r][st] & {2{r[0]}}),
              $sformatf("route %0d state %0d: dec %b", r, st, dec));
        step <= 1'b1;
        @(posedge clk);
        step <= 1'b0;
        @(negedge clk);
        check(s == hdr_state_e'(next_tab[r][st]),
              $sformatf("route %0d state %0d: next %b, expected %b", r, st, s, next_tab[r][st]));
        // Without step the state holds.
        route <= ~r[0];
        repeat (2) @(posedge clk);
        @(negedge clk);
        check(s == hdr_state_e'(next_tab[r][st]), "state changed without step");
      end
    end
    goto_state(2'd2);
    eop_reset <= 1'b1;
    @(posedge clk);
    eop_reset <= 1'b0;
    @(negedge clk);
    check(s == HDR_IDLE, "eop_reset does not clear the state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
