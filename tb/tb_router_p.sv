// tb_router_p: test of the processor input router (two stages in series).
//
// 80 packets with random relative X and Y addresses (0..3), 0..5 random data
// flits and EOP enter the processor input. Reference: X not zero, packet
// leaves on px with X decremented and Y unchanged; X zero and Y not zero, X
// stripped, packet leaves on py with Y decremented; both zero, the packet
// is addressed to its own node and is given up (nothing leaves). Receivers
// are randomly slow. Checks every flit on each output in order and that all
// three cases occurred.
module tb_router_p;
  import oof_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t xin, xx, xy;
  logic  xin_ack, xx_ack, xy_ack;
  int    checks = 0, failures = 0;
  int    n_case [3];
  flit_t exp_x [$], exp_y [$];

  always #5 clk = ~clk;

  tb_chan_src #(.MAX_GAP(2)) u_src (.clk(clk), .rst_n(rst_n), .data(xin), .ack(xin_ack));
  router_p dut (.clk(clk), .rst_n(rst_n), .pin_data(xin), .pin_ack(xin_ack),
                .px_data(xx), .px_ack(xx_ack), .py_data(xy), .py_ack(xy_ack));
  tb_chan_sink #(.MAX_DELAY(3)) u_x (.clk(clk), .rst_n(rst_n), .data(xx), .ack(xx_ack), .stall(1'b0));
  tb_chan_sink #(.MAX_DELAY(3)) u_y (.clk(clk), .rst_n(rst_n), .data(xy), .ack(xy_ack), .stall(1'b0));

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

  initial begin
    int ax, ay;
    flit_t body [$];
    n_case = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 80; n++) begin
      ax = int'($urandom % 4);
      ay = int'($urandom % 4);
      if (n < 3) begin ax = 0; ay = n; end  // make sure every case occurs
      body.delete();
      repeat ($urandom % 6) body.push_back(encode2(2'($urandom)));
      body.push_back(FLIT_EOP);
      u_src.q.push_back(encode2(2'(ax)));
      u_src.q.push_back(encode2(2'(ay)));
      foreach (body[i]) u_src.q.push_back(body[i]);
      if (ax != 0) begin
        n_case[0]++;
        exp_x.push_back(encode2(2'(ax - 1)));
        exp_x.push_back(encode2(2'(ay)));
        foreach (body[i]) exp_x.push_back(body[i]);
      end else if (ay != 0) begin
        n_case[1]++;
        exp_y.push_back(encode2(2'(ay - 1)));
        foreach (body[i]) exp_y.push_back(body[i]);
      end else begin
        n_case[2]++;
        // given up: nothing expected
      end
    end
    while (u_src.q.size() > 0) @(posedge clk);
    repeat (100) @(posedge clk);
    compare(u_x.q, exp_x, "px");
    compare(u_y.q, exp_y, "py");
    check(n_case[0] > 0 && n_case[1] > 0 && n_case[2] > 0, "not every route exercised");
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
