// tb_arb_call: test of the arbitrated call block, alone and as a tree node.
//
// A root block (grant tied to its request) serves two random four-phase
// clients for 3000 cycles. Checks: the grants are never both high, a grant
// is only given to a requesting client, the block's request is high while a
// client is granted, and both clients are served many times.
module tb_arb_call;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req1 = 1'b0, req2 = 1'b0;
  logic gnt1, gnt2, req;
  int   checks = 0, failures = 0;
  int   n1 = 0, n2 = 0;
  logic gnt1_d, gnt2_d;

  always #5 clk = ~clk;

  arb_call dut (.clk(clk), .rst_n(rst_n), .req1(req1), .gnt1(gnt1), .req2(req2), .gnt2(gnt2),
                .req(req), .gnt(req));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    gnt1_d <= gnt1; gnt2_d <= gnt2;
    if (rst_n) begin
      check(!(gnt1 && gnt2), "both clients granted");
      check(!gnt1 || req1, "gnt1 without req1");
      check(!gnt2 || req2, "gnt2 without req2");
      check(!(gnt1 || gnt2) || req, "client granted while block does not request");
      if (gnt1 && !gnt1_d) n1++;
      if (gnt2 && !gnt2_d) n2++;
    end
  end

  task automatic client(int side);
    forever begin
      repeat ($urandom % 4) @(posedge clk);
      if (side == 1) req1 <= 1'b1; else req2 <= 1'b1;
      do @(posedge clk); while (side == 1 ? !gnt1 : !gnt2);
      repeat ($urandom % 6) @(posedge clk);
      if (side == 1) req1 <= 1'b0; else req2 <= 1'b0;
      do @(posedge clk); while (side == 1 ? gnt1 : gnt2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    fork
      client(1);
      client(2);
    join_none
    repeat (3000) @(posedge clk);
    check(n1 > 50 && n2 > 50, $sformatf("clients served %0d / %0d times", n1, n2));
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
