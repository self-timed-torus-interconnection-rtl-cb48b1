// tb_route_control: test of the output select of a router stage.
//
// For each address code word presented with dec0, checks that a non-zero
// address sets sx only and a zero address sets sy only, that the select
// holds while later flits pass (dec0 low, any flit), and that eop_done
// clears it.
module tb_route_control;
  import oof_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t flit = FLIT_NULL;
  logic  dec0 = 1'b0, eop_done = 1'b0;
  logic  sx, sy;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  route_control dut (.clk(clk), .rst_n(rst_n), .flit(flit), .dec0(dec0),
                     .eop_done(eop_done), .sx(sx), .sy(sy));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!sx && !sy, "selects not clear after reset");
    for (int a = 0; a < 4; a++) begin
      flit <= encode2(2'(a)); dec0 <= 1'b1;
      @(posedge clk);
      dec0 <= 1'b0;
      @(negedge clk);
      check(sx == (a != 0) && sy == (a == 0), $sformatf("address %0d: sx %b sy %b", a, sx, sy));
      // Later flits, including other values, do not change the select.
      for (int i = 0; i < 4; i++) begin
        flit <= encode2(2'(i));
        @(posedge clk);
      end
      flit <= FLIT_EOP;
      @(negedge clk);
      check(sx == (a != 0) && sy == (a == 0), $sformatf("address %0d: select not held", a));
      eop_done <= 1'b1;
      @(posedge clk);
      eop_done <= 1'b0;
      flit <= FLIT_NULL;
      @(negedge clk);
      check(!sx && !sy, $sformatf("address %0d: eop_done does not clear", a));
    end
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
