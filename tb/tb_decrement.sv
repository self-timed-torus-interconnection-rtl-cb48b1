// tb_decrement: exhaustive test of the one-of-five decrement unit.
//
// Applies every valid code word (null, 00..11, EOP) with every dec value
// and compares with a reference written from the code table: decrement
// lowers the two-bit value by one (00 gives null), pass copies it, EOP
// always passes.
module tb_decrement;
  import oof_pkg::*;

  flit_t      flit_in, flit_out, expect_f;
  logic [1:0] dec;
  int         checks = 0, failures = 0;

  decrement dut (.flit_in(flit_in), .dec(dec), .flit_out(flit_out));

  initial begin
    flit_t words [6];
    words = '{FLIT_NULL, FLIT_D00, FLIT_D01, FLIT_D10, FLIT_D11, FLIT_EOP};
    for (int w = 0; w < 6; w++) begin
      for (int d = 0; d < 3; d++) begin
        flit_in = words[w];
        dec = 2'(d);
        #1;
        if (flit_in == FLIT_EOP) expect_f = FLIT_EOP;
        else if (flit_in == FLIT_NULL) expect_f = FLIT_NULL;
        else if (d == 1) expect_f = (decode2(flit_in) == 2'd0) ? FLIT_NULL
                                                              : encode2(decode2(flit_in) - 2'd1);
        else if (d == 2) expect_f = flit_in;
        else expect_f = FLIT_NULL;
        checks++;
        if (flit_out !== expect_f) begin
          failures++;
          $display("FAIL: in %b dec %b gave %b, expected %b", flit_in, dec, flit_out, expect_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
