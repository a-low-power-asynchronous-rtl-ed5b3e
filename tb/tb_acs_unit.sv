// tb_acs_unit: exhaustive check of add-compare-select with saturation,
// live bits and the tie rule, for 4-bit metrics.
module tb_acs_unit;
  logic [3:0] pm0, pm1, pm;
  logic v0, v1, valid, dec;
  logic [1:0] bm0, bm1;
  int checks = 0, failures = 0;

  acs_unit #(.W(4)) dut (.pm0, .pm1, .v0, .v1, .bm0, .bm1, .pm, .valid, .dec);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int x = 0; x < 3; x++)
          for (int y = 0; y < 3; y++)
            for (int v = 0; v < 4; v++) begin
              int s0, s1, ep, ed, ev;
              pm0 = 4'(a); pm1 = 4'(b); bm0 = 2'(x); bm1 = 2'(y);
              v0 = v[0]; v1 = v[1];
              #1;
              s0 = (a + x > 15) ? 15 : a + x;
              s1 = (b + y > 15) ? 15 : b + y;
              ev = v0 | v1;
              if (v0 && v1) ed = (s1 < s0);
              else          ed = v1;
              ep = ed ? s1 : s0;
              checks++;
              if (int'(dec) != ed || int'(valid) != ev || (ev && int'(pm) != ep)) begin
                failures++;
                $display("FAIL a=%0d b=%0d x=%0d y=%0d v=%0d: pm=%0d dec=%0d valid=%0d",
                         a, b, x, y, v, pm, dec, valid);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
