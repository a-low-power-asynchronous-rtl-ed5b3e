// tb_branch_metric_unit: exhaustive check of the Hamming branch metrics.
module tb_branch_metric_unit;
  logic [1:0] rx;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  branch_metric_unit dut (.rx, .bm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp_d;
        exp_d = (r[0] != c[0]) + (r[1] != c[1]);
        checks++;
        if (int'(bm[c]) != exp_d) begin
          failures++;
          $display("FAIL rx=%b c=%b bm=%0d exp=%0d", rx, c[1:0], bm[c], exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
