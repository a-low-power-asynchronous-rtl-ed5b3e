// tb_e_clock_gen: checks that the two local clocks run at half the global
// clock, are complementary, and that each enable is high exactly one global
// cycle per local period, in alternation.
module tb_e_clock_gen;
  logic clk = 0, rst_n = 0;
  logic s1, s2, en1, en2;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, rises = 0;
  logic s1_q;

  e_clock_gen dut (.clk, .rst_n, .s_async1(s1), .s_async2(s2), .en1, .en2);

  always #100 clk = ~clk;  // 5 MHz

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(s1 == 0 && en1 == 1 && en2 == 0, "state in reset");
    rst_n = 1;
    s1_q = s1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      check(s2 == ~s1, "complementary");
      check(en1 == ~en2, "one enable at a time");
      check(s1 != s1_q, "toggles every global cycle");
      if (s1 && !s1_q) rises++;
      n1 += en1; n2 += en2;
      s1_q = s1;
    end
    check(n1 == 50 && n2 == 50, $sformatf("enable counts %0d %0d", n1, n2));
    check(rises == 50, "local clock at half the global rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
