// tb_conv_encoder: checks the encoder against the printed state diagram
// (transition table in tb_vit_ref_pkg), on the 12-bit sequence 011010111100
// and on random blocks, including the restart from S0 at each block.
module tb_conv_encoder;
  import tb_vit_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, din = 0;
  logic [1:0] sym, state;
  logic first;
  int checks = 0, failures = 0;

  conv_encoder #(.BLOCK_LEN(12)) dut (.clk, .rst_n, .en, .din, .sym, .state, .first);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_block(logic bits [12]);
    int s = 0;
    for (int i = 0; i < 12; i++) begin
      din <= bits[i]; en <= 1;
      @(posedge clk); #1;
      en <= 0;
      check(sym == 2'(ref_label(s, int'(bits[i]))), $sformatf("symbol %0d: got %b", i, sym));
      s = ref_next(s, int'(bits[i]));
      check(state == 2'(s), $sformatf("state %0d", i));
      check(first == (i == 0), "first flag");
      // an idle cycle must not change anything
      @(posedge clk); #1;
      check(sym == 2'(ref_label(ref_prev_state(bits, i), int'(bits[i]))), "hold");
    end
  endtask

  // state before bit i of a block
  function automatic int ref_prev_state(logic bits [12], int i);
    int s = 0;
    for (int k = 0; k < i; k++) s = ref_next(s, int'(bits[k]));
    return s;
  endfunction

  initial begin
    static logic paper [12] = '{0,1,1,0,1,0,1,1,1,1,0,0};
    logic rb [12];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_block(paper);
    run_block(paper);
    for (int b = 0; b < 20; b++) begin
      foreach (rb[i]) rb[i] = 1'($urandom);
      run_block(rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
