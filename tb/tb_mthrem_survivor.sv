// tb_mthrem_survivor: drives the survivor memory together with the branch
// metric unit and the metric memory through whole 12-symbol blocks (paper
// sequence with no error, one error, two separate errors and two errors
// in consecutive symbols, then random data with random errors) and
// compares the decoded register with the reference decoder. Also checks that
// at most two paths are kept and that each kept path has metric <= 2 unless
// it is the best one, and, for the error-free example, that the stored
// register pairs are the ones printed for the method at every update.
module tb_mthrem_survivor;
  import tb_vit_ref_pkg::*;

  localparam int N = 12;

  logic clk = 0, rst_n = 0, init = 0, step = 0, update = 0;
  logic [1:0] rx;
  logic [1:0] bm [4];
  logic [3:0] keep, live, dec_cur, dec_prev;
  logic [3:0] pm [4], best_pm;
  logic [N-1:0] best_data;
  logic [1:0] best_state;
  logic drop_thresh, drop_cap;
  int checks = 0, failures = 0, n_thr = 0, n_cap = 0;

  branch_metric_unit u_bmu (.rx, .bm);
  path_metric_unit #(.W(4)) u_pmu (.clk, .rst_n, .init, .step, .bm, .prune(update), .keep,
                                   .pm, .live, .dec_cur, .dec_prev);
  mthrem_survivor #(.BLOCK_LEN(N), .W(4), .THR(2)) dut (
    .clk, .rst_n, .init, .update, .pm, .live, .dec_cur, .dec_prev, .keep,
    .best_data, .best_state, .best_pm, .drop_thresh, .drop_cap);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Register pairs stored at t = 2, 4, ..., 12 for the error-free example
// (best path, then its sibling), as printed for the method.
  localparam logic [N-1:0] FIG7_BEST [6] = '{12'b01, 12'b0110, 12'b011010, 12'b01101011,
                                             12'b0110101111, 12'b011010111100};
  localparam logic [N-1:0] FIG7_ALT  [6] = '{12'b00, 12'b0111, 12'b011011, 12'b01101010,
                                             12'b0110101110, 12'b011010111101};

  task automatic run_block(logic bits [], logic [1:0] err [], bit must_match, bit fig7 = 0);
    logic [1:0] syms [], rxs [];
    logic [63:0] expd;
    logic [N-1:0] sent;
    int bmet;
    ref_encode(bits, syms);
    rxs = new[N];
    foreach (rxs[i]) rxs[i] = syms[i] ^ err[i];
    foreach (bits[i]) sent[N-1-i] = bits[i];
    expd = ref_decode(rxs, 4, 2, bmet);
    init = 1; @(negedge clk); init = 0;
    for (int t = 0; t < N; t++) begin
      rx = rxs[t]; step = 1; @(negedge clk); step = 0;
      if (t % 2 == 1) begin
        update = 1; #1;
        check($countones(keep) <= 2 && $countones(keep) >= 1, "one or two paths kept");
        for (int s = 0; s < 4; s++)
          if (keep[s] && 2'(s) != best_state_now()) check(pm[s] <= 2, "kept path within threshold");
        n_thr += drop_thresh; n_cap += drop_cap;
        @(negedge clk); update = 0;
        if (fig7) begin
          int k;
          logic [N-1:0] mask;
          k = t + 1; mask = N'((1 << k) - 1);
          check((best_data & mask) == FIG7_BEST[k/2-1] && dut.slot_v[1] &&
                (dut.slot_data[1] & mask) == FIG7_ALT[k/2-1],
                $sformatf("t=%0d registers %b %b", k, best_data & mask, dut.slot_data[1] & mask));
        end
      end
    end
    check(best_data == expd[N-1:0], $sformatf("decoded %b expected %b", best_data, expd[N-1:0]));
    if (must_match) check(best_data == sent, $sformatf("correctable block: %b sent %b", best_data, sent));
  endtask

  function automatic logic [1:0] best_state_now();
    int b = -1;
    for (int s = 0; s < 4; s++) if (live[s] && (b < 0 || pm[s] < pm[b])) b = s;
    return 2'(b);
  endfunction

  initial begin
    static logic paper [] = '{0,1,1,0,1,0,1,1,1,1,0,0};
    static logic [1:0] e [] = new[N];
    static logic rb [] = new[N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (e[i]) e[i] = 0;
    run_block(paper, e, 1, 1);
    e[5] = 2'b01; run_block(paper, e, 1);
    e[5] = 2'b00; e[2] = 2'b01; e[8] = 2'b01; run_block(paper, e, 1);
    e[2] = 2'b00; e[8] = 2'b00; e[5] = 2'b01; e[6] = 2'b01; run_block(paper, e, 1);
    for (int b = 0; b < 400; b++) begin
      foreach (rb[i]) rb[i] = 1'($urandom);
      foreach (e[i]) e[i] = ($urandom_range(0, 9) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
      run_block(rb, e, 0);
    end
    check(n_thr > 0, "threshold pruning seen");
    check(n_cap > 0, "pruning of a path within the threshold seen");
    $display("updates dropping above-threshold paths: %0d, for lack of registers: %0d", n_thr, n_cap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
