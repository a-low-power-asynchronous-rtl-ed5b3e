// tb_path_metric_unit: runs random received symbols through the metric
// memory, with random pruning between steps and random block restarts, and
// compares metrics, live bits and decisions with a model built from the
// encoder's transition table.
module tb_path_metric_unit;
  import tb_vit_ref_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, step = 0, prune = 0;
  logic [1:0] rx;
  logic [1:0] bm [4];
  logic [3:0] keep, live, dec_cur, dec_prev;
  logic [3:0] pm [4];
  int checks = 0, failures = 0;

  int mpm [4]; bit mlv [4]; bit mdc [4], mdp [4];

  branch_metric_unit u_bmu (.rx, .bm);
  path_metric_unit #(.W(4)) dut (.clk, .rst_n, .init, .step, .bm, .prune, .keep,
                                 .pm, .live, .dec_cur, .dec_prev);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_start();
    for (int s = 0; s < 4; s++) begin mpm[s] = 0; mlv[s] = (s == 0); mdc[s] = 0; mdp[s] = 0; end
  endtask

  task automatic model_step(logic [1:0] r);
    int np [4]; bit nl [4]; bit nd [4];
    for (int n = 0; n < 4; n++) begin
      np[n] = 0; nl[n] = 0; nd[n] = 0;
      for (int p = 0; p < 4; p++) begin
        if (mlv[p] && ref_next(p, n & 1) == n) begin
          int c = mpm[p] + hd(r, 2'(ref_label(p, n & 1)));
          if (c > 15) c = 15;
          if (!nl[n] || c < np[n]) begin np[n] = c; nl[n] = 1; nd[n] = p[1]; end
        end
      end
    end
    mdp = mdc; mpm = np; mlv = nl; mdc = nd;
  endtask

  task automatic compare(string where);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (live[s] != mlv[s] || (mlv[s] && int'(pm[s]) != mpm[s]) ||
          (mlv[s] && dec_cur[s] != mdc[s])) begin
        failures++;
        $display("FAIL %s state %0d: live %0d/%0d pm %0d/%0d dec %0d/%0d", where, s,
                 live[s], mlv[s], pm[s], mpm[s], dec_cur[s], mdc[s]);
      end
    end
  endtask

  initial begin
    model_start();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int i = 0; i < 3000; i++) begin
      int act;
      act = $urandom_range(0, 9);
      rx = 2'($urandom);
      if (act < 6) begin
        step = 1; init = (act == 0);
        if (init) model_start();
        model_step(rx);
      end else if (act < 9) begin
        prune = 1; keep = 4'($urandom);
        for (int s = 0; s < 4; s++) mlv[s] = mlv[s] && keep[s];
      end else begin
        init = 1; model_start();
      end
      @(negedge clk);
      step = 0; init = 0; prune = 0;
      compare($sformatf("op %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
