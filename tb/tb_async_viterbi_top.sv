// tb_async_viterbi_top: end-to-end test of the whole system at its default
// parameters (12-bit blocks, 4-bit metrics, threshold 2, 5 MHz clock).
//
// Blocks are fed back to back: the sequence 011010111100 without errors,
// with one bit error, with two separate bit errors and with errors in two
// consecutive symbols, then random blocks with random channel errors. Every
// decoded block (pout) is compared with an independent reference decoder and,
// for the four example blocks, with the transmitted data; every bit arriving
// on sout through the LEDR link is compared with the decoded block. The
// latency from the first input bit to pout is checked to be 13 local clock
// periods, and every LEDR token must change exactly one wire. At the end the
// receiver is held busy, first briefly (the link stalls and recovers) and
// then for longer than a block (the output overflows). Each mechanism must be
// seen at least once.
module tb_async_viterbi_top;
  import tb_vit_ref_pkg::*;

  localparam int N = 12;

  logic clk = 0, rst_n = 0, inp = 0, in_valid = 0, sink_hold = 0;
  logic [1:0] ctrl = 0;
  logic s1, s2;
  logic [1:0] enc, rx;
  logic [3:0] pm [4];
  logic [3:0] count;
  logic [N-1:0] pout;
  logic pout_valid, block_done, lv, lr, lack, sout, sout_valid;
  logic sm_update, drop_thresh, drop_cap, stall, overflow;

  async_viterbi_top dut (
    .clk, .rst_n, .inp, .in_valid, .ctrl, .sink_hold,
    .s_async1(s1), .s_async2(s2), .enc, .rx, .pm, .count,
    .pout, .pout_valid, .block_done,
    .ledr_v(lv), .ledr_r(lr), .ledr_ack(lack), .sout, .sout_valid,
    .sm_update, .drop_thresh, .drop_cap, .stall, .overflow);

  always #100 clk = ~clk;  // 5 MHz global clock

  int checks = 0, failures = 0;
  int n_upd = 0, n_thr = 0, n_cap = 0, n_tok = 0, n_stall = 0, n_ovf = 0, n_corr = 0;
  int cyc = 0, first_in = -1, first_pout = -1, first_sout = -1;
  logic [N-1:0] exp_blocks [$];
  logic [N-1:0] sent_blocks [$];
  bit           must_match [$];
  bit           err_blocks [$];
  logic         exp_bits [$];
  bit           check_sout = 1;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitors.
  logic lv_q = 0, lr_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_upd  += sm_update;
      n_thr  += drop_thresh;
      n_cap  += drop_cap;
      n_stall += stall;
      n_ovf  += overflow;
      if ((lv != lv_q) || (lr != lr_q)) begin
        n_tok++;
        check((lv != lv_q) + (lr != lr_q) == 1, "LEDR token changes exactly one wire");
      end
      lv_q <= lv; lr_q <= lr;
      if (sout_valid && first_sout < 0) first_sout = cyc;
      if (sout_valid && check_sout) begin
        check(exp_bits.size() > 0, "unexpected serial bit");
        if (exp_bits.size() > 0) begin
          logic b;
          b = exp_bits.pop_front();
          check(sout == b, $sformatf("serial bit %b expected %b", sout, b));
        end
      end
    end
  end

  logic done_q = 0;
  always @(posedge clk) done_q <= block_done && rst_n;
  // pout is loaded on the edge that ends the block_done cycle.
  always @(negedge clk) begin
    if (done_q) begin
      logic [N-1:0] e, s;
      bit m, er;
      e = exp_blocks.pop_front();
      s = sent_blocks.pop_front();
      m = must_match.pop_front();
      er = err_blocks.pop_front();
      if (first_pout < 0) first_pout = cyc;
      check(pout_valid, "pout valid");
      check(pout == e, $sformatf("pout %b expected %b", pout, e));
      if (m) check(pout == s, $sformatf("pout %b sent %b", pout, s));
      if (er && pout == s) n_corr++;
      for (int i = N - 1; i >= 0; i--) exp_bits.push_back(e[i]);
    end
  end

  // Send one block: bits[0] first; err[i] flips bits of received symbol i.
  task automatic send_block(logic bits [], logic [1:0] err [], bit m);
    logic [1:0] syms [], rxs [];
    logic [63:0] d;
    logic [N-1:0] s;
    int bm;
    bit any = 0;
    ref_encode(bits, syms);
    rxs = new[N];
    foreach (rxs[i]) begin rxs[i] = syms[i] ^ err[i]; any |= (err[i] != 0); end
    d = ref_decode(rxs, 4, 2, bm);
    foreach (bits[i]) s[N-1-i] = bits[i];
    exp_blocks.push_back(d[N-1:0]); sent_blocks.push_back(s);
    must_match.push_back(m); err_blocks.push_back(any);
    for (int i = 0; i < N; i++) begin
      // en1 cycle: present the bit
      while (s1 != 1'b0) @(negedge clk);
      inp = bits[i]; in_valid = 1; ctrl = 0;
      if (first_in < 0) first_in = cyc;
      @(negedge clk);
      // en2 cycle: the decoder reads the symbol through the channel
      in_valid = 0; ctrl = err[i];
      check(enc == syms[i], $sformatf("encoder symbol %0d", i));
      @(negedge clk);
      ctrl = 0;
    end
  endtask

  initial begin
    static logic paper [] = '{0,1,1,0,1,0,1,1,1,1,0,0};
    static logic [1:0] e [] = new[N];
    static logic rb [] = new[N];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (e[i]) e[i] = 0;
    send_block(paper, e, 1);                         // no error
    e[5] = 2'b01; send_block(paper, e, 1);           // one bit error
    e[5] = 2'b00; e[2] = 2'b01; e[8] = 2'b01;
    send_block(paper, e, 1);                         // two bit errors
    e[2] = 2'b00; e[8] = 2'b00; e[5] = 2'b01; e[6] = 2'b01;
    send_block(paper, e, 1);                         // two consecutive errors
    for (int b = 0; b < 40; b++) begin
      foreach (rb[i]) rb[i] = 1'($urandom);
      foreach (e[i]) e[i] = ($urandom_range(0, 11) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
      send_block(rb, e, 0);
    end
    // Brief hold: the link stalls, no bit is lost.
    repeat (4) @(negedge clk);
    sink_hold = 1; repeat (6) @(negedge clk); sink_hold = 0;
    repeat (40) @(negedge clk);
    check(exp_bits.size() == 0, "all serial bits delivered");
    check(exp_blocks.size() == 0, "all blocks decoded");
    check(first_pout - first_in == 2 * 13,
          $sformatf("pout after %0d global cycles", first_pout - first_in));
    check(first_sout - first_pout == 3,
          $sformatf("first serial bit %0d global cycles after pout", first_sout - first_pout));
    // Long hold: the next block overwrites unsent bits.
    check_sout = 0;
    sink_hold = 1;
    foreach (e[i]) e[i] = 0;
    send_block(paper, e, 1);
    send_block(paper, e, 1);
    repeat (4) @(negedge clk);
    sink_hold = 0;
    repeat (60) @(negedge clk);
    $display("survivor updates %0d, threshold drops %0d, capacity drops %0d, blocks corrected %0d",
             n_upd, n_thr, n_cap, n_corr);
    $display("LEDR tokens %0d, stalls %0d, overflows %0d", n_tok, n_stall, n_ovf);
    check(n_upd > 0, "survivor update seen");
    check(n_thr > 0, "threshold pruning seen");
    check(n_cap > 0, "capacity pruning seen");
    check(n_corr > 0, "error correction seen");
    check(n_tok > 0, "LEDR transfer seen");
    check(n_stall > 0, "stall seen");
    check(n_ovf > 0, "overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
