// tb_viterbi_decoder: feeds received symbols to the decoder with the two
// local phases alternating (symbols on en_acs, survivor memory and output on
// en_sm), blocks back to back, and compares each decoded block with the
// reference decoder and every serial bit with the decoded block. The serial
// port is always ready here; the example blocks must decode to the sent data.
// Each block must be done two cycles after its last symbol.
module tb_viterbi_decoder;
  import tb_vit_ref_pkg::*;

  localparam int N = 12;

  logic clk = 0, rst_n = 0, en_acs = 0, en_sm = 0, rx_valid = 0;
  logic [1:0] rx = 0;
  logic ser_data, ser_valid, pout_valid, block_done, sm_update, drop_thresh, drop_cap, stall, overflow;
  logic [N-1:0] pout;
  logic [3:0] pm [4], live, step_cnt;
  int checks = 0, failures = 0;
  logic [N-1:0] exp_q [$];
  logic [N-1:0] sent_q [$];
  bit must_q [$];
  logic bits_q [$];

  viterbi_decoder dut (.clk, .rst_n, .en_acs, .en_sm, .rx, .rx_valid, .ser_ready(1'b1),
    .ser_data, .ser_valid, .pout, .pout_valid, .block_done, .pm, .live, .step_cnt,
    .sm_update, .drop_thresh, .drop_cap, .stall, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin en_sm <= en_acs; en_acs <= ~en_acs; end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_step = 0, n_done = 0, n_sent = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && block_done) begin
      n_done++;
      check(cyc - last_step == 2, $sformatf("block done %0d cycles after its last symbol", cyc - last_step));
    end
  end

  logic done_q = 0;
  always @(posedge clk) done_q <= block_done && rst_n;
  always @(negedge clk) begin
    if (done_q) begin
      logic [N-1:0] e, s;
      bit m;
      e = exp_q.pop_front(); s = sent_q.pop_front(); m = must_q.pop_front();
      check(pout == e, $sformatf("pout %b expected %b", pout, e));
      if (m) check(pout == s, $sformatf("pout %b sent %b", pout, s));
      for (int i = N - 1; i >= 0; i--) bits_q.push_back(e[i]);
    end
    if (ser_valid) begin
      logic b;
      b = bits_q.pop_front();
      check(ser_data == b, "serial bit");
    end
    check(!stall && !overflow, "no stall or overflow with a ready link");
  end

  task automatic send_block(logic bits [], logic [1:0] err [], bit m);
    logic [1:0] syms [];
    logic [1:0] rxs [];
    logic [63:0] d;
    logic [N-1:0] s;
    int bm;
    ref_encode(bits, syms);
    rxs = new[N];
    foreach (rxs[i]) rxs[i] = syms[i] ^ err[i];
    d = ref_decode(rxs, 4, 2, bm);
    foreach (bits[i]) s[N-1-i] = bits[i];
    exp_q.push_back(d[N-1:0]); sent_q.push_back(s); must_q.push_back(m);
    for (int i = 0; i < N; i++) begin
      while (!en_acs) @(negedge clk);
      rx = rxs[i]; rx_valid = 1;
      @(negedge clk);
      if (i == N - 1) begin last_step = cyc; n_sent++; end
      rx_valid = 0;
    end
  endtask

  initial begin
    static logic paper [] = '{0,1,1,0,1,0,1,1,1,1,0,0};
    static logic [1:0] e [] = new[N];
    static logic rb [] = new[N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (e[i]) e[i] = 0;
    send_block(paper, e, 1);
    e[4] = 2'b10; send_block(paper, e, 1);
    e[4] = 2'b00; e[5] = 2'b10; e[6] = 2'b01; send_block(paper, e, 1);
    for (int b = 0; b < 60; b++) begin
      foreach (rb[i]) rb[i] = 1'($urandom);
      foreach (e[i]) e[i] = ($urandom_range(0, 7) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
      send_block(rb, e, 0);
    end
    repeat (60) @(negedge clk);
    check(exp_q.size() == 0 && bits_q.size() == 0, "all blocks and bits out");
    check(n_done == n_sent, $sformatf("%0d blocks done of %0d", n_done, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
