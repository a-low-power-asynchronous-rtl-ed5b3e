// tb_error_scenarios: the example block 011010111100 sent through the whole
// system from reset, at a 5 MHz global clock, with the channel error mask
// ctrl changed at fixed times (time 0 = release of reset; input bits are
// taken from the first local period on):
//   no error;
//   ctrl = 01 from 2100 ns to 2500 ns          (one bit error);
//   ctrl = 01 from 1700 ns to 2100 ns;
//   ctrl = 01 from 2100 ns to 2400 ns;
//   ctrl = 11 from 1700 ns to 2100 ns          (two bits of one symbol);
//   ctrl = 01 from 2100 ns to 2500 ns, then 10 to 2900 ns (two consecutive
//                                                symbols).
// In every run pout and the serial bits on sout must equal what the reference
// decoder gives for the symbols the decoder actually received, and pout must
// appear 13 local periods after the first bit. Runs marked `must` must also
// give back the block that was sent; for the others the outcome is printed.
module tb_error_scenarios;
  import tb_vit_ref_pkg::*;
  localparam int N = 12;
  localparam logic [N-1:0] SENT = 12'b011010111100;

  logic clk = 0, rst_n = 0, inp = 0, in_valid = 0, sink_hold = 0;
  logic [1:0] ctrl = 0;
  logic s1, s2;
  logic [1:0] enc, rx;
  logic [3:0] pm [4];
  logic [3:0] count;
  logic [N-1:0] pout;
  logic pout_valid, block_done, lv, lr, lack, sout, sout_valid;
  logic sm_update, drop_thresh, drop_cap, stall, overflow;
  int checks = 0, failures = 0, n_err_syms = 0;

  async_viterbi_top dut (
    .clk, .rst_n, .inp, .in_valid, .ctrl, .sink_hold,
    .s_async1(s1), .s_async2(s2), .enc, .rx, .pm, .count,
    .pout, .pout_valid, .block_done,
    .ledr_v(lv), .ledr_r(lr), .ledr_ack(lack), .sout, .sout_valid,
    .sm_update, .drop_thresh, .drop_cap, .stall, .overflow);

  always #100 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count received symbols that carry an error (ctrl nonzero while the
  // decoder steps).
  logic [1:0] rxs [] = new[N];
  int nrx = 0;
  always @(posedge clk) if (rst_n && s1) begin
    if (ctrl != 0) n_err_syms++;
    if (nrx < N && dut.rx_valid) begin rxs[nrx] = rx; nrx++; end
  end

  task automatic run(int t_on, int t_off, logic [1:0] m1, int t_off2, logic [1:0] m2, bit must);
    realtime t0;
    logic [N-1:0] got;
    int nbits, lat;
    rst_n = 0; in_valid = 0; ctrl = 0; n_err_syms = 0; nrx = 0;
    repeat (2) @(negedge clk);
    @(posedge clk); #1;
    rst_n = 1; t0 = $realtime;
    fork
      begin : drive
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          while (s1 != 1'b0) @(negedge clk);
          inp = SENT[N-1-i]; in_valid = 1;
          @(negedge clk);
          in_valid = 0;
        end
      end
      begin : channel
        if (t_on >= 0) begin
          #(t_on - ($realtime - t0)); ctrl = m1;
          #(t_off - t_on);            ctrl = m2;
          if (t_off2 > t_off) #(t_off2 - t_off);
          ctrl = 2'b00;
        end
      end
      begin : collect
        lat = 0;
        while (!pout_valid) begin @(posedge clk); lat++; end
        nbits = 0;
        while (nbits < N) begin
          @(posedge clk); #1;
          if (sout_valid) begin got[N-1-nbits] = sout; nbits++; end
        end
      end
    join
    begin
      logic [63:0] d;
      int bm;
      d = ref_decode(rxs, 4, 2, bm);
      check(pout == d[N-1:0], $sformatf("window %0d ns: pout %b reference %b", t_on, pout, d[N-1:0]));
      check(got == pout, $sformatf("window %0d ns: sout %b", t_on, got));
      if (must) check(pout == SENT, $sformatf("window %0d ns: pout %b sent %b", t_on, pout, SENT));
    end
    check(lat == 2 * 13 + 1, $sformatf("pout after %0d cycles", lat));
    if (t_on >= 0) check(n_err_syms > 0, "errors were injected");
    $display("ctrl %b from %0d ns, %b to %0d ns: %0d symbols hit, decoded %b (%s)", m1, t_on, m2,
             t_off2 > t_off ? t_off2 : t_off, n_err_syms, pout, pout == SENT ? "corrected" : "not corrected");
  endtask

  initial begin
    run(-1, -1, 2'b00, -1, 2'b00, 1);
    run(2100, 2500, 2'b01, -1, 2'b00, 1);
    run(1700, 2100, 2'b01, -1, 2'b00, 1);
    run(2100, 2400, 2'b01, -1, 2'b00, 1);
    run(1700, 2100, 2'b11, -1, 2'b00, 0);
    run(2100, 2500, 2'b01, 2900, 2'b10, 0);
    check(nrx == N, "all symbols seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
