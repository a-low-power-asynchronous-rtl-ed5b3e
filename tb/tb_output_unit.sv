// tb_output_unit: loads random blocks, offers one shift per two cycles with
// a randomly ready link, and checks the serial order (first bit = MSB),
// that pout holds the block, stall pulses on a not-ready shift and overflow
// on a load while bits are pending.
module tb_output_unit;
  localparam int N = 12;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0, ready = 0;
  logic [N-1:0] din, pout;
  logic pout_valid, ser_data, ser_valid, busy, stall, overflow;
  int checks = 0, failures = 0, n_stall = 0, n_ovf = 0;

  output_unit #(.BLOCK_LEN(N)) dut (.clk, .rst_n, .load, .din, .shift_en, .ready,
    .pout, .pout_valid, .ser_data, .ser_valid, .busy, .stall, .overflow);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] blk;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pout_valid && !busy, "idle after reset");
    for (int b = 0; b < 50; b++) begin
      int got;
      blk = N'($urandom);
      din = blk; load = 1;
      @(negedge clk);
      load = 0;
      check(pout == blk && pout_valid && busy, "load");
      got = 0;
      while (got < N) begin
        shift_en = 1; ready = ($urandom_range(0, 3) != 0);
        #1;
        if (ready) begin
          check(ser_valid && ser_data == blk[N-1-got], $sformatf("bit %0d", got));
          got++;
        end else begin
          check(stall && !ser_valid, "stall");
          n_stall++;
        end
        @(negedge clk);
        shift_en = 0; ready = 0;
        @(negedge clk);
      end
      check(!busy && pout == blk, "block done");
    end
    // Overflow: load while bits pending.
    din = '1; load = 1; @(negedge clk); load = 0;
    din = '0; load = 1; #1;
    check(overflow, "overflow on early load"); n_ovf++;
    @(negedge clk); load = 0;
    check(pout == '0, "new block replaces old");
    check(n_stall > 0 && n_ovf > 0, "stall and overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
