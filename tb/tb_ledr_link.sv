// tb_ledr_link: an LEDR sender and receiver back to back. Random bits are
// sent whenever the sender is ready while the receiver randomly holds off.
// Checks: the wire code follows the LEDR table (V = data, V ^ R = phase,
// phases alternate), each token changes exactly one wire, the receiver gets
// every bit once and in order, and the sender is not ready until the
// acknowledge returns.
module tb_ledr_link;
  logic clk = 0, rst_n = 0, valid = 0, data = 0, hold = 0;
  logic ready, v, r, ack, rdata, rvalid;
  int checks = 0, failures = 0, n_wait = 0;
  logic q [$];

  ledr_tx u_tx (.clk, .rst_n, .valid, .data, .ack, .ready, .v, .r);
  ledr_rx u_rx (.clk, .rst_n, .v, .r, .hold, .data(rdata), .valid(rvalid), .ack);

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

  always @(negedge clk) if (rvalid) begin
    logic b;
    b = q.pop_front();
    check(rdata == b, "received bit in order");
  end

  initial begin
    static logic ph = 0;
    logic v0, r0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(v == 0 && r == 0 && ready, "idle phase 0 after reset");
    for (int i = 0; i < 2000; i++) begin
      hold = ($urandom_range(0, 2) == 0);
      if (ready) begin
        valid = 1; data = 1'($urandom); q.push_back(data);
        v0 = v; r0 = r;
        @(negedge clk);
        valid = 0;
        ph = ~ph;
        check(v == data && (v ^ r) == ph, "LEDR code word");
        check((v != v0) + (r != r0) == 1, "one wire changes");
        check(!ready, "waits for acknowledge");
      end else begin
        n_wait++;
        @(negedge clk);
      end
    end
    hold = 0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all tokens received");
    check(n_wait > 0, "sender waited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
