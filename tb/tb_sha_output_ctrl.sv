// tb_sha_output_ctrl: checks sha_output_ctrl with w = 32 and 8 words. Hash
// values are offered with dig_valid; the destination is first always ready, so
// the 8 words must come on 8 consecutive cycles, and then full at random, so
// the transfer must pause while dst_ready is high and resume with the same word.
// Also checks that the next hash value is taken only when the transfer is done.
module tb_sha_output_ctrl;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic              dig_valid, dig_ready, dst_ready, dst_write;
  logic [7:0][31:0]  dig_words;
  logic [31:0]       dout;

  sha_output_ctrl #(.W(32), .NWORDS(8)) dut (.*);

  int checks = 0, failures = 0, pauses = 0;
  logic [31:0] exp_q [$];
  bit random_full = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  task automatic finish(int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + extra);
    $finish;
  endtask

  // destination: takes dout at the rising edge when dst_write is high; its
  // full flag (dst_ready) changes at the falling edge
  always @(posedge clk) begin
    if (!rst) begin
      if (dst_write) begin
        check(!dst_ready, "no write while full");
        check(exp_q.size() != 0, "expected a word");
        if (exp_q.size() != 0) check(dout == exp_q.pop_front(), "word value and order");
      end
      if (dst_ready && !dig_ready) pauses++;
    end
  end

  always @(negedge clk)
    dst_ready <= random_full ? (($urandom % 3) == 0) : 1'b0;

  task automatic offer(int seed);
    @(negedge clk);
    for (int i = 0; i < 8; i++) dig_words[i] = $urandom;
    dig_valid = 1'b1;
    while (!dig_ready) @(negedge clk);
    for (int i = 0; i < 8; i++) exp_q.push_back(dig_words[i]);
    @(negedge clk);
    dig_valid = 1'b0;
    dig_words = {8{32'(seed)}};
  endtask

  initial begin
    int t0, n;
    rst = 1'b1; dig_valid = 1'b0; dst_ready = 1'b0; dig_words = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(!dst_write && dig_ready, "idle after reset");
    // always-ready destination: one word per clock
    offer(1);
    n = 0;
    while (dst_write) begin
      n++;
      @(negedge clk);
    end
    check(n == 8, "8 words on 8 consecutive cycles");
    check(exp_q.size() == 0, "all words written");
    // random full
    random_full = 1;
    for (int m = 0; m < 20; m++) begin
      offer(m);
      check(!dig_ready || exp_q.size() == 0, "busy while words are left");
    end
    t0 = 0;
    while (exp_q.size() != 0 && t0 < 1000) begin
      @(negedge clk);
      t0++;
    end
    check(exp_q.size() == 0, "all words written after stalls");
    check(pauses > 0, "transfer paused at least once");
    finish(0);
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    finish(1);
  end
endmodule
