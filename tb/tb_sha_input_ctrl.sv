// tb_sha_input_ctrl: checks the input parser and hardware padding of
// sha_input_ctrl for w = 32 and w = 64: every block word and the first/last
// flags of every block, for messages around the padding boundaries, cut into
// random segments, with random source and consumer stalls. It also requires
// that a partial last word and an extra padding-only block both occurred.
module tb_sha_input_ctrl;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic d32, d64;
  int c32, f32, x32, p32, c64, f64, x64, p64;
  int checks, failures;

  sha_input_harness #(.W(32)) h32 (.clk, .rst, .done(d32), .checks(c32), .failures(f32),
                                   .extra_pad_blocks(x32), .partial_words(p32));
  sha_input_harness #(.W(64)) h64 (.clk, .rst, .done(d64), .checks(c64), .failures(f64),
                                   .extra_pad_blocks(x64), .partial_words(p64));

  task automatic finish(int extra_fail);
    checks = c32 + c64 + 2;
    failures = f32 + f64 + extra_fail;
    if (x32 == 0 || x64 == 0) failures++;
    if (p32 == 0 || p64 == 0) failures++;
    $display("w=32: %0d checks, %0d extra padding blocks, %0d partial words", c32, x32, p32);
    $display("w=64: %0d checks, %0d extra padding blocks, %0d partial words", c64, x64, p64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (d32 && d64);
    repeat (10) @(posedge clk);
    finish(0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    finish(1);
  end
endmodule
