// tb_sha2_compress: runs the FIPS 180-3 example messages through sha2_compress
// configured as SHA-224, SHA-256, SHA-384 and SHA-512 and checks the hash
// values, the block latency and the digest handshake.
module tb_sha2_compress;
  import sha_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;

  sha_compress_harness #(.ALGO(SHA224)) h0 (.clk, .rst, .done(done[0]), .checks(c[0]), .failures(f[0]));
  sha_compress_harness #(.ALGO(SHA256)) h1 (.clk, .rst, .done(done[1]), .checks(c[1]), .failures(f[1]));
  sha_compress_harness #(.ALGO(SHA384)) h2 (.clk, .rst, .done(done[2]), .checks(c[2]), .failures(f[2]));
  sha_compress_harness #(.ALGO(SHA512)) h3 (.clk, .rst, .done(done[3]), .checks(c[3]), .failures(f[3]));

  task automatic finish(int extra);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (&done);
    finish(0);
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    finish(1);
  end
endmodule
