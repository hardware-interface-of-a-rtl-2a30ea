// tb_sha1_compress: runs the FIPS 180-3 example messages through sha1_compress
// and checks the hash values, the block latency and the digest handshake.
module tb_sha1_compress;
  import sha_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic done;
  int c, f;
  int checks, failures;

  sha_compress_harness #(.ALGO(SHA1)) h0 (.clk, .rst, .done(done), .checks(c), .failures(f));

  task automatic finish(int extra);
    checks = c;
    failures = f + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    finish(0);
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    finish(1);
  end
endmodule
