// tb_sha_core: checks sha_core for all five hash functions side by side. Each
// core hashes 11 to 13 messages (lengths around the padding boundaries, empty
// message, partial last words, multi-block messages) fed in random segments
// with random source and destination stalls; every output word is compared with
// a hash value computed by an independent software model.
module tb_sha_core;
  import sha_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [4:0] done;
  int checks [5], failures [5], sin [5], sout [5], mseg [5];

  sha_core_harness #(.ALGO(SHA1))   h1 (.clk, .rst, .done(done[0]), .checks(checks[0]),
    .failures(failures[0]), .stalls_in(sin[0]), .stalls_out(sout[0]), .multi_seg(mseg[0]));
  sha_core_harness #(.ALGO(SHA224)) h2 (.clk, .rst, .done(done[1]), .checks(checks[1]),
    .failures(failures[1]), .stalls_in(sin[1]), .stalls_out(sout[1]), .multi_seg(mseg[1]));
  sha_core_harness #(.ALGO(SHA256)) h3 (.clk, .rst, .done(done[2]), .checks(checks[2]),
    .failures(failures[2]), .stalls_in(sin[2]), .stalls_out(sout[2]), .multi_seg(mseg[2]));
  sha_core_harness #(.ALGO(SHA384)) h4 (.clk, .rst, .done(done[3]), .checks(checks[3]),
    .failures(failures[3]), .stalls_in(sin[3]), .stalls_out(sout[3]), .multi_seg(mseg[3]));
  sha_core_harness #(.ALGO(SHA512)) h5 (.clk, .rst, .done(done[4]), .checks(checks[4]),
    .failures(failures[4]), .stalls_in(sin[4]), .stalls_out(sout[4]), .multi_seg(mseg[4]));

  int total_checks, total_failures;

  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < 5; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
      $display("core %0d: %0d words checked, %0d failures, %0d input stalls, %0d output stalls, %0d multi-segment messages",
               i, checks[i], failures[i], sin[i], sout[i], mseg[i]);
      // every mechanism must have occurred at least once
      total_checks += 3;
      if (sin[i] == 0)  total_failures++;
      if (sout[i] == 0) total_failures++;
      if (mseg[i] == 0) total_failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (&done);
    repeat (20) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("ERROR: watchdog expired");
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end
endmodule
