// sha_core_harness: drives one sha_core with every test message of its hash
// function and checks the hash values. The source model behaves like a FIFO
// with synchronous read: a word read with src_read appears on din in the next
// cycle; in other cycles din carries random data. It reports "empty" (src_ready
// high) at random, and the destination model reports "full" (dst_ready high) at
// random, so both kinds of stall occur. Reads while empty and writes while full
// count as failures. Outputs: done when all words were checked, and the counts.
module sha_core_harness
  import sha_pkg::*;
#(
  parameter algo_e ALGO = SHA256
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls_in,
  output int   stalls_out,
  output int   multi_seg
);
  localparam int W = word_width(ALGO);

  `include "sha_vectors.svh"

  logic [W-1:0] stream_q [$];
  logic [W-1:0] expect_q [$];

  `include "sha_stream_gen.svh"

  logic [W-1:0] din, dout;
  logic         src_ready, src_read, dst_ready, dst_write;
  int           n_expected;

  sha_core #(.ALGO(ALGO)) dut (
    .clk, .rst, .din, .src_ready, .src_read, .dout, .dst_ready, .dst_write
  );

  initial begin
    checks = 0; failures = 0; stalls_in = 0; stalls_out = 0; multi_seg = 0;
    for (int k = 0; k < n_msgs(); k++)
      if (add_message(k, 7) > 1) multi_seg++;
    n_expected = expect_q.size();
  end

  assign done = (checks == n_expected) && (n_expected != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      src_ready <= 1'b1;
      dst_ready <= 1'b1;
    end else begin
      src_ready <= (stream_q.size() == 0) || (($urandom % 5) == 0);
      dst_ready <= (($urandom % 4) == 0);
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (src_read) begin
        if (src_ready || stream_q.size() == 0) begin
          failures <= failures + 1;
          $display("ERROR %s: read from an empty source", ALGO.name());
        end else begin
          din <= stream_q.pop_front();
        end
      end else begin
        din <= W'({$urandom, $urandom});
      end
      if (src_ready && !src_read && stream_q.size() != 0) stalls_in <= stalls_in + 1;
      // a pause in the middle of writing a hash value
      if (dst_ready && (checks % digest_words(ALGO)) != 0) stalls_out <= stalls_out + 1;
      if (dst_write) begin
        if (dst_ready) begin
          failures <= failures + 1;
          $display("ERROR %s: write to a full destination", ALGO.name());
        end else if (expect_q.size() == 0) begin
          failures <= failures + 1;
          $display("ERROR %s: unexpected output word %h", ALGO.name(), dout);
        end else begin
          logic [W-1:0] e;
          e = expect_q.pop_front();
          checks <= checks + 1;
          if (dout !== e) begin
            failures <= failures + 1;
            $display("ERROR %s: output word %0d is %h, expected %h",
                     ALGO.name(), checks, dout, e);
          end
        end
      end
    end
  end
endmodule
