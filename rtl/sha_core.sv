// sha_core: hash core with the standard SHA interface. It reads a message as a
// stream of w-bit words from a source (din, src_ready, src_read), hashes it with
// the function selected by ALGO, and writes the hash value as w-bit words to a
// destination (dout, dst_ready, dst_write).
//
// Inside: sha_input_ctrl parses the segmented input format, pads the message
// and builds 16-word blocks; sha2_compress (SHA-224/256/384/512) or
// sha1_compress (SHA-1) hashes them, one round per clock; sha_output_ctrl
// writes the hash value. The three work concurrently: the next block is read
// while the current one is compressed, and the hash value of one message is
// written while the next message is read.
//
// Interface (w = 32 for SHA-1/224/256, 64 for SHA-384/512):
//   rst        synchronous, active HIGH; abandons a message, nothing is output
//   din        input word, valid the cycle after src_read (synchronous source)
//   src_ready  active LOW: the source holds data
//   src_read   read request to the source
//   dout       output word, valid while dst_write is high
//   dst_ready  active LOW: the destination can take data
//   dst_write  write strobe; the destination stores dout at the next edge
// Port names, directions, polarities and the input format follow the interface
// definition; the hash function choice via ALGO and the internal split are this
// design's choices. Default: SHA-256.
module sha_core
  import sha_pkg::*;
#(
  parameter algo_e ALGO = SHA256,
  localparam int   W    = word_width(ALGO)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         src_ready,
  output logic         src_read,
  output logic [W-1:0] dout,
  input  logic         dst_ready,
  output logic         dst_write
);

  logic               blk_valid, blk_ready, blk_first, blk_last;
  logic [15:0][W-1:0] blk_data;
  logic               dig_valid, dig_ready;
  logic [7:0][W-1:0]  dig_words;

  sha_input_ctrl #(.W(W)) u_in (
    .clk, .rst, .din, .src_ready, .src_read,
    .blk_valid, .blk_ready, .blk_first, .blk_last, .blk_data
  );

  if (ALGO == SHA1) begin : g_sha1
    sha1_compress u_cmp (
      .clk, .rst, .blk_valid, .blk_ready, .blk_first, .blk_last, .blk_data,
      .dig_valid, .dig_ready, .dig_words
    );
  end else begin : g_sha2
    sha2_compress #(.ALGO(ALGO)) u_cmp (
      .clk, .rst, .blk_valid, .blk_ready, .blk_first, .blk_last, .blk_data,
      .dig_valid, .dig_ready, .dig_words
    );
  end

  sha_output_ctrl #(.W(W), .NWORDS(digest_words(ALGO))) u_out (
    .clk, .rst, .dig_valid, .dig_ready, .dig_words, .dout, .dst_ready, .dst_write
  );

endmodule
