// sha_input_harness: drives one sha_input_ctrl of word width W with a series
// of messages and checks every 16-word block it hands over, and its first and
// last flags, against blocks padded by the testbench itself (message bits,
// a 1 bit, zeros, 2w-bit length). Messages are cut into random segments; the
// source reports empty at random, the block consumer is slow at random.
module sha_input_harness #(
  parameter int W = 32
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   extra_pad_blocks,
  output int   partial_words
);
  logic [W-1:0] stream_q [$];
  logic [W-1:0] exp_q [$];     // expected block words, 16 per block
  logic [1:0]   flag_q [$];    // expected {first, last} per block
  int           n_blocks;

  logic [W-1:0]       din;
  logic               src_ready, src_read;
  logic               blk_valid, blk_ready, blk_first, blk_last;
  logic [15:0][W-1:0] blk_data;

  sha_input_ctrl #(.W(W)) dut (.*);

  // message bit lengths: empty, short, around the 1-bit/length boundaries, long
  function automatic void add_message(int seed, int nbits);
    logic [W-1:0] m [$];
    logic [W-1:0] p [];
    int nwords, nblk, pos, r;
    logic [31:0] x;
    x = 32'(seed);
    nwords = (nbits + W - 1) / W;
    for (int i = 0; i < nwords; i++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      m.push_back(W'({x, ~x}));
    end
    // stream: random whole-word segments, then the rest, then the zero word
    pos = 0;
    while (nwords - pos > 1 && ($urandom % 2) != 0) begin
      int n = 1 + int'($urandom % 5);
      if (n > nwords - pos - 1) n = nwords - pos - 1;
      stream_q.push_back(W'(n * W));
      for (int i = 0; i < n; i++) stream_q.push_back(m[pos + i]);
      pos += n;
    end
    stream_q.push_back(W'(nbits - pos * W));
    for (int i = pos; i < nwords; i++) stream_q.push_back(m[i]);
    stream_q.push_back('0);
    // expected padded blocks
    nblk = (nbits + 1 + 2 * W + 16 * W - 1) / (16 * W);
    if (nblk * 16 > nwords + 2 && (nbits % (16 * W)) > 14 * W - 1) extra_pad_blocks++;
    p = new[nblk * 16];
    foreach (p[i]) p[i] = '0;
    for (int i = 0; i < nwords; i++) p[i] = m[i];
    r = nbits % W;
    if (r != 0) begin
      p[nwords - 1] &= ~({W{1'b1}} >> r);
      partial_words++;
    end
    p[nbits / W] |= {1'b1, {(W-1){1'b0}}} >> r;
    p[nblk * 16 - 1] = W'(nbits);
    for (int b = 0; b < nblk; b++) begin
      for (int i = 0; i < 16; i++) exp_q.push_back(p[b * 16 + i]);
      flag_q.push_back({b == 0, b == nblk - 1});
    end
  endfunction

  initial begin
    int lens [12];
    lens = '{0, 1, W - 1, W, 14 * W - 1, 14 * W, 15 * W - 3, 16 * W,
             16 * W + 1, 30 * W + 5, 32 * W, 50 * W + 7};
    checks = 0; failures = 0; extra_pad_blocks = 0; partial_words = 0;
    foreach (lens[i]) add_message(i + 3, lens[i]);
    n_blocks = flag_q.size();
  end

  assign done = (flag_q.size() == 0) && (n_blocks != 0);

  // source with synchronous read
  always @(posedge clk) begin
    if (rst) begin
      src_ready <= 1'b1;
    end else begin
      src_ready <= (stream_q.size() == 0) || (($urandom % 4) == 0);
      if (src_read) begin
        if (src_ready) begin
          failures <= failures + 1;
          $display("ERROR W=%0d: read from an empty source", W);
        end else begin
          din <= stream_q.pop_front();
        end
      end else begin
        din <= W'({$urandom, $urandom});
      end
    end
  end

  // block consumer, ready at random
  always @(posedge clk) begin
    if (rst) begin
      blk_ready <= 1'b0;
    end else begin
      blk_ready <= ($urandom % 3) == 0;
      if (blk_valid && blk_ready) begin
        logic [1:0] f;
        int bad;
        if (flag_q.size() == 0) begin
          failures <= failures + 1;
          $display("ERROR W=%0d: unexpected block", W);
        end else begin
          f = flag_q.pop_front();
          bad = 0;
          for (int i = 0; i < 16; i++) begin
            logic [W-1:0] e;
            e = exp_q.pop_front();
            if (blk_data[i] !== e) begin
              bad++;
              $display("ERROR W=%0d: block word %0d is %h, expected %h", W, i, blk_data[i], e);
            end
          end
          if ({blk_first, blk_last} !== f) begin
            bad++;
            $display("ERROR W=%0d: block flags %b, expected %b", W, {blk_first, blk_last}, f);
          end
          checks <= checks + 17;
          failures <= failures + bad;
        end
      end
    end
  end
endmodule
