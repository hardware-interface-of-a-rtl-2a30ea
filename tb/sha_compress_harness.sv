// sha_compress_harness: feeds padded blocks of the FIPS 180-3 example messages
// "abc" and "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq" to the
// compression unit of hash function ALGO (sha1_compress for SHA-1,
// sha2_compress otherwise), then "abc" again, and compares the hash values with
// the published ones. Padding is done here, from the bytes. It also checks the
// block timing (dig_valid ROUNDS + 2 cycles after a single block is accepted)
// and that the hash value is held while dig_ready is low.
module sha_compress_harness
  import sha_pkg::*;
#(
  parameter algo_e ALGO = SHA256
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = word_width(ALGO);
  localparam int ROUNDS = (ALGO == SHA1 || W == 32) ? ((ALGO == SHA1) ? 80 : 64) : 80;

  logic               blk_valid, blk_ready, blk_first, blk_last;
  logic [15:0][W-1:0] blk_data;
  logic               dig_valid, dig_ready;
  logic [7:0][W-1:0]  dig_words;

  if (ALGO == SHA1) begin : g1
    sha1_compress dut (.*);
  end else begin : g2
    sha2_compress #(.ALGO(ALGO)) dut (.*);
  end

  function automatic string expected(int msg);
    case (ALGO)
      SHA1:   return msg == 1 ? "84983e441c3bd26ebaae4aa1f95129e5e54670f1"
                              : "a9993e364706816aba3e25717850c26c9cd0d89d";
      SHA224: return msg == 1 ? "75388b16512776cc5dba5da1fd890150b0c6455cb4f58b1952522525"
                              : "23097d223405d8228642a477bda255b32aadbce4bda0b3f7e36c9da7";
      SHA256: return msg == 1 ? "248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1"
                              : "ba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad";
      SHA384: return msg == 1 ? {"3391fdddfc8dc7393707a65b1b4709397cf8b1d162af05ab",
                                 "fe8f450de5f36bc6b0455a8520bc4e6f5fe95b1fe3c8452b"}
                              : {"cb00753f45a35e8bb5a03d699ac65007272c32ab0eded163",
                                 "1a8b605a43ff5bed8086072ba1e7cc2358baeca134c825a7"};
      default: return msg == 1 ? {"204a8fc6dda82f0a0ced7beb8e08a41657c16ef468b228a8279be331a703c335",
                                  "96fd15c13b1b07f9aa1d3bea57789ca031ad85c7a71dd70354ec631238ca3445"}
                               : {"ddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a",
                                  "2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f"};
    endcase
  endfunction

  function automatic string hex_digest();
    string s = "";
    for (int i = 0; i < digest_words(ALGO); i++)
      s = {s, (W == 64) ? $sformatf("%016h", dig_words[i]) : $sformatf("%08h", dig_words[i][31:0])};
    return s;
  endfunction

  task automatic hash(string msg, int id);
    logic [W-1:0] p [];
    int nbits, nblk, cyc;
    string got;
    nbits = msg.len() * 8;
    nblk  = (nbits + 1 + 2 * W + 16 * W - 1) / (16 * W);
    p = new[nblk * 16];
    foreach (p[i]) p[i] = '0;
    for (int i = 0; i < msg.len(); i++)
      p[(i * 8) / W][W - 1 - ((i * 8) % W) -: 8] = msg[i];
    p[nbits / W][W - 1 - (nbits % W)] = 1'b1;
    p[nblk * 16 - 1] = W'(nbits);
    // inputs change on the falling edge; the rising edge after a falling
    // edge that saw blk_ready high takes the block
    for (int b = 0; b < nblk; b++) begin
      @(negedge clk);
      blk_valid = 1'b1;
      blk_first = (b == 0);
      blk_last  = (b == nblk - 1);
      for (int i = 0; i < 16; i++) blk_data[i] = p[b * 16 + i];
      while (!blk_ready) @(negedge clk);
      @(negedge clk);
      blk_valid = 1'b0;
      blk_data  = {16{W'({$urandom, $urandom})}};
    end
    // count the rising edges after the one that took the last block
    cyc = 0;
    while (!dig_valid) begin
      @(negedge clk);
      cyc++;
    end
    if (nblk == 1) begin
      checks++;
      if (cyc != ROUNDS + 1) begin
        failures++;
        $display("ERROR %s: hash value %0d cycles after the block, expected %0d",
                 ALGO.name(), cyc, ROUNDS + 1);
      end
    end
    // hold dig_ready low: the value must stay and no block be accepted
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (!dig_valid || blk_ready) begin
        failures++;
        $display("ERROR %s: hash value not held", ALGO.name());
      end
    end
    got = hex_digest();
    checks++;
    if (got != expected(id)) begin
      failures++;
      $display("ERROR %s: message %0d hash %s, expected %s", ALGO.name(), id, got, expected(id));
    end
    dig_ready = 1'b1;
    @(negedge clk);
    dig_ready = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    blk_valid = 1'b0; blk_first = 1'b0; blk_last = 1'b0; dig_ready = 1'b0;
    blk_data = '0;
    @(negedge rst);
    hash("abc", 0);
    hash("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 1);
    hash("abc", 0);
    done = 1'b1;
  end
endmodule
