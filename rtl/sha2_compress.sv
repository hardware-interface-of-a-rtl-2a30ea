// sha2_compress: iterative SHA-2 compression function (FIPS 180-3 section 6.2
// to 6.5), one round per clock, for SHA-224, SHA-256 (w = 32, 64 rounds) and
// SHA-384, SHA-512 (w = 64, 80 rounds).
//
// A block is accepted when blk_valid and blk_ready are both high; blk_ready is
// high only while the unit is idle. The 16 block words go into a 16-word shift
// register that also computes the message schedule: in round t the register
// head is W_t, and the word shifted in is
//   W_{t+16} = sigma1(W_{t+14}) + W_{t+9} + sigma0(W_{t+1}) + W_t.
// The eight working variables a..h are loaded from the current hash value, or
// from the initial value when blk_first is set, and updated once per cycle.
// After the last round a cycle adds them into the hash value. For the final
// block of a message (blk_last) the hash value is then offered on dig_words
// with dig_valid until dig_ready; only then is the next block accepted.
//
// Timing: accept, then 64 or 80 round cycles, then one add cycle: a block
// occupies the unit for ROUNDS + 2 cycles. Reset is synchronous, active HIGH.
// The round function and constants are FIPS 180-3's; the schedule shift
// register and the accept/add timing are this design's choices.
module sha2_compress
  import sha_pkg::*;
#(
  parameter algo_e ALGO = SHA256,
  localparam int   W    = word_width(ALGO)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 blk_valid,
  output logic                 blk_ready,
  input  logic                 blk_first,
  input  logic                 blk_last,
  input  logic [15:0][W-1:0]   blk_data,
  output logic                 dig_valid,
  input  logic                 dig_ready,
  output logic [7:0][W-1:0]    dig_words
);

  localparam int ROUNDS = (W == 64) ? 80 : 64;
  localparam iv_table_t IV = sha2_iv(ALGO);

  typedef enum logic [1:0] {C_IDLE, C_ROUND, C_ADD, C_DIGEST} cstate_e;

  cstate_e            state;
  logic [6:0]         t;
  logic               last_q;
  logic [15:0][W-1:0] ws;
  logic [7:0][W-1:0]  h;      // hash value H0..H7
  logic [7:0][W-1:0]  v;      // working variables, v[0] = a .. v[7] = h
  logic [7:0][W-1:0]  iv_w;
  logic [W-1:0]       k_t, t1, t2, w_new;

  for (genvar i = 0; i < 8; i++) begin : g_iv
    assign iv_w[i] = IV[i][W-1:0];
  end

  function automatic logic [W-1:0] rotr(logic [W-1:0] x, int n);
    return (x >> n) | (x << (W - n));
  endfunction

  function automatic logic [W-1:0] bsig0(logic [W-1:0] x);
    return (W == 64) ? rotr(x, 28) ^ rotr(x, 34) ^ rotr(x, 39)
                     : rotr(x, 2)  ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction
  function automatic logic [W-1:0] bsig1(logic [W-1:0] x);
    return (W == 64) ? rotr(x, 14) ^ rotr(x, 18) ^ rotr(x, 41)
                     : rotr(x, 6)  ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction
  function automatic logic [W-1:0] ssig0(logic [W-1:0] x);
    return (W == 64) ? rotr(x, 1)  ^ rotr(x, 8)  ^ (x >> 7)
                     : rotr(x, 7)  ^ rotr(x, 18) ^ (x >> 3);
  endfunction
  function automatic logic [W-1:0] ssig1(logic [W-1:0] x);
    return (W == 64) ? rotr(x, 19) ^ rotr(x, 61) ^ (x >> 6)
                     : rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  always_comb begin
    k_t   = (W == 64) ? K512[t][W-1:0] : W'(K512[t][63:32]);
    t1    = v[7] + bsig1(v[4]) + ((v[4] & v[5]) ^ (~v[4] & v[6])) + k_t + ws[0];
    t2    = bsig0(v[0]) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
    w_new = ssig1(ws[14]) + ws[9] + ssig0(ws[1]) + ws[0];
  end

  assign blk_ready = (state == C_IDLE);
  assign dig_valid = (state == C_DIGEST);
  assign dig_words = h;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      t      <= '0;
      last_q <= 1'b0;
    end else begin
      case (state)
        C_IDLE: if (blk_valid) begin
          ws     <= blk_data;
          v      <= blk_first ? iv_w : h;
          if (blk_first) h <= iv_w;
          last_q <= blk_last;
          t      <= '0;
          state  <= C_ROUND;
        end
        C_ROUND: begin
          v  <= {v[6:4], v[3] + t1, v[2:0], t1 + t2};
          ws <= {w_new, ws[15:1]};
          t  <= t + 1'b1;
          if (t == 7'(ROUNDS - 1)) state <= C_ADD;
        end
        C_ADD: begin
          for (int i = 0; i < 8; i++) h[i] <= h[i] + v[i];
          state <= last_q ? C_DIGEST : C_IDLE;
        end
        C_DIGEST: if (dig_ready) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
