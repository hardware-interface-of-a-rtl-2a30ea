// sha1_compress: iterative SHA-1 compression function (FIPS 180-3 section 6.1),
// 80 rounds, one round per clock, w = 32.
//
// It has the same block and digest handshakes as sha2_compress, so the SHA core
// can use either. The 16-word shift register supplies W_t at its head and
// shifts in W_{t+16} = ROTL1(W_{t+13} ^ W_{t+8} ^ W_{t+2} ^ W_t). The five
// working variables a..e are loaded from the hash value (or the initial value
// for the first block of a message) and updated once per cycle; one more cycle
// adds them into H0..H4. Only dig_words[4:0] carry the hash value; the upper
// three words are zero.
//
// Timing: accept, 80 round cycles and one add cycle: 82 cycles per block.
// Reset is synchronous, active HIGH. Round functions and constants are FIPS
// 180-3's; the register organisation is this design's choice.
module sha1_compress
  import sha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 blk_valid,
  output logic                 blk_ready,
  input  logic                 blk_first,
  input  logic                 blk_last,
  input  logic [15:0][31:0]    blk_data,
  output logic                 dig_valid,
  input  logic                 dig_ready,
  output logic [7:0][31:0]     dig_words
);

  typedef enum logic [1:0] {C_IDLE, C_ROUND, C_ADD, C_DIGEST} cstate_e;

  cstate_e            state;
  logic [6:0]         t;
  logic               last_q;
  logic [15:0][31:0]  ws;
  logic [4:0][31:0]   h;
  logic [4:0][31:0]   v;      // v[0] = a .. v[4] = e
  logic [31:0]        f_t, k_t, tmp, w_new;

  always_comb begin
    if (t < 7'd20) begin
      f_t = (v[1] & v[2]) | (~v[1] & v[3]);
      k_t = K_SHA1[0];
    end else if (t < 7'd40) begin
      f_t = v[1] ^ v[2] ^ v[3];
      k_t = K_SHA1[1];
    end else if (t < 7'd60) begin
      f_t = (v[1] & v[2]) | (v[1] & v[3]) | (v[2] & v[3]);
      k_t = K_SHA1[2];
    end else begin
      f_t = v[1] ^ v[2] ^ v[3];
      k_t = K_SHA1[3];
    end
    tmp   = {v[0][26:0], v[0][31:27]} + f_t + v[4] + k_t + ws[0];
    w_new = ws[13] ^ ws[8] ^ ws[2] ^ ws[0];
    w_new = {w_new[30:0], w_new[31]};
  end

  assign blk_ready = (state == C_IDLE);
  assign dig_valid = (state == C_DIGEST);
  assign dig_words = {96'h0, h};

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      t      <= '0;
      last_q <= 1'b0;
    end else begin
      case (state)
        C_IDLE: if (blk_valid) begin
          ws     <= blk_data;
          v      <= blk_first ? IV_SHA1 : h;
          if (blk_first) h <= IV_SHA1;
          last_q <= blk_last;
          t      <= '0;
          state  <= C_ROUND;
        end
        C_ROUND: begin
          // e <= d, d <= c, c <= ROTL30(b), b <= a, a <= tmp
          v  <= {v[3], v[2], {v[1][1:0], v[1][31:2]}, v[0], tmp};
          ws <= {w_new, ws[15:1]};
          t  <= t + 1'b1;
          if (t == 7'd79) state <= C_ADD;
        end
        C_ADD: begin
          for (int i = 0; i < 5; i++) h[i] <= h[i] + v[i];
          state <= last_q ? C_DIGEST : C_IDLE;
        end
        C_DIGEST: if (dig_ready) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
