// sha_input_ctrl: input side of the SHA core. It reads the input word stream,
// follows the segmented message format, pads the message in hardware and hands
// complete 16-word message blocks to the compression unit.
//
// Input format (one w-bit word per read): a segment header holding the segment
// bit length, then ceil(bitlen/w) data words, then either the header of the
// next segment or an all-zero word that ends the message. The first word of a
// message is always taken as a length, so an empty message is two zero words.
// Every segment but the last must be a whole number of words; the last word of
// the last segment may be partial, its message bits at the most significant end.
// A message of known length is the one-segment case.
//
// Read timing: the source is a FIFO with synchronous read, so a word read with
// src_read in cycle t is on din in cycle t+1 and is captured at the end of that
// cycle. src_ready is active LOW (it is the source FIFO's empty flag). A read is
// issued in every cycle in which the source is not empty and the word's role is
// known: up to the end of a segment's data, one header at a time, and only while
// the block buffer has room for it. This leaves one idle cycle after each header
// and at each block boundary.
//
// Padding (FIPS 180-3 section 5.1): a 1 bit after the last message bit, zeros,
// and the 2w-bit total message length (the sum of all segment lengths) in the
// last two words of the final block. When the message ends a partial word, the
// 1 bit is merged into that word as it is captured; otherwise padding writes one
// word per cycle after the zero word is seen, spilling into an extra block when
// fewer than two words are left.
//
// Block handshake: blk_valid stays high with blk_data stable until blk_ready;
// blk_first marks the first block of a message (the hash must restart from its
// initial value) and blk_last the final, padded block.
//
// Reset (rst, synchronous, active HIGH) abandons any message in progress.
// The segment format, the read rule and padding follow the interface
// definition; the one-word-at-a-time header handling and the buffer handshake
// are this design's choices.
module sha_input_ctrl #(
  parameter int W = 32
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [W-1:0]                 din,
  input  logic                         src_ready,   // active LOW
  output logic                         src_read,
  output logic                         blk_valid,
  input  logic                         blk_ready,
  output logic                         blk_first,
  output logic                         blk_last,
  output logic [15:0][W-1:0]           blk_data
);

  localparam int LW = $clog2(W);

  typedef enum logic [1:0] {S_HDR, S_DATA, S_PAD} state_e;

  state_e          state;
  logic            pend;          // a word read last cycle is on din now
  logic            first_hdr;     // next header is the first of a message
  logic [LW-1:0]   seg_tail;      // segment bit length mod w
  logic [W-1:0]    seg_words;     // words in the current segment
  logic [W-1:0]    issued;        // data words of the segment read so far
  logic [W-1:0]    got;           // data words of the segment captured so far
  logic [2*W-1:0]  total_len;     // message bit length so far
  logic            one_done;      // the padding 1 bit has been placed
  logic [4:0]      idx;           // next free word of the block buffer (16 = full)
  logic [15:0][W-1:0] buf_q;
  logic            first_q, last_q;

  logic            can_issue;
  logic            capture;
  logic            handoff;
  logic [W:0]      words_of_len;
  logic [LW-1:0]   tail_bits;
  logic [W-1:0]    data_word;

  assign handoff   = blk_valid && blk_ready;
  assign blk_valid = (idx == 5'd16);
  assign blk_data  = buf_q;
  assign blk_first = first_q;
  assign blk_last  = last_q;

  always_comb begin
    can_issue = 1'b0;
    case (state)
      S_HDR:  can_issue = !pend && (idx != 5'd16 || !last_q);
      S_DATA: can_issue = (issued != seg_words) && ({1'b0, idx} + 6'(pend) < 6'd16);
      default: can_issue = 1'b0;
    endcase
  end
  assign src_read = can_issue && !src_ready;
  assign capture  = pend;

  // Words in a segment of din bits: ceil(din / w)
  assign words_of_len = ({1'b0, din} + (W+1)'(W - 1)) >> LW;

  // Last data word of a segment with a partial tail: keep the message bits,
  // put the padding 1 right after them and clear the rest.
  assign tail_bits = seg_tail;
  always_comb begin
    data_word = din;
    if (got == seg_words - 1'b1 && tail_bits != '0)
      data_word = (din & ~({W{1'b1}} >> tail_bits)) | ({1'b1, {(W-1){1'b0}}} >> tail_bits);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_HDR;
      pend      <= 1'b0;
      first_hdr <= 1'b1;
      seg_tail  <= '0;
      seg_words <= '0;
      issued    <= '0;
      got       <= '0;
      total_len <= '0;
      one_done  <= 1'b0;
      idx       <= '0;
      first_q   <= 1'b1;
      last_q    <= 1'b0;
    end else begin
      pend <= src_read;

      if (handoff) begin
        idx     <= '0;
        first_q <= last_q;        // after the final block a new message starts
        last_q  <= 1'b0;
        if (last_q) begin
          first_hdr <= 1'b1;
          total_len <= '0;
          one_done  <= 1'b0;
        end
      end

      if (src_read && state == S_DATA) issued <= issued + 1'b1;

      case (state)
        S_HDR: if (capture) begin
          if (first_hdr || din != '0) begin
            first_hdr <= 1'b0;
            seg_tail  <= din[LW-1:0];
            seg_words <= words_of_len[W-1:0];
            issued    <= '0;
            got       <= '0;
            total_len <= total_len + (2*W)'(din);
            if (words_of_len != '0) state <= S_DATA;
          end else begin
            state <= S_PAD;
          end
        end

        S_DATA: if (capture) begin
          buf_q[idx[3:0]] <= data_word;
          idx <= idx + 1'b1;
          got <= got + 1'b1;
          if (got == seg_words - 1'b1) begin
            if (tail_bits != '0) one_done <= 1'b1;
            state <= S_HDR;
          end
        end

        S_PAD: if (idx != 5'd16) begin
          if (!one_done) begin
            buf_q[idx[3:0]] <= {1'b1, {(W-1){1'b0}}};
            one_done <= 1'b1;
            idx <= idx + 1'b1;
          end else if (idx == 5'd14) begin
            buf_q[14] <= total_len[2*W-1:W];
            buf_q[15] <= total_len[W-1:0];
            idx    <= 5'd16;
            last_q <= 1'b1;
            state  <= S_HDR;
          end else begin
            buf_q[idx[3:0]] <= '0;
            idx <= idx + 1'b1;
          end
        end

        default: state <= S_HDR;
      endcase
    end
  end

  // A word is never captured into a full buffer
  assert property (@(posedge clk) disable iff (rst)
                   (capture && state == S_DATA) |-> idx != 5'd16);

endmodule
