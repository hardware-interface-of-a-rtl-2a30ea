// sha_output_ctrl: output side of the SHA core. It takes a finished hash value
// from the compression unit and writes it to the destination one w-bit word per
// clock, first word H0 first.
//
// dst_ready is active LOW (it is the destination FIFO's full flag). dst_write
// is high in every cycle in which a word is pending and dst_ready is low; dout
// then holds that word and the destination takes it at the next rising edge.
// While dst_ready is high the transfer pauses and resumes, with the same word,
// as soon as it goes low again.
//
// The hash value is loaded into a shift register when dig_valid is high and no
// transfer is in progress (dig_ready = idle), so the compression unit is free
// again after one cycle and the next message's first block can be accepted
// while the previous hash value is still being written. NWORDS words are
// written: 5 for SHA-1, 7 for SHA-224, 8 for SHA-256, 6 for SHA-384 and 8 for
// SHA-512. The word-per-clock transfer and the pause on a full destination
// follow the interface definition; the shift register is this design's choice.
// Reset (synchronous, active HIGH) drops a hash value not yet written.
module sha_output_ctrl #(
  parameter int W      = 32,
  parameter int NWORDS = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               dig_valid,
  output logic               dig_ready,
  input  logic [7:0][W-1:0]  dig_words,
  output logic [W-1:0]       dout,
  input  logic               dst_ready,  // active LOW
  output logic               dst_write
);

  logic [7:0][W-1:0] sh;
  logic [3:0]        left;

  assign dig_ready = (left == '0);
  assign dst_write = (left != '0) && !dst_ready;
  assign dout      = sh[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0;
    end else if (dig_valid && dig_ready) begin
      sh   <= dig_words;
      left <= 4'(NWORDS);
    end else if (dst_write) begin
      sh   <= {W'(0), sh[7:1]};
      left <= left - 1'b1;
    end
  end

  // Nothing is written while the destination reports full
  assert property (@(posedge clk) disable iff (rst) dst_ready |-> !dst_write);

endmodule
