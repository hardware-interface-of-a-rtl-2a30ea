// sha_fifo: the standard FIFO used as Input FIFO and Output FIFO around the SHA
// core. Both ports are synchronous: a word on din is stored at the first rising
// clock edge at which write is high, and a word is removed and placed on dout at
// the first rising edge at which read is high. dout is a register, so after a
// read it holds the word for the whole next cycle; after a read of an empty FIFO
// (or no read) its value is to be ignored, and this implementation simply keeps
// the last word. empty and full are registered flags derived from the word count.
// A write to a full FIFO and a read of an empty one are ignored; a read and a
// write in the same cycle are both done (when the FIFO is full, only the read).
//
// The synchronous-read/synchronous-write behaviour and the empty/full/read/write
// signals follow the interface definition; the depth is free (any depth, down to
// one, is allowed) and DEPTH = 16 is this design's default. Storage is a plain
// array with wrapping read and write pointers. Reset (synchronous, active HIGH)
// empties the FIFO.
module sha_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         write,
  output logic         full,
  output logic [W-1:0] dout,
  input  logic         read,
  output logic         empty
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]   mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    count;
  logic           do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_rd = read && !empty;
  assign do_wr = write && !full;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (do_rd) dout <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= next_ptr(wp);
      if (do_rd) rp <= next_ptr(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
