// sha_system: the SHA core in its typical surroundings, between an Input FIFO
// that serves as the source of message words and an Output FIFO that takes the
// hash value.
//
// Wiring: the Input FIFO's empty flag drives the core's active-LOW src_ready and
// the core's src_read drives the FIFO's read; the Output FIFO's full flag drives
// the core's active-LOW dst_ready and the core's dst_write drives the FIFO's
// write. The outside world writes message words with fifoin_write/ext_idata
// (while fifoin_full is low) and reads hash words with fifoout_read/ext_odata
// (while fifoout_empty is low; a word read appears on ext_odata one cycle
// later). All three blocks share clk and the synchronous, active-HIGH rst,
// after which both FIFOs are empty and the core waits for a new message.
// The structure and signal names follow the typical configuration of the
// interface definition; FIFO depths are parameters of this design.
module sha_system
  import sha_pkg::*;
#(
  parameter algo_e ALGO       = SHA256,
  parameter int    IN_DEPTH   = 16,
  parameter int    OUT_DEPTH  = 16,
  localparam int   W          = word_width(ALGO)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] ext_idata,
  input  logic         fifoin_write,
  output logic         fifoin_full,
  output logic [W-1:0] ext_odata,
  input  logic         fifoout_read,
  output logic         fifoout_empty
);

  logic [W-1:0] idata, odata;
  logic         fifoin_empty, fifoin_read;
  logic         fifoout_full, fifoout_write;

  sha_fifo #(.W(W), .DEPTH(IN_DEPTH)) u_fifoin (
    .clk, .rst, .din(ext_idata), .write(fifoin_write), .full(fifoin_full),
    .dout(idata), .read(fifoin_read), .empty(fifoin_empty)
  );

  sha_core #(.ALGO(ALGO)) u_core (
    .clk, .rst,
    .din(idata), .src_ready(fifoin_empty), .src_read(fifoin_read),
    .dout(odata), .dst_ready(fifoout_full), .dst_write(fifoout_write)
  );

  sha_fifo #(.W(W), .DEPTH(OUT_DEPTH)) u_fifoout (
    .clk, .rst, .din(odata), .write(fifoout_write), .full(fifoout_full),
    .dout(ext_odata), .read(fifoout_read), .empty(fifoout_empty)
  );

endmodule
