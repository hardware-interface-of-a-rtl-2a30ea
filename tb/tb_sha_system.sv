// tb_sha_system: end-to-end test of sha_system (Input FIFO, SHA core, Output
// FIFO) with all parameters at their defaults (SHA-256, FIFO depth 16).
//
// 1. A long message is started, and the design is reset while the core is
//    hashing it: the message must be abandoned without any output.
// 2. Thirteen test messages (empty, partial last words, lengths at the padding
//    boundaries, several blocks), cut into random segments, are written into
//    the Input FIFO in bursts with random gaps; the hash words are read from
//    the Output FIFO at random, slowly enough that it fills up. Every word is
//    compared with a value from an independent software model.
// Each mechanism is counted and must occur at least once: Input FIFO full,
// core waiting on an empty Input FIFO, Output FIFO full (core paused),
// multi-segment message, partial last word, padding spilling into an extra
// block, empty message, and reset during hashing.
module tb_sha_system;
  import sha_pkg::*;

  localparam algo_e ALGO = SHA256;
  localparam int    W    = word_width(ALGO);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst;
  logic [W-1:0] ext_idata, ext_odata;
  logic         fifoin_write, fifoin_full, fifoout_read, fifoout_empty;

  sha_system dut (.*);

  `include "sha_vectors.svh"

  logic [W-1:0] stream_q [$];
  logic [W-1:0] expect_q [$];

  `include "sha_stream_gen.svh"

  int checks = 0, failures = 0;
  int n_in_full = 0, n_in_empty = 0, n_out_full = 0, n_multi_seg = 0;
  int n_partial = 0, n_extra_block = 0, n_empty_msg = 0, n_reset = 0;
  int n_expected = 0;
  bit running = 0;
  bit rd_pend = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  task automatic finish(int extra);
    $display("Input FIFO full %0d, core waiting on empty Input FIFO %0d, Output FIFO full %0d",
             n_in_full, n_in_empty, n_out_full);
    $display("multi-segment messages %0d, partial last words %0d, extra padding blocks %0d",
             n_multi_seg, n_partial, n_extra_block);
    $display("empty messages %0d, resets during hashing %0d", n_empty_msg, n_reset);
    checks += 8;
    if (n_in_full == 0)     failures++;
    if (n_in_empty == 0)    failures++;
    if (n_out_full == 0)    failures++;
    if (n_multi_seg == 0)   failures++;
    if (n_partial == 0)     failures++;
    if (n_extra_block == 0) failures++;
    if (n_empty_msg == 0)   failures++;
    if (n_reset == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + extra);
    $finish;
  endtask

  // Output side: random reads; a word read at one rising edge is on ext_odata
  // until the next one, where it is checked.
  always @(posedge clk) begin
    if (rst) begin
      rd_pend <= 1'b0;
    end else begin
      if (rd_pend) begin
        if (expect_q.size() == 0) begin
          check(1'b0, "unexpected output word");
        end else begin
          logic [W-1:0] e;
          e = expect_q.pop_front();
          check(ext_odata == e, $sformatf("hash word %h, expected %h", ext_odata, e));
        end
      end
      rd_pend <= fifoout_read && !fifoout_empty;
      if (running && dut.fifoout_full) n_out_full++;
      if (running && dut.fifoin_empty && stream_q.size() != 0 && !fifoin_write) n_in_empty++;
    end
  end

  // the reader holds off until the Output FIFO has filled up once, then
  // switches between idle and busy periods of random length
  bit reader_on = 0;
  always @(negedge clk) begin
    if (n_out_full > 0 && ($urandom % 100) == 0) reader_on <= !reader_on;
    fifoout_read <= running && reader_on && (($urandom % 2) == 0);
  end

  // Input side: bursts of writes with random gaps
  task automatic feed();
    int gap = 0;
    while (stream_q.size() != 0) begin
      @(negedge clk);
      fifoin_write = 1'b0;
      if (gap > 0) begin
        gap--;
      end else if (fifoin_full) begin
        n_in_full++;
      end else begin
        ext_idata = stream_q.pop_front();
        fifoin_write = 1'b1;
        if (($urandom % 16) == 0) gap = int'($urandom % 200);
      end
    end
    @(negedge clk);
    fifoin_write = 1'b0;
  endtask

  initial begin
    int len;
    rst = 1'b1; fifoin_write = 1'b0; ext_idata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // 1. abandoned message: 2000 bits announced, 40 words sent
    stream_q.push_back(W'(2000));
    for (int i = 0; i < 40; i++) stream_q.push_back(W'($urandom));
    feed();
    repeat (20) @(negedge clk);
    check(dut.u_core.u_in.state != 2'd0, "core in the middle of a message before the reset");
    rst = 1'b1;
    n_reset++;
    @(negedge clk);
    rst = 1'b0;
    repeat (200) @(negedge clk);
    check(fifoout_empty, "no output from the abandoned message");

    // 2. the test messages
    running = 1'b1;
    for (int k = 0; k < n_msgs(); k++) begin
      len = msg_len(k);
      if (add_message(k, 7) > 1) n_multi_seg++;
      if (len % W != 0) n_partial++;
      if (len == 0) n_empty_msg++;
      if (len % (16 * W) >= 14 * W) n_extra_block++;
    end
    n_expected = expect_q.size();
    feed();
    while (expect_q.size() != 0) @(negedge clk);
    repeat (50) @(negedge clk);
    check(fifoout_empty && !rd_pend, "no extra output words");
    finish(0);
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog expired, %0d hash words missing", expect_q.size());
    finish(1);
  end
endmodule
