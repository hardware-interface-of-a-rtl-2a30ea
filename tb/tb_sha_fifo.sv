// tb_sha_fifo: checks sha_fifo. First it replays the Input FIFO example of the
// interface definition cycle by cycle (write 0000ABCD; read it; read the empty
// FIFO; write 00001234 and 00005678; then write 1A2B3C4D twice while reading)
// and checks the words on dout and the empty flag. Then a depth-4 and a depth-1
// FIFO are driven with random reads and writes and compared with a queue model,
// including writes while full and reads while empty.
module tb_sha_fifo;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // example FIFO, depth 16
  logic [31:0] din, dout;
  logic        write, read, full, empty;
  sha_fifo #(.W(32), .DEPTH(16)) dut (.clk, .rst, .din, .write, .full, .dout, .read, .empty);

  // random-test FIFOs of depth 4 and 1
  logic [15:0] rdin;
  logic        rw4, rr4, rw1, rr1;
  logic [15:0] rd4, rd1;
  logic        f4, e4, f1, e1;
  sha_fifo #(.W(16), .DEPTH(4)) d4 (.clk, .rst, .din(rdin), .write(rw4), .full(f4),
                                    .dout(rd4), .read(rr4), .empty(e4));
  sha_fifo #(.W(16), .DEPTH(1)) d1 (.clk, .rst, .din(rdin), .write(rw1), .full(f1),
                                    .dout(rd1), .read(rr1), .empty(e1));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  // drive one clock cycle of the example: called at a falling edge, sets the
  // inputs for the next rising edge and returns at the falling edge after it
  task automatic step(logic wr, logic [31:0] d, logic rd);
    write = wr;
    din   = d;
    read  = rd;
    @(negedge clk);
  endtask

  task automatic finish(int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + extra);
    $finish;
  endtask

  int fulls4 = 0, empties4 = 0;

  initial begin
    logic [15:0] q4 [$];
    logic [15:0] q1 [$];
    logic [15:0] exp4, exp1;
    logic        chk4, chk1;
    rst = 1'b1; write = 0; read = 0; din = '0;
    rw4 = 0; rr4 = 0; rw1 = 0; rr1 = 0; rdin = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(empty && !full, "empty after reset");
    // cycle 1: nothing sampled yet
    step(1, 32'h0000ABCD, 0);               // cycle 2: write
    check(!empty, "not empty after write");
    step(0, 32'h0000ABCD, 1);               // cycle 3: read
    check(dout == 32'h0000ABCD, "cycle 3 dout 0000ABCD");
    check(empty, "empty after read");
    step(0, 32'h00001234, 1);               // cycle 4: read of an empty FIFO
    check(empty, "still empty");
    step(1, 32'h00001234, 0);               // cycle 5: write
    step(1, 32'h00005678, 0);               // cycle 6: write
    step(1, 32'h1A2B3C4D, 1);               // cycle 7: write and read
    check(dout == 32'h00001234, "cycle 7 dout 00001234");
    step(1, 32'h1A2B3C4D, 1);               // cycle 8: write and read
    check(dout == 32'h00005678, "cycle 8 dout 00005678");
    step(0, 32'h0, 1);
    check(dout == 32'h1A2B3C4D, "third word 1A2B3C4D");
    step(0, 32'h0, 1);
    check(dout == 32'h1A2B3C4D, "fourth word 1A2B3C4D");
    check(empty, "empty at the end");
    // fill to full
    for (int i = 0; i < 16; i++) step(1, 32'(i), 0);
    check(full, "full after 16 writes");
    step(1, 32'hdead, 0);                   // ignored
    for (int i = 0; i < 16; i++) begin
      step(0, 0, 1);
      check(dout == 32'(i), "word order after filling");
    end
    check(empty, "empty after draining");

    // random test against queue models
    chk4 = 0; chk1 = 0;
    repeat (2000) begin
      @(negedge clk);
      if (chk4) check(rd4 == exp4, "depth-4 FIFO word");
      if (chk1) check(rd1 == exp1, "depth-1 FIFO word");
      check(e4 == (q4.size() == 0) && f4 == (q4.size() == 4), "depth-4 flags");
      check(e1 == (q1.size() == 0) && f1 == (q1.size() == 1), "depth-1 flags");
      rdin = 16'($urandom);
      rw4 = ($urandom % 2) != 0; rr4 = ($urandom % 3) == 0;
      rw1 = ($urandom % 2) != 0; rr1 = ($urandom % 2) != 0;
      if (f4 && rw4) fulls4++;
      if (e4 && rr4) empties4++;
      chk4 = rr4 && q4.size() != 0;
      chk1 = rr1 && q1.size() != 0;
      if (chk4) exp4 = q4.pop_front();
      if (chk1) exp1 = q1.pop_front();
      if (rw4 && !f4) q4.push_back(rdin);
      if (rw1 && !f1) q1.push_back(rdin);
    end
    check(fulls4 > 0 && empties4 > 0, "random test reached full and empty");
    finish(0);
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("ERROR: watchdog expired");
    finish(1);
  end
endmodule
