// tb_channel_buffer: self-checking test of one channel's FIFO A / FIFO B
// ping-pong buffer at its full size (512-sample blocks, 1024-word FIFOs).
// A counting sample sequence is written at a slow clock.  Checks: the input
// switch changes FIFO after every 512 samples; block_ready is low before
// the 512th sample of a block and high within a few read clocks after it;
// the reader gets every block complete and in order, with the MUX switching
// FIFO after each block; two blocks may wait in the FIFOs and are still read
// in order; writing far ahead of the reader raises overflow.
module tb_channel_buffer;
  localparam int N = 512, D = 1024, W = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic wr_sel, overflow, block_ready, rd_sel;
  int checks = 0, failures = 0;
  int next_wr = 0, next_rd = 0;

  always #20 wclk = ~wclk;
  always #5  rclk = ~rclk;

  channel_buffer #(.N(N), .DEPTH(D), .W(W)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_block();
    for (int i = 0; i < N; i++) begin
      @(negedge wclk);
      check(wr_sel == 1'((next_wr / N) % 2), $sformatf("wr_sel at sample %0d", next_wr));
      wr_en = 1; wr_data = W'(next_wr);
      next_wr++;
    end
    @(negedge wclk);
    wr_en = 0;
  endtask

  // reads one block: rd_en decided at the falling edge, word checked at the next
  task automatic read_block();
    logic sel0;
    @(negedge rclk);
    check(block_ready, "block_ready before reading a block");
    sel0 = rd_sel;
    check(rd_sel == 1'((next_rd / N) % 2), "MUX selects the FIFO of the oldest block");
    for (int i = 0; i <= N; i++) begin
      if (i > 0) begin
        check(rd_data == W'(next_rd), $sformatf("read %0d expected %0d", rd_data, next_rd));
        next_rd++;
      end
      rd_en = (i < N);
      @(negedge rclk);
    end
    rd_en = 0;
    check(rd_data == W'(next_rd - 1), "last word holds");
    check(rd_sel == ~sel0, "MUX switches after a block");
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    check(!block_ready, "not ready after reset");
    // block 0: ready only once complete
    for (int i = 0; i < N - 1; i++) begin
      @(negedge wclk); wr_en = 1; wr_data = W'(next_wr); next_wr++;
    end
    @(negedge wclk); wr_en = 0;
    repeat (10) @(posedge rclk);
    check(!block_ready, "not ready with N-1 samples");
    @(negedge wclk); wr_en = 1; wr_data = W'(next_wr); next_wr++;
    @(negedge wclk); wr_en = 0;
    repeat (4) @(posedge rclk);
    check(block_ready, "ready within 4 read clocks of the last sample");
    read_block();                // block 0 from FIFO A
    repeat (5) @(posedge rclk);
    check(!block_ready, "not ready after the block was read");
    // blocks 1 and 2 wait together, then are read
    fork
      begin write_block(); write_block(); end
    join
    repeat (6) @(posedge rclk);
    read_block();                // block 1 from FIFO B
    read_block();                // block 2 from FIFO A
    // streaming: read each block while the next is written
    for (int b = 0; b < 3; b++) begin
      write_block();
      repeat (6) @(posedge rclk);
      fork
        read_block();
      join_none
    end
    wait fork;
    check(!overflow, "no overflow in normal use");
    // run far ahead of the reader: 5 blocks into 2 x 1024 words
    repeat (5) write_block();
    check(overflow, "overflow when writing far ahead of the reader");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
