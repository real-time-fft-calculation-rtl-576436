// tb_dual_clock_fifo: self-checking test of the dual-clock FIFO at its full
// 1024 x 16 size.  The write clock runs slower than the read clock by a
// non-integer ratio.  Phase 1 writes random words with random gaps while
// the reader takes them at random; every word read is compared with a
// reference queue.  Phase 2 fills the FIFO with the reader stopped, checks
// that full rises after exactly DEPTH words and that one more write raises
// overflow and is dropped, then drains it and checks order and empty.
module tb_dual_clock_fifo;
  localparam int W = 16, D = 1024;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic wfull, rempty, overflow;
  logic [$clog2(D):0] wusedw, rusedw;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #7 wclk = ~wclk;
  always #3 rclk = ~rclk;

  dual_clock_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reader: the read enable is decided at the falling edge; the word it
  // returns is compared at the next falling edge
  bit rd_random = 0, rd_drain = 0;
  always @(negedge rclk) begin
    if (rd_en) begin
      logic [W-1:0] exp;
      exp = q.pop_front();
      check(rdata === exp, $sformatf("read %h expected %h", rdata, exp));
    end
    rd_en = !rempty && (rd_drain || (rd_random && ($urandom_range(0, 3) == 0)));
  end

  task automatic wr(input logic [W-1:0] d);
    @(negedge wclk);
    wr_en = 1; wdata = d;
    if (!wfull) q.push_back(d);
    @(negedge wclk);
    wr_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    check(rempty && wusedw == 0, "empty after reset");
    // phase 1: random traffic
    rd_random = 1;
    for (int i = 0; i < 3000; i++) begin
      wr(W'($urandom));
      if ($urandom_range(0, 2) == 0) @(negedge wclk);
    end
    rd_random = 0;
    rd_drain  = 1;
    wait (q.size() == 0);
    repeat (20) @(posedge rclk);
    rd_drain = 0;
    repeat (10) @(posedge wclk);
    check(rempty, "empty after drain");
    check(wusedw == 0, "write side sees empty");
    // phase 2: fill to full
    for (int i = 0; i < D; i++) wr(W'(i * 37));
    repeat (2) @(posedge wclk);
    check(wfull, "full after DEPTH words");
    check(!overflow, "no overflow yet");
    repeat (10) @(posedge rclk);
    check(rusedw == D, "read side sees DEPTH words");
    wr(16'hDEAD);           // dropped
    repeat (2) @(posedge wclk);
    check(overflow, "overflow after write into full FIFO");
    rd_drain = 1;
    wait (q.size() == 0);
    repeat (20) @(posedge rclk);
    check(rempty, "empty after second drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
