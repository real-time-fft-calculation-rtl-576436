// tb_parallel_to_serial: self-checking test of the 16-channel parallel to
// serial converter at its full size (16 channels x 512 samples).
// The channel buffers are modelled: channel c returns c*1000 + k for its
// k-th read, one clock after the read, held until the next read.  Checks:
// nothing is read until every channel is ready and frame_go is high; the
// stream carries channel 0..15 in order with 512 samples each and sop/eop
// on the first/last sample of each block; with the sink always ready a
// frame takes exactly 16*512 clocks from the first read to the last beat;
// with a randomly stalling sink no beat is lost, repeated or changed.
module tb_parallel_to_serial;
  localparam int CH = 16, N = 512, W = 16;
  logic clk = 0, rst_n = 0;
  logic [CH-1:0] ch_ready = '0, ch_rd_en;
  logic [W-1:0]  ch_rd_data [CH];
  logic frame_go = 0, frame_start, frame_busy;
  logic out_valid, out_sop, out_eop, out_ready = 1;
  logic signed [W-1:0] out_data;
  logic [$clog2(CH)-1:0] out_ch;
  int checks = 0, failures = 0;
  int rd_count [CH];
  int exp_ch = 0, exp_s = 0, beats = 0;
  bit random_ready = 0;
  int t_start = 0, t_last = 0, cyc = 0;

  always #5 clk = ~clk;

  parallel_to_serial #(.CH(CH), .N(N), .W(W)) dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // channel buffer models
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < CH; c++)
      if (rst_n && ch_rd_en[c]) begin
        ch_rd_data[c] <= W'(c * 1000 + rd_count[c] % N);
        rd_count[c]   <= rd_count[c] + 1;
      end
    if (frame_start) t_start <= cyc;
  end

  // stream checker: out_ready is set at the falling edge, and a beat with
  // out_valid and out_ready is the one taken at the next rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (random_ready) out_ready = ($urandom_range(0, 2) != 0);
      else out_ready = 1;
      check($onehot0(ch_rd_en), "at most one channel read per clock");
      if (out_valid && out_ready) begin
        check(out_ch == $clog2(CH)'(exp_ch), $sformatf("channel %0d expected %0d", out_ch, exp_ch));
        check(out_data == W'(exp_ch * 1000 + exp_s), $sformatf("data %0d expected %0d", out_data, exp_ch * 1000 + exp_s));
        check(out_sop == (exp_s == 0), "sop");
        check(out_eop == (exp_s == N - 1), "eop");
        beats++;
        t_last = cyc;
        if (exp_s == N - 1) begin
          exp_s = 0;
          exp_ch = (exp_ch + 1) % CH;
        end else exp_s++;
      end
    end
  end

  initial begin
    for (int c = 0; c < CH; c++) begin rd_count[c] = 0; ch_rd_data[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not all channels ready: nothing happens
    @(negedge clk);
    ch_ready = 16'h7FFF; frame_go = 1;
    repeat (20) @(negedge clk);
    check(!frame_busy && ch_rd_en == '0, "no read while a channel is not ready");
    // all ready but no RAM free: nothing happens
    ch_ready = '1; frame_go = 0;
    repeat (20) @(negedge clk);
    check(!frame_busy && ch_rd_en == '0, "no read while frame_go is low");
    // frame 1 at full rate
    frame_go = 1;
    @(negedge clk);
    ch_ready = '0;
    wait (beats == CH * N);
    @(negedge clk);
    check(t_last - t_start == CH * N, $sformatf("frame took %0d clocks, expected %0d", t_last - t_start, CH * N));
    check(!frame_busy, "idle after a frame");
    // frame 2 with a stalling sink
    random_ready = 1;
    ch_ready = '1;
    @(negedge clk);
    ch_ready = '0;
    wait (beats == 2 * CH * N);
    repeat (5) @(negedge clk);
    check(!out_valid && !frame_busy, "idle after the stalled frame");
    for (int c = 0; c < CH; c++) check(rd_count[c] == 2 * N, $sformatf("channel %0d read %0d times", c, rd_count[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
