// tb_result_pingpong: self-checking test of the two ping-pong result RAMs
// at full size (16 channels x 512 points, 16384 x 32 bit per RAM).
// Frames are sent as a raw stream of 8192 samples and, overlapping it, an
// FFT stream of 8192 results that starts FFT_LAT clocks after the first
// raw sample, as from a streaming FFT core.  A model host reads the
// read-out stream.  Checks: every word read matches the raw/FFT value
// written to its address (raw sign-extended, FFT {real, imag}); addresses
// run 0..16383; frames come out in order from alternating RAMs; the block
// exponents are reported per channel; a RAM goes through RAW, FFT and
// READOUT and back to FREE; bank_avail is low while both RAMs wait for the
// host; with the host always ready a frame is read out in 16384 clocks and
// the first word follows the last FFT result within 3 clocks.
module tb_result_pingpong;
  import rtfft_pkg::*;
  localparam int CH = 16, N = 512, D = 16384, HALF = CH * N, FFT_LAT = 700;
  logic clk = 0, rst_n = 0;
  logic raw_valid = 0, fft_valid = 0, fft_eop = 0, rd_ready = 0;
  logic [15:0] raw_data = '0, fft_real = '0, fft_imag = '0;
  logic [5:0]  fft_exp = '0;
  logic [3:0]  fft_ch;
  logic bank_avail, rd_valid, rd_last, rd_bank;
  logic [31:0] rd_data;
  logic [13:0] rd_addr;
  logic [5:0]  rd_exp [CH];
  bank_state_t bank_state [2];
  logic [13:0] wr_address [2];
  int checks = 0, failures = 0;
  int rd_frame = 0, rd_idx = 0, cyc = 0, t_fft_last = 0, t_rd_first = 0, t_rd_last = 0;
  bit host_random = 0, host_on = 0;
  int seen [4];

  always #5 clk = ~clk;

  result_pingpong #(.CH(CH), .N(N), .DEPTH(D)) dut (.*);

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

  function automatic logic [15:0] raw_val(int k, int i);  return 16'(k * 7919 + i * 31 + 32000); endfunction
  function automatic logic [15:0] re_val(int k, int i);   return 16'(k * 13 + i * 3 + 5); endfunction
  function automatic logic [15:0] im_val(int k, int i);   return ~16'(k * 5 + i); endfunction
  function automatic logic [5:0]  exp_val(int k, int c);  return 6'(k + 3 * c); endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int b = 0; b < 2; b++) seen[bank_state[b]]++;
  end

  task automatic send_frame(int k);
    fork
      begin
        for (int i = 0; i < HALF; i++) begin
          @(negedge clk); raw_valid = 1; raw_data = raw_val(k, i);
        end
        @(negedge clk); raw_valid = 0;
      end
      begin
        repeat (FFT_LAT) @(negedge clk);
        for (int i = 0; i < HALF; i++) begin
          @(negedge clk);
          fft_valid = 1; fft_real = re_val(k, i); fft_imag = im_val(k, i);
          fft_eop = (i % N == N - 1); fft_exp = exp_val(k, i / N);
        end
        t_fft_last = cyc;
        @(negedge clk); fft_valid = 0; fft_eop = 0;
      end
    join
  endtask

  // model host: rd_ready is set at the falling edge, and a beat with
  // rd_valid and rd_ready is the one taken at the next rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      rd_ready = host_on && (!host_random || $urandom_range(0, 3) != 0);
      if (rd_valid && rd_ready) begin
        logic [31:0] exp;
        if (rd_idx == 0) begin
          t_rd_first = cyc;
          check(rd_bank == 1'(rd_frame % 2), $sformatf("frame %0d read from RAM %0d", rd_frame, rd_bank));
          for (int c = 0; c < CH; c++)
            check(rd_exp[c] == exp_val(rd_frame, c), $sformatf("exponent of channel %0d", c));
        end
        exp = (rd_idx < HALF) ? 32'(signed'(raw_val(rd_frame, rd_idx)))
                              : {re_val(rd_frame, rd_idx - HALF), im_val(rd_frame, rd_idx - HALF)};
        check(rd_addr == 14'(rd_idx), $sformatf("address %0d expected %0d", rd_addr, rd_idx));
        check(rd_data == exp, $sformatf("frame %0d word %0d: %h expected %h", rd_frame, rd_idx, rd_data, exp));
        check(rd_last == (rd_idx == D - 1), "rd_last");
        if (rd_idx == D - 1) begin
          t_rd_last = cyc;
          rd_idx = 0;
          rd_frame++;
        end else rd_idx++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bank_avail, "a RAM is free after reset");
    // frames 0 and 1 with the host not reading
    send_frame(0);
    check(bank_state[0] == BANK_READOUT, "RAM 1 waits for read-out");
    check(bank_avail, "RAM 2 free for the next frame");
    send_frame(1);
    repeat (3) @(negedge clk);
    check(!bank_avail, "no RAM free while both wait for the host");
    // host reads with random stalls
    host_on = 1; host_random = 1;
    wait (rd_frame == 1);
    @(negedge clk);
    check(bank_avail && bank_state[0] == BANK_FREE, "RAM 1 free after read-out");
    send_frame(2);
    wait (rd_frame == 3);
    // host always ready: timing of frame 3
    host_random = 0;
    send_frame(3);
    wait (rd_frame == 4);
    check(t_rd_first - t_fft_last <= 3 && t_rd_first > t_fft_last,
          $sformatf("first word %0d clocks after the last FFT result", t_rd_first - t_fft_last));
    check(t_rd_last - t_rd_first == D - 1, $sformatf("read-out took %0d clocks", t_rd_last - t_rd_first + 1));
    for (int s = 0; s < 4; s++) check(seen[s] > 0, $sformatf("state %0d never seen", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
