// tb_kstar_fft_top: end-to-end test of the whole acquisition path at the
// design's full size (16 channels, 250 kHz sampling, 512-point FFT,
// 1024-word FIFOs, 16384 x 32 bit result RAMs, 100 MHz processing clock),
// with a behavioural streaming FFT core and a model host on the read-out
// side.  The top keeps all its default parameters.
//
// Stimulus: channels 1, 3, ..., 15 (indices 0, 2, ...) carry a 20 kHz sine
// wave with a DC offset and noise, the even-numbered channels are zero.
// The host is off at first, so two frames fill both RAMs and the third must
// wait in the FIFOs; then it reads with random stalls; at the end it stops
// for good so the FIFOs overflow.
//
// Checks: every word the host reads (raw sample or FFT result) is the value
// that went into the design for that address, frames arrive in order from
// alternating RAMs, with the block exponents of their transforms; a frame is
// sent to the FFT within 100 ns of its last sample when a RAM is free, and
// its 8192 samples are streamed in well under one frame period; the 20 kHz
// input gives its spectral peak at bin 41; the D/A monitor sweeps with
// start/end markers.  Each mechanism (FIFO A/B switch, RAM 1/2 switch,
// FFT sink stall, host stall, frame waiting for a RAM, FIFO overflow,
// each RAM cycle) is counted, and one that never happened is a failure.
module tb_kstar_fft_top;
  import rtfft_pkg::*;
  localparam int CH = CHANNELS, N = FFT_N, HALF = CH * N, D = RAM_DEPTH, MAXF = 16;
  localparam realtime T_WR = 4000ns, T_RD = 10ns;

  logic clk_wr = 0, clk_rd = 0, arst_n = 0;
  logic adc_valid = 0;
  logic [15:0] adc_data [CH];
  logic fifo_overflow;
  logic sink_valid, sink_sop, sink_eop, sink_ready;
  logic [15:0] sink_real, sink_imag;
  logic source_valid, source_sop, source_eop;
  logic [15:0] source_real, source_imag;
  logic [5:0] source_exp;
  logic pcie_valid, pcie_last, pcie_bank, pcie_ready = 0;
  logic [31:0] pcie_data;
  logic [13:0] pcie_addr;
  logic [5:0] pcie_exp [CH];
  logic [3:0] mon_ch = 4'd0;
  logic [15:0] dac_data;
  logic dac_strobe, dac_marker;
  logic frame_busy, frame_wait;
  logic [1:0] ram_state [2];
  logic [13:0] fft_ram0_wr_address, fft_ram1_wr_address;

  int checks = 0, failures = 0;

  always #(T_WR / 2) clk_wr = ~clk_wr;
  always #(T_RD / 2) clk_rd = ~clk_rd;

  kstar_fft_top dut (.*);

  fft512_model #(.N(N), .LAT(600), .STALL(1)) u_fft (
    .clk(clk_rd), .rst_n(arst_n),
    .sink_valid, .sink_sop, .sink_eop,
    .sink_real(signed'(sink_real)), .sink_imag(signed'(sink_imag)), .sink_ready,
    .source_valid, .source_sop, .source_eop, .source_real, .source_imag, .source_exp
  );

  initial begin
    #40ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference records ----------------
  logic [15:0] raw_mem [MAXF][HALF];
  logic [31:0] fft_mem [MAXF][HALF];
  logic [5:0]  exp_mem [MAXF][CH];
  int n_samples = 0;     // samples written per channel
  int n_fft = 0;         // FFT results seen
  realtime t_sample_done [MAXF];

  // ADC: one sample per channel per sample clock
  always @(negedge clk_wr) begin
    if (adc_valid) n_samples++;
    adc_valid = arst_n && dut.wrst_n;
    if (adc_valid) begin
      int f, s;
      f = n_samples / N;
      s = n_samples % N;
      for (int c = 0; c < CH; c++) begin
        int v;
        if (c % 2 == 0)
          v = $rtoi((3000.0 + 400.0 * c) * $sin(2.0 * 3.14159265358979 * 20.0e3 * n_samples / 250.0e3))
              + 500 + $signed($urandom_range(0, 200)) - 100;
        else
          v = 0;
        adc_data[c] = 16'(v);
        if (f < MAXF) raw_mem[f][c * N + s] = 16'(v);
      end
    end
  end

  always @(posedge clk_wr) begin
    if (adc_valid && n_samples % N == N - 1 && n_samples / N < MAXF)
      t_sample_done[n_samples / N] = $realtime;
  end

  // FFT results as the core delivers them
  always @(posedge clk_rd) begin
    if (source_valid) begin
      int f, i;
      f = n_fft / HALF;
      i = n_fft % HALF;
      if (f < MAXF) begin
        fft_mem[f][i] = {source_real, source_imag};
        if (source_eop) exp_mem[f][i / N] = source_exp;
      end
      n_fft++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_fifo_switch = 0, n_sink_stall = 0, n_host_stall = 0, n_wait = 0;
  int n_state [4];
  int n_bank_frames [2];
  int n_markers = 0, n_frames_in = 0;
  logic wsel_q = 0;
  realtime t_busy_rise;
  int busy_cycles = 0;

  always @(posedge clk_wr) begin
    if (dut.g_ch[0].u_buf.wr_sel != wsel_q) n_fifo_switch++;
    wsel_q <= dut.g_ch[0].u_buf.wr_sel;
  end

  logic busy_q = 0;
  always @(posedge clk_rd) begin
    if (sink_valid && !sink_ready) n_sink_stall++;
    if (pcie_valid && !pcie_ready) n_host_stall++;
    if (frame_wait) n_wait++;
    if (dac_strobe && dac_marker) n_markers++;
    for (int b = 0; b < 2; b++) n_state[ram_state[b]]++;
    busy_q <= frame_busy;
    if (frame_busy) busy_cycles++;
    if (frame_busy && !busy_q) begin
      // a new frame starts: if a RAM was free, it starts right after its last sample
      if (n_frames_in < MAXF && n_wait == 0)
        check($realtime - t_sample_done[n_frames_in] <= 100ns,
              $sformatf("frame %0d started %0t after its last sample", n_frames_in,
                        $realtime - t_sample_done[n_frames_in]));
      busy_cycles = 1;
    end
    if (!frame_busy && busy_q) begin
      check(busy_cycles < 12000, $sformatf("frame %0d streamed in %0d clocks", n_frames_in, busy_cycles));
      n_frames_in++;
    end
  end

  // ---------------- model host ----------------
  bit host_on = 0;
  int rd_frame = 0, rd_idx = 0;

  always @(negedge clk_rd) begin
    pcie_ready = host_on && ($urandom_range(0, 3) != 0);
    if (pcie_valid && pcie_ready) begin
      logic [31:0] exp;
      if (rd_idx == 0) begin
        n_bank_frames[pcie_bank]++;
        check(pcie_bank == 1'(rd_frame % 2), $sformatf("frame %0d from RAM %0d", rd_frame, pcie_bank));
        for (int c = 0; c < CH; c++)
          check(pcie_exp[c] == exp_mem[rd_frame][c], $sformatf("frame %0d exponent of channel %0d", rd_frame, c));
      end
      exp = (rd_idx < HALF) ? 32'(signed'(raw_mem[rd_frame][rd_idx])) : fft_mem[rd_frame][rd_idx - HALF];
      check(pcie_addr == 14'(rd_idx), $sformatf("address %0d expected %0d", pcie_addr, rd_idx));
      check(pcie_data == exp, $sformatf("frame %0d word %0d: %h expected %h", rd_frame, rd_idx, pcie_data, exp));
      check(pcie_last == (rd_idx == D - 1), "pcie_last");
      if (rd_idx == D - 1) begin
        rd_idx = 0;
        rd_frame++;
      end else rd_idx++;
    end
  end

  // spectrum of the first frame, channel index 0: peak of |X| over bins 1..255
  task automatic check_spectrum();
    int best = 1;
    real bmag = 0.0;
    for (int k = 1; k < N / 2; k++) begin
      real re, im, m;
      re = real'($signed(fft_mem[0][k][31:16]));
      im = real'($signed(fft_mem[0][k][15:0]));
      m = re * re + im * im;
      if (m > bmag) begin bmag = m; best = k; end
    end
    check(best == 41, $sformatf("20 kHz peak at bin %0d, expected 41", best));
  endtask

  initial begin
    for (int c = 0; c < CH; c++) adc_data[c] = '0;
    for (int s = 0; s < 4; s++) n_state[s] = 0;
    n_bank_frames[0] = 0; n_bank_frames[1] = 0;
    #(3 * T_WR);
    arst_n = 1;
    // host off: frames 0 and 1 fill both RAMs, frame 2 waits in the FIFOs
    wait (n_samples >= 3 * N + N / 2);
    check(frame_wait, "frame 2 waits for a free RAM");
    check(ram_state[0] == 2'(BANK_READOUT) && ram_state[1] == 2'(BANK_READOUT), "both RAMs wait for the host");
    check(!fifo_overflow, "no overflow while one frame waits");
    check_spectrum();
    host_on = 1;
    wait (rd_frame == 7);
    check(!fifo_overflow, "no overflow with the host reading");
    check(n_frames_in >= 7, "frames keep flowing");
    // host stops: frames pile up until the FIFOs overflow
    host_on = 0;
    wait (fifo_overflow);
    check(fifo_overflow, "FIFO overflow when the host stops reading");
    repeat (100) @(posedge clk_rd);
    check(n_markers > 0, "D/A monitor showed start/end markers");
    check(n_fifo_switch > 0, "FIFO A/B switch happened");
    check(n_bank_frames[0] > 0 && n_bank_frames[1] > 0, "frames read from both RAMs");
    check(n_sink_stall > 0, "FFT sink stalled the stream");
    check(n_host_stall > 0, "host stalled the read-out");
    check(n_wait > 0, "a frame waited for a RAM");
    for (int s = 0; s < 4; s++) check(n_state[s] > 0, $sformatf("RAM state %0d seen", s));
    $display("mechanisms: fifo_switch=%0d sink_stall=%0d host_stall=%0d frame_wait=%0d markers=%0d",
             n_fifo_switch, n_sink_stall, n_host_stall, n_wait, n_markers);
    $display("RAM cycles (clocks x RAMs): free=%0d raw=%0d fft=%0d readout=%0d; frames read=%0d (RAM1 %0d, RAM2 %0d)",
             n_state[0], n_state[1], n_state[2], n_state[3], rd_frame, n_bank_frames[0], n_bank_frames[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
