// tb_single_channel_dac: the single-channel bench test in simulation.
// A 20 kHz sine wave drives channel 1 (index 0) of the full-size design,
// the other channels are zero, and the D/A monitor shows channel 1.  The
// FFT core is the behavioural model, the host reads every frame at full
// rate.  The testbench computes its own DFT of the first frame's samples,
// and the block exponent the core must have applied.  It checks every bin
// the D/A shows in the first sweep against that reference (within one
// least significant bit after scaling).  It checks the start/end indicator
// on bins 0 and 511 only, one D/A update every 400 clocks (4 us, the sample
// period), and the shape of the spectrum near 20 kHz (250 kHz / 512 per
// bin): the real part swings from a positive to a negative extreme across
// bins 40..42, because 20 kHz falls between bins 40 and 41.
module tb_single_channel_dac;
  import rtfft_pkg::*;
  localparam int CH = CHANNELS, N = FFT_N;
  localparam realtime T_WR = 4000ns, T_RD = 10ns;
  localparam real PI = 3.14159265358979323846;

  logic clk_wr = 0, clk_rd = 0, arst_n = 0;
  logic adc_valid = 0;
  logic [15:0] adc_data [CH];
  logic fifo_overflow;
  logic sink_valid, sink_sop, sink_eop, sink_ready;
  logic [15:0] sink_real, sink_imag;
  logic source_valid, source_sop, source_eop;
  logic [15:0] source_real, source_imag;
  logic [5:0] source_exp;
  logic pcie_valid, pcie_last, pcie_bank, pcie_ready = 1;
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

  fft512_model #(.N(N), .LAT(600), .STALL(0)) u_fft (
    .clk(clk_rd), .rst_n(arst_n),
    .sink_valid, .sink_sop, .sink_eop,
    .sink_real(signed'(sink_real)), .sink_imag(signed'(sink_imag)), .sink_ready,
    .source_valid, .source_sop, .source_eop, .source_real, .source_imag, .source_exp
  );

  initial begin
    #12ms;
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

  // ADC: 20 kHz sine on channel index 0
  int   n_samples = 0;
  real  x0 [N];
  always @(negedge clk_wr) begin
    if (adc_valid) n_samples++;
    adc_valid = arst_n && dut.wrst_n;
    for (int c = 0; c < CH; c++) adc_data[c] = '0;
    if (adc_valid) begin
      int v;
      v = $rtoi(12000.0 * $sin(2.0 * PI * 20.0e3 * n_samples / 250.0e3));
      adc_data[0] = 16'(v);
      if (n_samples < N) x0[n_samples] = real'(v);
    end
  end

  // reference real part and block scale of the first frame, channel 0
  real ref_re [N];
  real ref_scale;
  task automatic reference();
    real mx;
    mx = 0.0;
    for (int k = 0; k < N; k++) begin
      real re, im;
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += x0[n] * $cos(2.0 * PI * k * n / N);
        im -= x0[n] * $sin(2.0 * PI * k * n / N);
      end
      ref_re[k] = re;
      if (re > mx) mx = re;
      if (-re > mx) mx = -re;
      if (im > mx) mx = im;
      if (-im > mx) mx = -im;
    end
    ref_scale = 1.0;
    while (mx * ref_scale > 32767.0) ref_scale = ref_scale / 2.0;
  endtask

  // D/A observer: first sweep after the first block
  int   bin = -1, last_t = 0, cyc = 0, n_strobe = 0;
  real  shown [N];
  always @(posedge clk_rd) cyc <= cyc + 1;
  always @(negedge clk_rd) begin
    if (dac_strobe && bin < N) begin
      if (bin < 0) bin = 0;
      if (bin > 0) check(cyc - last_t == 400, $sformatf("D/A update after %0d clocks", cyc - last_t));
      last_t = cyc;
      shown[bin] = real'($signed(dac_data));
      check(dac_marker == (bin == 0 || bin == N - 1), $sformatf("indicator at bin %0d", bin));
      bin++;
      n_strobe++;
    end
  end

  initial begin
    for (int c = 0; c < CH; c++) adc_data[c] = '0;
    #(3 * T_WR);
    arst_n = 1;
    wait (n_samples >= N);
    reference();
    wait (bin == N);
    for (int k = 0; k < N; k++) begin
      real want;
      want = ref_re[k] * ref_scale;
      check(shown[k] - want <= 1.0 && want - shown[k] <= 1.0,
            $sformatf("bin %0d shows %0.1f, reference %0.1f", k, shown[k], want));
    end
    // leakage shape around 20 kHz
    begin
      int kmax = 1, kmin = 1;
      for (int k = 1; k < N / 2; k++) begin
        if (shown[k] > shown[kmax]) kmax = k;
        if (shown[k] < shown[kmin]) kmin = k;
      end
      check(kmax >= 39 && kmax <= 42 && kmin >= 40 && kmin <= 43 && kmin > kmax,
            $sformatf("real part: maximum at bin %0d, minimum at bin %0d", kmax, kmin));
      check(shown[N - kmax] - shown[kmax] <= 1.0 && shown[kmax] - shown[N - kmax] <= 1.0,
            "real part is symmetric (real input)");
    end
    check(!fifo_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
