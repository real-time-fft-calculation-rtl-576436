// tb_fft_dac_monitor: self-checking test of the D/A monitor at full size
// (16 channels, 512 bins, one bin every 400 clocks).
// FFT output blocks of all 16 channels are streamed in, as from the FFT
// core; the monitor selects channel 5.  Checks: nothing is shown before the
// first block of the selected channel; after it, the D/A shows bin 0, 1, ...
// of that channel's real parts, one every DIV clocks; the indicator is high
// exactly on bins 0 and N-1; after bin N-1 the sweep starts again at bin 0;
// a new block restarts the sweep with the new values.
module tb_fft_dac_monitor;
  localparam int CH = 16, N = 512, W = 16, DIV = 400, MON = 5;
  logic clk = 0, rst_n = 0;
  logic [3:0] mon_ch = 4'(MON), fft_ch = '0;
  logic fft_valid = 0, fft_sop = 0, fft_eop = 0;
  logic [W-1:0] fft_real = '0, dac_data;
  logic dac_strobe, dac_marker;
  int checks = 0, failures = 0;
  int cyc = 0, last_strobe = -1, strobes = 0, exp_bin = 0, frame = 0;
  bit expect_on = 0;

  always #5 clk = ~clk;

  fft_dac_monitor #(.CH(CH), .N(N), .W(W), .DIV(DIV)) dut (.*);

  initial begin
    #30_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] val(int f, int c, int b);
    return W'(f * 4099 + c * 211 + b * 7);
  endfunction

  task automatic send_blocks(int f);
    for (int c = 0; c < CH; c++)
      for (int b = 0; b < N; b++) begin
        @(negedge clk);
        fft_valid = 1; fft_ch = 4'(c); fft_sop = (b == 0); fft_eop = (b == N - 1);
        fft_real = val(f, c, b);
      end
    @(negedge clk);
    fft_valid = 0; fft_sop = 0; fft_eop = 0;
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && dac_strobe) begin
      check(expect_on, "no D/A update before a block of the selected channel");
      if (last_strobe >= 0 && exp_bin != 0)
        check(cyc - last_strobe == DIV, $sformatf("bin period %0d clocks", cyc - last_strobe));
      check(dac_data == val(frame, MON, exp_bin), $sformatf("bin %0d shows %0d expected %0d", exp_bin, dac_data, val(frame, MON, exp_bin)));
      check(dac_marker == (exp_bin == 0 || exp_bin == N - 1), $sformatf("marker at bin %0d", exp_bin));
      last_strobe = cyc;
      strobes++;
      exp_bin = (exp_bin + 1) % N;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    check(strobes == 0 && dac_data == 0 && !dac_marker, "quiet before the first block");
    // frame 0: all channels; the sweep starts with the selected channel's eop
    fork
      send_blocks(0);
      begin
        wait (fft_valid && fft_eop && fft_ch == 4'(MON));
        @(negedge clk);
        expect_on = 1; exp_bin = 0; frame = 0; last_strobe = -1;
      end
    join
    // let it sweep more than once
    wait (strobes >= N + 20);
    // frame 1 restarts the sweep
    fork
      send_blocks(1);
      begin
        wait (fft_valid && fft_eop && fft_ch == 4'(MON));
        @(negedge clk);
        exp_bin = 0; frame = 1; last_strobe = -1;
      end
    join
    wait (strobes >= N + 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
