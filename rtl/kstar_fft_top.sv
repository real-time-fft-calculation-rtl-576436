// kstar_fft_top: real-time 16-channel FFT data path of an FPGA PCIe
// acquisition card for magnetohydrodynamic (MHD) mode analysis.
//
// Sixteen 16-bit analog channels are sampled at 250 kHz.  Every 512 samples
// (2.048 ms) each channel has a new block; all 16 blocks are transformed by a
// single 512-point streaming FFT core running at 100 MHz, and the frame of
// raw samples plus FFT results is handed to the real-time computer over PCI
// Express.  The path is:
//
//   adc_data[c] -> channel_buffer[c]  (FIFO A / FIFO B ping-pong, dual clock)
//               -> parallel_to_serial (channel 0 .. 15, 512 samples each)
//               -> sink_* ports       (to the FFT core, outside this module)
//   source_*    -> result_pingpong    (RAM 1 / RAM 2, 16384 x 32 bit each)
//               -> pcie_* stream      (to the PCI Express DMA, outside)
//   source_*    -> fft_dac_monitor    (one channel's real part to a D/A)
//
// The FFT core, the ADC interface and the PCI Express endpoint are vendor
// parts of the card and are not in this module; their signals are ports.
//
// Clocks: clk_wr is the 250 kHz sample clock (adc_valid qualifies each
// edge), clk_rd the 100 MHz processing clock; everything after the FIFOs runs
// on clk_rd.  arst_n is an asynchronous active-low reset, synchronised to
// each clock inside.
//
// Flow control: a frame is sent to the FFT only when every channel holds a
// complete block and the next result RAM is free (frame_wait is high while a
// frame waits for a RAM).  The FFT core's sink_ready stalls the stream; the
// FFT output stream and the raw write are never stalled.  A frame waits in
// the 1024-word FIFOs, which have room for one more block; if the host reads
// out so slowly that even that is used up, samples are dropped and
// fifo_overflow (clk_wr domain, sticky) rises.
//
// Raw words sit at RAM addresses 0..8191 (channel c sample s at c*512+s,
// sign-extended), FFT words at 8192..16383 ({real, imag}, same order);
// pcie_exp[c] is the block exponent of channel c's transform in the RAM being
// read out.
module kstar_fft_top
  import rtfft_pkg::*;
#(
  parameter int unsigned CH      = CHANNELS,
  parameter int unsigned N       = FFT_N,
  parameter int unsigned FDEPTH  = FIFO_DEPTH,
  parameter int unsigned RDEPTH  = RAM_DEPTH,
  parameter int unsigned DAC_DIV = 400
) (
  input  logic                       clk_wr,
  input  logic                       clk_rd,
  input  logic                       arst_n,
  // analog inputs (sample clock domain)
  input  logic                       adc_valid,
  input  logic [SAMPLE_W-1:0]        adc_data [CH],
  output logic                       fifo_overflow,
  // FFT core sink
  output logic                       sink_valid,
  output logic                       sink_sop,
  output logic                       sink_eop,
  output logic [SAMPLE_W-1:0]        sink_real,
  output logic [SAMPLE_W-1:0]        sink_imag,
  input  logic                       sink_ready,
  // FFT core source
  input  logic                       source_valid,
  input  logic                       source_sop,
  input  logic                       source_eop,
  input  logic [SAMPLE_W-1:0]        source_real,
  input  logic [SAMPLE_W-1:0]        source_imag,
  input  logic [EXP_W-1:0]           source_exp,
  // read-out stream towards PCI Express
  output logic                       pcie_valid,
  output logic [RAM_W-1:0]           pcie_data,
  output logic [$clog2(RDEPTH)-1:0]  pcie_addr,
  output logic                       pcie_last,
  output logic                       pcie_bank,
  output logic [EXP_W-1:0]           pcie_exp [CH],
  input  logic                       pcie_ready,
  // D/A monitor
  input  logic [$clog2(CH)-1:0]      mon_ch,
  output logic [SAMPLE_W-1:0]        dac_data,
  output logic                       dac_strobe,
  output logic                       dac_marker,
  // status
  output logic                       frame_busy,
  output logic                       frame_wait,
  output logic [1:0]                 ram_state [2],
  output logic [$clog2(RDEPTH)-1:0]  fft_ram0_wr_address,
  output logic [$clog2(RDEPTH)-1:0]  fft_ram1_wr_address
);
  logic wrst_n, rrst_n;

  reset_sync u_wrst (.clk(clk_wr), .arst_n(arst_n), .rst_n(wrst_n));
  reset_sync u_rrst (.clk(clk_rd), .arst_n(arst_n), .rst_n(rrst_n));

  // ---------------- input buffers ----------------
  logic [CH-1:0]       ch_ready, ch_rd_en, ch_ovf;
  logic [SAMPLE_W-1:0] ch_q [CH];

  for (genvar c = 0; c < CH; c++) begin : g_ch
    channel_buffer #(.N(N), .DEPTH(FDEPTH), .W(SAMPLE_W)) u_buf (
      .wclk       (clk_wr),
      .wrst_n     (wrst_n),
      .wr_en      (adc_valid),
      .wr_data    (adc_data[c]),
      .wr_sel     (),
      .overflow   (ch_ovf[c]),
      .rclk       (clk_rd),
      .rrst_n     (rrst_n),
      .block_ready(ch_ready[c]),
      .rd_en      (ch_rd_en[c]),
      .rd_data    (ch_q[c]),
      .rd_sel     ()
    );
  end

  assign fifo_overflow = |ch_ovf;

  // ---------------- parallel to serial ----------------
  logic                   bank_avail;

  parallel_to_serial #(.CH(CH), .N(N), .W(SAMPLE_W)) u_p2s (
    .clk        (clk_rd),
    .rst_n      (rrst_n),
    .ch_ready   (ch_ready),
    .ch_rd_en   (ch_rd_en),
    .ch_rd_data (ch_q),
    .frame_go   (bank_avail),
    .frame_start(),
    .frame_busy (frame_busy),
    .out_valid  (sink_valid),
    .out_sop    (sink_sop),
    .out_eop    (sink_eop),
    .out_data   (sink_real),
    .out_ch     (),
    .out_ready  (sink_ready)
  );

  assign sink_imag  = '0;
  assign frame_wait = !frame_busy && (&ch_ready) && !bank_avail;

  // ---------------- result RAMs ----------------
  logic [$clog2(CH)-1:0] fft_ch;
  bank_state_t           bstate [2];
  logic [$clog2(RDEPTH)-1:0] wr_address [2];

  result_pingpong #(
    .CH(CH), .N(N), .DEPTH(RDEPTH), .W(RAM_W), .SW(SAMPLE_W), .XW(EXP_W)
  ) u_ram (
    .clk       (clk_rd),
    .rst_n     (rrst_n),
    .raw_valid (sink_valid && sink_ready),
    .raw_data  (sink_real),
    .bank_avail(bank_avail),
    .fft_valid (source_valid),
    .fft_eop   (source_eop),
    .fft_real  (source_real),
    .fft_imag  (source_imag),
    .fft_exp   (source_exp),
    .fft_ch    (fft_ch),
    .rd_valid  (pcie_valid),
    .rd_data   (pcie_data),
    .rd_addr   (pcie_addr),
    .rd_last   (pcie_last),
    .rd_bank   (pcie_bank),
    .rd_exp    (pcie_exp),
    .rd_ready  (pcie_ready),
    .bank_state(bstate),
    .wr_address(wr_address)
  );

  assign ram_state[0]        = bstate[0];
  assign ram_state[1]        = bstate[1];
  assign fft_ram0_wr_address = wr_address[0];
  assign fft_ram1_wr_address = wr_address[1];

  // ---------------- D/A monitor ----------------
  fft_dac_monitor #(.CH(CH), .N(N), .W(SAMPLE_W), .DIV(DAC_DIV)) u_dac (
    .clk       (clk_rd),
    .rst_n     (rrst_n),
    .mon_ch    (mon_ch),
    .fft_valid (source_valid),
    .fft_sop   (source_sop),
    .fft_eop   (source_eop),
    .fft_real  (source_real),
    .fft_ch    (fft_ch),
    .dac_data  (dac_data),
    .dac_strobe(dac_strobe),
    .dac_marker(dac_marker)
  );

endmodule
