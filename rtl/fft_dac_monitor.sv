// fft_dac_monitor: shows the real part of one channel's FFT on a 16-bit
// D/A output, with a start/end-of-transform indicator, so the transform can
// be watched on an oscilloscope next to the input signal.
//
// The 512 real parts of the selected channel (mon_ch) are captured as the
// FFT core delivers them, at the processing clock, into one of two 512-word
// buffers.  When a block is complete the buffers swap and the new block is
// played out from bin 0, one bin every DIV clocks, repeating until the next
// block arrives.  With DIV = 400 at 100 MHz a bin lasts 4 us, the 250 kHz
// sample period, so one sweep of the spectrum lasts exactly one 512-sample
// frame.  dac_marker is high while bin 0 (start) or bin N-1 (end) is shown.
//
// Interface and timing: fft_* is the FFT core's output stream with fft_ch
// the channel of the current block; dac_data changes together with a one
// clock dac_strobe pulse.  Nothing is shown (dac_data = 0, marker low)
// until the first block of mon_ch arrived.
// Showing the real part through the D/A with a start/end indicator follows
// the design's single-channel test; the buffering and pacing are this
// implementation's choices.
module fft_dac_monitor #(
  parameter int unsigned CH  = 16,
  parameter int unsigned N   = 512,
  parameter int unsigned W   = 16,
  parameter int unsigned DIV = 400
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [$clog2(CH)-1:0] mon_ch,
  input  logic                  fft_valid,
  input  logic                  fft_sop,
  input  logic                  fft_eop,
  input  logic [W-1:0]          fft_real,
  input  logic [$clog2(CH)-1:0] fft_ch,
  output logic [W-1:0]          dac_data,
  output logic                  dac_strobe,
  output logic                  dac_marker
);
  localparam int unsigned BW = $clog2(N);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0]  buffer [2][N];
  logic          wbuf, pbuf;
  logic [BW-1:0] wbin, pbin;
  logic [DW-1:0] div_cnt;
  logic          playing;
  logic          capture;

  assign capture = fft_valid && (fft_ch == mon_ch);

  always_ff @(posedge clk) begin
    if (capture) buffer[wbuf][fft_sop ? '0 : wbin] <= fft_real;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf       <= 1'b0;
      pbuf       <= 1'b0;
      wbin       <= '0;
      pbin       <= '0;
      div_cnt    <= '0;
      playing    <= 1'b0;
      dac_data   <= '0;
      dac_strobe <= 1'b0;
      dac_marker <= 1'b0;
    end else begin
      dac_strobe <= 1'b0;
      if (capture) wbin <= fft_sop ? BW'(1) : wbin + 1'b1;

      if (capture && fft_eop) begin
        // new block complete: swap buffers and restart the sweep at bin 0
        wbuf    <= ~wbuf;
        pbuf    <= wbuf;
        pbin    <= '0;
        div_cnt <= '0;
        playing <= 1'b1;
      end else if (playing) begin
        if (div_cnt == '0) begin
          dac_data   <= buffer[pbuf][pbin];
          dac_strobe <= 1'b1;
          dac_marker <= (pbin == '0) || (pbin == BW'(N - 1));
          pbin       <= (pbin == BW'(N - 1)) ? '0 : pbin + 1'b1;
        end
        div_cnt <= (div_cnt == DW'(DIV - 1)) ? '0 : div_cnt + 1'b1;
      end
    end
  end

endmodule
