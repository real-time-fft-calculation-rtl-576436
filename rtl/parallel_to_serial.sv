// parallel_to_serial: 16-channel parallel to single-stream serial converter
// that lets one 512-point FFT core serve all channels.
//
// When every channel buffer holds a complete block (ch_ready all high) and
// the result RAM side can take a new frame (frame_go), the converter reads
// channel 0's 512 samples, then channel 1's, and so on to the last channel,
// and presents them as one stream: sop marks the first and eop the last
// sample of each channel's block.  The stream is also the raw-data stream
// written to the result RAM.
//
// Interface and timing:
//   ch_rd_en[c] reads one word of channel c; the word appears on
//   ch_rd_data[c] one clock later and stays until the next read of that
//   channel.  The output register of the channel buffers is the output
//   stage: out_valid rises one clock after a read and a new read is issued
//   whenever the output is empty or being taken (out_valid && out_ready), so
//   the stream runs at one sample per clock while out_ready stays high.
//   out_ch is the channel number of the beat on the output.  frame_start
//   pulses in the clock the first read of a frame is issued, frame_busy is
//   high from then until the last read has been issued.
// Channel order and block framing follow the design; the handshake is this
// implementation's choice (modelled on a streaming FFT core's sink port).
module parallel_to_serial
#(
  parameter int unsigned CH = 16,
  parameter int unsigned N  = 512,
  parameter int unsigned W  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CH-1:0]         ch_ready,
  output logic [CH-1:0]         ch_rd_en,
  input  logic [W-1:0]          ch_rd_data [CH],
  input  logic                  frame_go,
  output logic                  frame_start,
  output logic                  frame_busy,
  output logic                  out_valid,
  output logic                  out_sop,
  output logic                  out_eop,
  output logic signed [W-1:0]   out_data,
  output logic [$clog2(CH)-1:0] out_ch,
  input  logic                  out_ready
);
  localparam int unsigned CW = $clog2(CH);
  localparam int unsigned SW = $clog2(N);

  logic [CW-1:0] ch_idx;     // channel of the next read
  logic [SW-1:0] smp_idx;    // sample of the next read
  logic          issue;      // read issued this clock
  logic          slot_free;

  assign slot_free   = !out_valid || out_ready;
  assign frame_start = !frame_busy && (&ch_ready) && frame_go && slot_free;
  assign issue       = frame_start || (frame_busy && slot_free);

  always_comb begin
    ch_rd_en = '0;
    if (issue) ch_rd_en[ch_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_busy <= 1'b0;
      ch_idx     <= '0;
      smp_idx    <= '0;
      out_valid  <= 1'b0;
      out_sop    <= 1'b0;
      out_eop    <= 1'b0;
      out_ch     <= '0;
    end else begin
      if (issue) begin
        out_valid <= 1'b1;
        out_sop   <= (smp_idx == '0);
        out_eop   <= (smp_idx == SW'(N - 1));
        out_ch    <= ch_idx;
        if (smp_idx == SW'(N - 1)) begin
          smp_idx <= '0;
          if (ch_idx == CW'(CH - 1)) begin
            ch_idx     <= '0;
            frame_busy <= 1'b0;
          end else begin
            ch_idx     <= ch_idx + 1'b1;
            frame_busy <= 1'b1;
          end
        end else begin
          smp_idx    <= smp_idx + 1'b1;
          frame_busy <= 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  assign out_data = ch_rd_data[out_ch];

  // Stream rule: while a beat waits, it must not change.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_ch) && $stable(out_sop) && $stable(out_eop);
  endproperty
  a_hold: assert property (p_hold) else $error("parallel_to_serial: beat changed while stalled");

endmodule
