// channel_buffer: ping-pong input buffer of one analog channel.
//
// Each channel owns two dual-clock FIFOs, A and B.  On the write side
// (sample clock) an input switch sends 512 consecutive samples to FIFO A,
// the next 512 to FIFO B, then back to A, so a new block is always being
// collected while the previous one is read for the FFT.  On the read side
// (processing clock) a MUX switch reads the FIFO that holds the oldest block:
// block_ready rises when that FIFO holds N words, and after N reads the MUX
// moves to the other FIFO.  A FIFO is 1024 words deep, twice a block, so a
// block may wait one extra block period before it is read without loss.
//
// Interface and timing:
//   wclk side: wr_en/wr_data take one sample per enabled edge; wr_sel shows
//     which FIFO (0 = A, 1 = B) the next sample goes to; overflow is sticky
//     if a sample was dropped because a FIFO was full.
//   rclk side: rd_en takes one word (only while block_ready, or while a block
//     is being read); rd_data shows it from the next edge and holds it until
//     the next read.  rd_sel is the FIFO the MUX is reading.
// The FIFO pair, the 512-sample switching and the MUX follow the design; the
// ready rule and the overflow flag are this implementation's choices.
module channel_buffer #(
  parameter int unsigned N     = 512,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_sel,
  output logic         overflow,

  input  logic         rclk,
  input  logic         rrst_n,
  output logic         block_ready,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_sel
);
  localparam int unsigned CW = $clog2(N);

  logic [1:0]         f_wr, f_rd, f_empty, f_ovf;
  logic [W-1:0]       f_q    [2];
  logic [$clog2(DEPTH):0] f_used [2];

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    dual_clock_fifo #(.WIDTH(W), .DEPTH(DEPTH)) u_fifo (
      .wclk    (wclk),
      .wrst_n  (wrst_n),
      .wr_en   (f_wr[i]),
      .wdata   (wr_data),
      .wfull   (),
      .wusedw  (),
      .overflow(f_ovf[i]),
      .rclk    (rclk),
      .rrst_n  (rrst_n),
      .rd_en   (f_rd[i]),
      .rdata   (f_q[i]),
      .rempty  (f_empty[i]),
      .rusedw  (f_used[i])
    );
  end

  // ---------------- write side: input switch ----------------
  logic [CW-1:0] wcount;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wcount <= '0;
      wr_sel <= 1'b0;
    end else if (wr_en) begin
      if (wcount == CW'(N - 1)) begin
        wcount <= '0;
        wr_sel <= ~wr_sel;
      end else begin
        wcount <= wcount + 1'b1;
      end
    end
  end

  assign f_wr[0]  = wr_en && !wr_sel;
  assign f_wr[1]  = wr_en &&  wr_sel;
  assign overflow = |f_ovf;

  // ---------------- read side: MUX switch ----------------
  logic [CW-1:0] rcount;
  logic          last_sel;   // FIFO that supplied the word on rd_data

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rcount   <= '0;
      rd_sel   <= 1'b0;
      last_sel <= 1'b0;
    end else if (rd_en) begin
      last_sel <= rd_sel;
      if (rcount == CW'(N - 1)) begin
        rcount <= '0;
        rd_sel <= ~rd_sel;
      end else begin
        rcount <= rcount + 1'b1;
      end
    end
  end

  assign block_ready = (f_used[rd_sel] >= ($clog2(DEPTH)+1)'(N));
  assign f_rd[0]     = rd_en && !rd_sel;
  assign f_rd[1]     = rd_en &&  rd_sel;
  assign rd_data     = f_q[last_sel];

  // A read must never find the selected FIFO empty: the reader only starts
  // a block when N words are there.
  property p_no_empty_read;
    @(posedge rclk) disable iff (!rrst_n) rd_en |-> !f_empty[rd_sel];
  endproperty
  a_no_empty_read: assert property (p_no_empty_read)
    else $error("channel_buffer: read from an empty FIFO");

endmodule
