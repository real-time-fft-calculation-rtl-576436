// result_pingpong: the two ping-pong result RAMs, their three operation
// cycles and the output MUX switch towards the PCI Express side.
//
// Every frame (16 channels x 512 samples) is stored in one RAM: the raw
// samples at addresses 0 .. CH*N-1, in the order they went into the FFT
// (channel 0 first), and the FFT results at CH*N .. 2*CH*N-1 in the order
// the FFT core delivers them.  Each RAM passes through three cycles:
//   BANK_RAW     accepts the raw samples (cycle 1);
//   BANK_FFT     the raw part is complete, accepts the remaining FFT
//                results (cycle 2);
//   BANK_READOUT all 16384 words are shifted out, address 0 first (cycle 3);
// and then is BANK_FREE again.  A streaming FFT core delivers the results of
// the first channels while the last channels' samples still go in, so FFT
// words are accepted already in BANK_RAW, through port B, while the raw
// samples use port A.  While one RAM is read out, the other takes the next
// frame; bank_avail tells the frame source whether the RAM it would fill
// next is free.
//
// Word layout (this implementation's choice): a raw word is the 16-bit
// sample sign-extended to 32 bits; an FFT word is {real[15:0], imag[15:0]}.
// The block exponent of each channel's transform is kept in a 16-entry
// table per RAM and shown on rd_exp while that RAM is read out.
//
// Interface and timing (one clock, the 100 MHz processing clock):
//   raw_valid/raw_data: one raw sample per clock, no backpressure; the
//     source must only start a frame while bank_avail is high.
//   fft_valid/fft_eop/fft_real/fft_imag/fft_exp: one FFT result per clock,
//     no backpressure; fft_ch is the channel the current block belongs to.
//   rd_valid/rd_ready: read-out stream; rd_data, rd_addr, rd_last and
//     rd_bank belong to the beat and hold while rd_ready is low.  The first
//     word follows one clock after a RAM enters BANK_READOUT; then one word
//     per clock while rd_ready is high.
module result_pingpong
  import rtfft_pkg::*;
#(
  parameter int unsigned CH    = 16,
  parameter int unsigned N     = 512,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned W     = 32,
  parameter int unsigned SW    = 16,
  parameter int unsigned XW    = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // raw samples
  input  logic                       raw_valid,
  input  logic [SW-1:0]              raw_data,
  output logic                       bank_avail,
  // FFT results
  input  logic                       fft_valid,
  input  logic                       fft_eop,
  input  logic [SW-1:0]              fft_real,
  input  logic [SW-1:0]              fft_imag,
  input  logic [XW-1:0]              fft_exp,
  output logic [$clog2(CH)-1:0]      fft_ch,
  // read-out stream to the PCI Express side
  output logic                       rd_valid,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic                       rd_last,
  output logic                       rd_bank,
  output logic [XW-1:0]              rd_exp [CH],
  input  logic                       rd_ready,
  // status
  output bank_state_t                bank_state [2],
  output logic [$clog2(DEPTH)-1:0]   wr_address [2]
);
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned HALF  = CH * N;

  logic          raw_ptr, fft_ptr;      // RAM that takes the next raw / FFT word
  logic [AW-1:0] raw_cnt, fft_cnt;
  logic [1:0]    fft_done;              // FFT part of a RAM complete
  logic [AW-1:0] rd_cnt;                // next address to read
  logic          rd_all_issued;
  logic          rd_issue;
  logic          raw_last, fft_last, rd_take_last;
  logic [XW-1:0] exp_tab [2][CH];
  logic [$clog2(CH)-1:0] fft_ch_q;
  logic [$clog2(N)-1:0]  fft_bin;

  // RAM ports
  logic          a_we   [2];
  logic          b_en   [2];
  logic          b_we   [2];
  logic [AW-1:0] b_addr [2];
  logic [W-1:0]  b_q    [2];

  assign raw_last     = raw_valid && (raw_cnt == AW'(HALF - 1));
  assign fft_last     = fft_valid && (fft_cnt == AW'(HALF - 1));
  assign bank_avail   = (bank_state[raw_ptr] == BANK_FREE);
  assign rd_issue     = (bank_state[rd_bank] == BANK_READOUT) && !rd_all_issued
                        && (!rd_valid || rd_ready);
  assign rd_take_last = rd_valid && rd_ready && rd_last;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    assign a_we[b]   = raw_valid && (raw_ptr == 1'(b));
    assign b_we[b]   = fft_valid && (fft_ptr == 1'(b)) && (bank_state[b] != BANK_READOUT);
    assign b_en[b]   = b_we[b] || (rd_issue && (rd_bank == 1'(b)));
    assign b_addr[b] = b_we[b] ? AW'(HALF) + fft_cnt : rd_cnt;

    result_ram #(.DEPTH(DEPTH), .W(W)) u_ram (
      .clk    (clk),
      .a_we   (a_we[b]),
      .a_addr (raw_cnt),
      .a_wdata(W'(signed'(raw_data))),
      .b_en   (b_en[b]),
      .b_we   (b_we[b]),
      .b_addr (b_addr[b]),
      .b_wdata({fft_real, fft_imag}),
      .b_rdata(b_q[b])
    );

    assign wr_address[b] = (raw_ptr == 1'(b) && bank_state[b] == BANK_RAW) ? raw_cnt : fft_cnt;
  end

  // ---------------- write side: cycles 1 and 2 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_ptr    <= 1'b0;
      fft_ptr    <= 1'b0;
      raw_cnt    <= '0;
      fft_cnt    <= '0;
      fft_done   <= '0;
      fft_ch_q   <= '0;
      fft_bin    <= '0;
      bank_state[0] <= BANK_FREE;
      bank_state[1] <= BANK_FREE;
    end else begin
      // raw samples
      if (raw_valid) begin
        if (raw_last) begin
          raw_cnt <= '0;
          raw_ptr <= ~raw_ptr;
        end else begin
          raw_cnt <= raw_cnt + 1'b1;
        end
      end
      // FFT results
      if (fft_valid) begin
        fft_bin <= fft_bin + 1'b1;
        if (fft_eop) begin
          fft_bin  <= '0;
          fft_ch_q <= (fft_ch_q == $clog2(CH)'(CH - 1)) ? '0 : fft_ch_q + 1'b1;
        end
        if (fft_last) begin
          fft_cnt <= '0;
          fft_ptr <= ~fft_ptr;
        end else begin
          fft_cnt <= fft_cnt + 1'b1;
        end
      end

      for (int b = 0; b < 2; b++) begin
        unique case (bank_state[b])
          BANK_FREE:
            if (a_we[b]) bank_state[b] <= raw_last ? BANK_FFT : BANK_RAW;
          BANK_RAW:
            if (a_we[b] && raw_last)
              bank_state[b] <= (fft_done[b] || (b_we[b] && fft_last)) ? BANK_READOUT : BANK_FFT;
          BANK_FFT:
            if (fft_done[b] || (b_we[b] && fft_last)) bank_state[b] <= BANK_READOUT;
          BANK_READOUT:
            if (rd_take_last && rd_bank == 1'(b)) bank_state[b] <= BANK_FREE;
          default: bank_state[b] <= BANK_FREE;
        endcase
        if (b_we[b] && fft_last) fft_done[b] <= 1'b1;
        else if (bank_state[b] == BANK_READOUT) fft_done[b] <= 1'b0;
      end
    end
  end

  assign fft_ch = fft_ch_q;

  always_ff @(posedge clk) begin
    if (fft_valid && fft_eop) exp_tab[fft_ptr][fft_ch_q] <= fft_exp;
  end

  // ---------------- read side: cycle 3 and output MUX switch ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank       <= 1'b0;
      rd_cnt        <= '0;
      rd_all_issued <= 1'b0;
      rd_valid      <= 1'b0;
      rd_addr       <= '0;
    end else begin
      if (rd_issue) begin
        rd_valid <= 1'b1;
        rd_addr  <= rd_cnt;
        rd_cnt   <= rd_cnt + 1'b1;
        if (rd_cnt == AW'(DEPTH - 1)) rd_all_issued <= 1'b1;
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
      if (rd_take_last) begin
        rd_bank       <= ~rd_bank;
        rd_cnt        <= '0;
        rd_all_issued <= 1'b0;
      end
    end
  end

  assign rd_last = (rd_addr == AW'(DEPTH - 1));
  assign rd_data = b_q[rd_bank];
  for (genvar c = 0; c < CH; c++) begin : g_exp
    assign rd_exp[c] = exp_tab[rd_bank][c];
  end

  // FFT results must belong to a frame whose raw samples have started.
  a_fft_has_frame: assert property (@(posedge clk) disable iff (!rst_n)
      fft_valid |-> bank_state[fft_ptr] inside {BANK_RAW, BANK_FFT})
    else $error("result_pingpong: FFT result without a frame to store it in");

  // The frame source must not start a frame into a busy RAM.
  a_raw_into_free: assert property (@(posedge clk) disable iff (!rst_n)
      raw_valid && raw_cnt == '0 |-> bank_state[raw_ptr] == BANK_FREE)
    else $error("result_pingpong: raw frame started into a busy RAM");

  initial begin
    if (DEPTH != 2 * CH * N) $error("result_pingpong: DEPTH must be 2*CH*N");
  end

endmodule
