// dual_clock_fifo: first-in first-out buffer with independent write and read
// clocks, used for each input channel (written at the 250 kHz sample clock,
// read at the 100 MHz processing clock).
//
// How it works: the write and read pointers are one bit wider than the
// address and are passed to the other clock domain as Gray code through two
// flip-flop synchronisers.  Each side computes its fill level from its own
// pointer and the synchronised copy of the other one, so the write side may
// see the FIFO fuller, and the read side emptier, than it really is, never
// the reverse.
//
// Interface and timing:
//   write side (wclk): wr_en writes wdata when the FIFO is not full; a write
//     into a full FIFO is dropped and raises overflow (sticky until reset).
//   read side (rclk): rd_en with rempty low takes one word; rdata shows that
//     word from the next rclk edge on and holds it until the next read, like
//     a non-show-ahead FIFO.  rusedw is the number of words the read side
//     can see.
// The 1024 x 16 size is the design's; the pointer scheme and the overflow
// flag are this implementation's choices.
module dual_clock_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [$clog2(DEPTH):0] wusedw,
  output logic             overflow,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [$clog2(DEPTH):0] rusedw
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray;
  logic [AW:0] rptr_bin, rptr_gray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in wclk domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in rclk domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write clock domain ----------------
  logic [AW:0] rptr_bin_w;
  assign rptr_bin_w = gray2bin(rgray_w2);
  assign wusedw     = wptr_bin - rptr_bin_w;
  assign wfull      = (wusedw == (AW+1)'(DEPTH));

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
      overflow  <= 1'b0;
    end else begin
      rgray_w1 <= rptr_gray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
      if (wr_en && wfull) overflow <= 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wptr_bin[AW-1:0]] <= wdata;
  end

  // ---------------- read clock domain ----------------
  logic [AW:0] wptr_bin_r;
  assign wptr_bin_r = gray2bin(wgray_r2);
  assign rusedw     = wptr_bin_r - rptr_bin;
  assign rempty     = (rusedw == '0);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
    end else begin
      wgray_r1 <= wptr_gray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rempty) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (rd_en && !rempty) rdata <= mem[rptr_bin[AW-1:0]];
  end

endmodule
