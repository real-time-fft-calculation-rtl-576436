// result_ram: one 16384 x 32 bit result memory, holding a whole frame of
// raw samples and FFT results.
//
// It is a true dual-port RAM on one clock.  Port A only writes; it takes the
// raw samples.  Port B either writes (FFT results, while the frame is being
// filled) or reads (while the frame is shifted out); a read returns the word
// on b_rdata at the next clock edge and b_rdata holds it until the next
// read.  Both ports must not write the same address in one clock; the two
// streams use disjoint halves of the memory, so they never do.
// The size is the design's; the port arrangement is this implementation's
// choice, made because raw samples and FFT results of one frame arrive at
// the same time.
module result_ram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [W-1:0]             b_wdata,
  output logic [W-1:0]             b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
