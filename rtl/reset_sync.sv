// reset_sync: turns an asynchronous active-low reset into one that is
// asserted at once and released synchronously to clk, after two flip-flops.
// Used once per clock domain (sample clock and processing clock).  This
// helper is an implementation choice; the design it serves does not
// describe its reset scheme.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic meta;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta  <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      meta  <= 1'b1;
      rst_n <= meta;
    end
  end
endmodule
