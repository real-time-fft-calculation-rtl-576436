// fft512_model: behavioural model (not synthesizable) of a streaming
// block-floating-point FFT core with a sink/source packet interface, used
// by the system testbench in place of the vendor FFT core.
//
// It collects N complex samples between sink_sop and sink_eop, computes the
// N-point DFT X[k] = sum_n x[n] exp(-j 2 pi k n / N) in floating point,
// and scales the whole block by 2^-exp, with exp the smallest value >= 0
// that makes every real and imaginary part fit in 16 bits (the block
// exponent, output on source_exp).  The block comes out in natural bin
// order, one bin per clock, LAT clocks after its last sample, with
// source_sop/source_eop on bins 0 and N-1.  With STALL = 1, sink_ready is
// low on random clocks, to exercise the stall path of the data source.
module fft512_model #(
  parameter int N     = 512,
  parameter int LAT   = 600,
  parameter bit STALL = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sink_valid,
  input  logic               sink_sop,
  input  logic               sink_eop,
  input  logic signed [15:0] sink_real,
  input  logic signed [15:0] sink_imag,
  output logic               sink_ready,
  output logic               source_valid,
  output logic               source_sop,
  output logic               source_eop,
  output logic [15:0]        source_real,
  output logic [15:0]        source_imag,
  output logic [5:0]         source_exp
);
  typedef struct {
    longint     t_ready;
    logic [15:0] re, im;
    logic [5:0]  ex;
    bit          sop, eop;
  } bin_t;

  real    xr [N], xi [N];
  real    cs [N], sn [N];
  int     nin = 0;
  longint cyc = 0;
  bin_t   outq [$];
  int     stall_cnt = 0;

  initial begin
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979323846 * i / N);
      sn[i] = $sin(2.0 * 3.14159265358979323846 * i / N);
    end
  end

  task automatic transform();
    real Xr [N], Xi [N];
    real mx, scale;
    int  e;
    mx = 0.0;
    for (int k = 0; k < N; k++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < N; n++) begin
        int t;
        t = (k * n) % N;
        ar += xr[n] * cs[t] + xi[n] * sn[t];
        ai += xi[n] * cs[t] - xr[n] * sn[t];
      end
      Xr[k] = ar; Xi[k] = ai;
      if (ar > mx) mx = ar;
      if (-ar > mx) mx = -ar;
      if (ai > mx) mx = ai;
      if (-ai > mx) mx = -ai;
    end
    e = 0;
    scale = 1.0;
    while (mx * scale > 32767.0) begin e++; scale = scale / 2.0; end
    for (int k = 0; k < N; k++) begin
      bin_t b;
      b.t_ready = cyc + longint'(LAT);
      b.re  = 16'($rtoi(Xr[k] * scale + ((Xr[k] >= 0.0) ? 0.5 : -0.5)));
      b.im  = 16'($rtoi(Xi[k] * scale + ((Xi[k] >= 0.0) ? 0.5 : -0.5)));
      b.ex  = 6'(e);
      b.sop = (k == 0);
      b.eop = (k == N - 1);
      outq.push_back(b);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      nin          = 0;
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
      sink_ready   <= 1'b1;
    end else begin
      if (sink_valid && sink_ready) begin
        if (sink_sop) nin = 0;
        xr[nin] = real'(sink_real);
        xi[nin] = real'(sink_imag);
        nin++;
        if (sink_eop) begin
          if (nin != N) $error("fft512_model: block of %0d samples", nin);
          transform();
          nin = 0;
        end
      end
      if (outq.size() > 0 && outq[0].t_ready <= cyc) begin
        bin_t b;
        b = outq.pop_front();
        source_valid <= 1'b1;
        source_sop   <= b.sop;
        source_eop   <= b.eop;
        source_real  <= b.re;
        source_imag  <= b.im;
        source_exp   <= b.ex;
      end else begin
        source_valid <= 1'b0;
        source_sop   <= 1'b0;
        source_eop   <= 1'b0;
      end
      if (STALL) sink_ready <= ($urandom_range(0, 15) != 0);
      else       sink_ready <= 1'b1;
    end
  end
endmodule
