// ifft_var: one lane of the shared variable-length inverse FFT.
//
// log2(NMAX) radix-2 single-delay-feedback stages with spans NMAX/2 ... 1
// are chained.  Transforms of any power-of-two size up to NMAX are
// interleaved in the 64-slot frame, each starting at a slot that is a
// multiple of its size; every sample carries its transform's size, and a
// stage whose span is too large for that size bypasses its butterfly and
// only delays the sample.  So a 4-point transform passes the first stages
// untouched and is transformed by the last two, while a 32-point one uses
// all five - the stages themselves never change.  Output: each transform's
// samples in bit-reversed order (ifft_reorder puts them back in order), not
// scaled (the forward FFT already divided by 256).
// Latency: NMAX - 1 + log2(NMAX) clocks (sum of spans plus one register per
// stage).  bfly_used shows, per stage, whether it did a butterfly.
module ifft_var
  import dd_pkg::*;
#(
  parameter int NMAX = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cplx_t     din,
  input  ifft_tag_t tin,
  output cplx_t     dout,
  output ifft_tag_t tout,
  output logic [$clog2(NMAX)-1:0] bfly_used
);
  localparam int NST = $clog2(NMAX);
  cplx_t     d [NST+1];
  ifft_tag_t t [NST+1];

  assign d[0] = din;
  assign t[0] = tin;

  for (genvar s = 0; s < NST; s++) begin : g_st
    ifft_stage #(.D(NMAX >> (s + 1))) u_st (
      .clk, .rst_n, .din(d[s]), .tin(t[s]), .dout(d[s+1]), .tout(t[s+1]),
      .bfly_used(bfly_used[s])
    );
  end

  assign dout = d[NST];
  assign tout = t[NST];
endmodule
