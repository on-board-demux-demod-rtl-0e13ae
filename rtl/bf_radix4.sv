// bf_radix4: radix-4 butterfly of the pipeline FFT with its coefficient
// memory.  Every clock it takes one complex sample from each of the four
// streams (a, b, c, d), forms the 4-point DFT
//   Y0 = a+b+c+d, Y1 = a-jb-c+jd, Y2 = a-b+c-d, Y3 = a+jb-c-jd,
// divides by 4 (arithmetic shift, so a 256-point transform is scaled by
// 1/256 and cannot overflow), and multiplies Y1..Y3 by the twiddles from
// fft_coef_mem; three complex multipliers per butterfly, as in the source
// design.  The multipliers sit after the adders (decimation in frequency) so
// that the stage order and DSD delays match a pipeline whose last DSD has the
// smallest delay.  A 6-bit position counter restarts after eob_in_n (last
// sample of a 64-clock block); clr_n clears it.  Latency: one clock for data
// and for eob.
module bf_radix4
  import dd_pkg::*;
#(
  parameter int STAGE = 1
) (
  input  logic  clk,
  input  logic  clr_n,
  input  cplx_t x [4],
  input  logic  eob_in_n,
  output cplx_t y [4],
  output logic  eob_out_n
);
  logic [5:0] t;
  cplx_t      w [1:3];
  cplx_t      s [4];

  fft_coef_mem #(.STAGE(STAGE)) u_cm (.t, .w);

  always_ff @(posedge clk) begin
    if (!clr_n)         t <= '0;
    else if (!eob_in_n) t <= '0;
    else                t <= t + 6'd1;
  end

  always_comb begin
    logic signed [CW+1:0] ar, ai, br, bi, cr, ci, dr, di;
    ar = (CW+2)'(x[0].re); ai = (CW+2)'(x[0].im);
    br = (CW+2)'(x[1].re); bi = (CW+2)'(x[1].im);
    cr = (CW+2)'(x[2].re); ci = (CW+2)'(x[2].im);
    dr = (CW+2)'(x[3].re); di = (CW+2)'(x[3].im);
    s[0].re = CW'((ar + br + cr + dr) >>> 2);
    s[0].im = CW'((ai + bi + ci + di) >>> 2);
    s[1].re = CW'((ar + bi - cr - di) >>> 2);   // a - jb - c + jd
    s[1].im = CW'((ai - br - ci + dr) >>> 2);
    s[2].re = CW'((ar - br + cr - dr) >>> 2);
    s[2].im = CW'((ai - bi + ci - di) >>> 2);
    s[3].re = CW'((ar - bi - cr + di) >>> 2);   // a + jb - c - jd
    s[3].im = CW'((ai + br - ci - dr) >>> 2);
  end

  always_ff @(posedge clk) begin
    y[0] <= s[0];
    for (int q = 1; q < 4; q++) y[q] <= cmul_tw(s[q], w[q]);
    eob_out_n <= clr_n ? eob_in_n : 1'b1;
  end
endmodule
