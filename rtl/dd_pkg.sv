// dd_pkg: types and constants shared by the demultiplexer/demodulator.
// Complex samples in the FFT/IFFT datapath are 16-bit I plus 16-bit Q (a full
// delay-switch-delay is eight 4-bit slices, so 32 bits per stream).  The
// interpolating filter and the demodulator work on 8-bit I/Q (+/-127), as in
// the acquisition datapath.  Twiddle factors are signed Q2.14 (16384 = 1.0).
package dd_pkg;

  localparam int CW = 16;            // bits per I or Q in the FFT/IFFT
  localparam int TWF = 14;           // fractional bits of twiddles

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } cplx_t;

  // DSD configuration select (STG0-STG1): the column of delay values used.
  typedef enum logic [1:0] {
    DSD_R4_K1  = 2'd0,               // radix-4, k = 1  (stage nearest the output)
    DSD_R4_K4  = 2'd1,               // radix-4, k = 4
    DSD_R4_K16 = 2'd2,               // radix-4, k = 16
    DSD_R2_K8  = 2'd3                // radix-2, delay 8, streams taken as two pairs
  } dsd_cfg_e;

  // Complex multiply with a Q2.14 coefficient, truncated back to CW bits.
  function automatic cplx_t cmul_tw(cplx_t a, cplx_t w);
    logic signed [2*CW:0] pr, pi;
    cplx_t r;
    pr = a.re * w.re - a.im * w.im;
    pi = a.re * w.im + a.im * w.re;
    r.re = CW'(pr >>> TWF);
    r.im = CW'(pi >>> TWF);
    return r;
  endfunction

  // Twiddle W_256^e = cos(2*pi*e/256) - j*sin(2*pi*e/256) in Q2.14,
  // rounded to nearest.  Evaluated only at elaboration (constant tables).
  function automatic cplx_t twiddle256(int e);
    real ang;
    cplx_t w;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / 256.0;
    w.re = CW'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
    w.im = CW'($rtoi($floor(-$sin(ang) * 16384.0 + 0.5)));
    return w;
  endfunction

  // Per-sample tag carried with frequency samples through the IFFT lanes.
  typedef struct packed {
    logic       valid;               // slot holds a sample of a transform
    logic       sof;                 // first slot of a 64-slot frame
    logic [1:0] carrier;             // carrier (channel) number
    logic [2:0] lg2n;                // log2 of this transform's size (1..5)
  } ifft_tag_t;

  // One entry of the receive-filter plan RAM: which FFT bin goes to this
  // IFFT slot, with what filter weight, for which carrier and transform size.
  typedef struct packed {
    logic              en;
    logic [7:0]        bin;
    logic signed [15:0] coef;        // real filter weight, Q2.14
    logic [1:0]        carrier;
    logic [2:0]        lg2n;
  } plan_t;

endpackage
