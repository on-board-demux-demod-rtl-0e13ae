// fft_coef_mem: coefficient memory (CM) of one radix-4 butterfly of the
// 256-point decimation-in-frequency pipeline.  For the sample at position t
// (0..63) of a 64-clock block, stage s (1..4) needs on its outputs q = 1..3
// the twiddle W_256^e with  e = q * (t mod 4^(4-s)) * 4^(s-1)  (mod 256);
// output 0 is never multiplied and stage 4 needs only W^0 = 1.
// The 256-entry table of W_256^e (Q2.14) is built at elaboration from
// cos/sin; the exponent arithmetic is combinational, so coefficients are
// available in the same cycle as the address.
module fft_coef_mem
  import dd_pkg::*;
#(
  parameter int STAGE = 1
) (
  input  logic [5:0] t,
  output cplx_t      w [1:3]
);
  typedef logic [2*CW-1:0] tw_tbl_t [256];

  function automatic tw_tbl_t build();
    tw_tbl_t tb;
    for (int e = 0; e < 256; e++) tb[e] = twiddle256(e);  // packed re:im
    return tb;
  endfunction

  localparam tw_tbl_t TW = build();
  localparam int MODV  = 4 ** (4 - STAGE);
  localparam int SCALE = 4 ** (STAGE - 1);

  always_comb begin
    for (int q = 1; q <= 3; q++) begin
      logic [7:0] e;
      e = 8'((q * (int'(t) % MODV) * SCALE) % 256);
      w[q] = cplx_t'(TW[e]);
    end
  end
endmodule
