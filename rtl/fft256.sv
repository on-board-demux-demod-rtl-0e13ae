// fft256: four-stage radix-4 pipeline FFT, BF1-DSD1-BF2-DSD2-BF3-DSD3-BF4.
//
// Four complex samples enter and four leave every clock, so one 256-point
// transform is accepted every 64 clocks (5.6 us at 11.52 MHz).  Input order:
// in block clock t (0..63), stream j carries x[t + 64 j].  The DSDs between
// the butterflies are configured k = 16, 4 and 1 (the last has the smallest
// delays and switches every clock).  Output order is digit-reversed: at
// output clock t = 16 q1 + 4 q2 + q3, stream q4 carries
//   X[q1 + 4 q2 + 16 q3 + 64 q4] / 256.
// eob_in_n is low on the last input clock of each block; eob_out_n marks the
// last output clock of the transformed block, 4 + 48 + 12 + 3 = 67 clocks
// later.  clr_n is a synchronous clear of all control state; it travels
// down the pipeline with the data (each butterfly and DSD leaves clear on
// the clock its first sample arrives), so the first block after a clear is
// already in step and no leading EOBKIN/ is needed.
module fft256
  import dd_pkg::*;
(
  input  logic  clk,
  input  logic  clr_n,
  input  cplx_t x [4],
  input  logic  eob_in_n,
  output cplx_t y [4],
  output logic  eob_out_n
);
  localparam logic [1:0] DSD_CFG [1:3] = '{DSD_R4_K16, DSD_R4_K4, DSD_R4_K1};

  cplx_t bf_in  [1:4][4];
  cplx_t bf_out [1:4][4];
  logic  bf_eob_in [1:4];
  logic  bf_eob_out [1:4];

  // clear, delayed to the arrival of the first sample at each unit:
  // BF1 0, DSD1 1, BF2 49, DSD2 50, BF3 62, DSD3 63, BF4 66
  localparam int BF_AT [1:4]  = '{0, 49, 62, 66};
  localparam int DSD_AT [1:3] = '{1, 50, 63};
  logic [66:0] clr_d;
  always_ff @(posedge clk) clr_d <= clr_n ? {clr_d[65:0], 1'b1} : '0;

  function automatic logic clr_at(logic [66:0] d, logic c, int n);
    return (n == 0) ? c : d[n-1];
  endfunction

  assign bf_in[1]     = x;
  assign bf_eob_in[1] = eob_in_n;

  for (genvar s = 1; s <= 4; s++) begin : g_bf
    bf_radix4 #(.STAGE(s)) u_bf (
      .clk, .clr_n(clr_at(clr_d, clr_n, BF_AT[s])), .x(bf_in[s]), .eob_in_n(bf_eob_in[s]),
      .y(bf_out[s]), .eob_out_n(bf_eob_out[s])
    );
  end

  for (genvar s = 1; s <= 3; s++) begin : g_dsd
    logic [2*CW-1:0] dx [4];
    logic [2*CW-1:0] dy [4];
    for (genvar j = 0; j < 4; j++) begin : g_lane
      assign dx[j] = bf_out[s][j];
      assign bf_in[s+1][j] = cplx_t'(dy[j]);
    end
    dsd #(.DW(2*CW)) u_dsd (
      .clk, .clr_n(clr_d[DSD_AT[s]-1]), .stg(DSD_CFG[s]), .eobk_in_n(bf_eob_out[s]), .freerun(1'b0),
      .x(dx), .y(dy), .eobk_out_n(bf_eob_in[s+1])
    );
  end

  assign y         = bf_out[4];
  assign eob_out_n = bf_eob_out[4];
endmodule
