// dsd: a complete delay-switch-delay stage, built as the hardware was, from
// DW/4 four-bit dsd_asic slices working side by side on the same controls.
// With DW = 32 (eight slices) each stream carries one complex sample of
// 16-bit I and 16-bit Q.  Interface and timing are those of dsd_asic; the
// EOBKOUT/ of slice 0 is brought out (all slices produce the same one).
module dsd
  import dd_pkg::*;
#(
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          clr_n,
  input  logic [1:0]    stg,
  input  logic          eobk_in_n,
  input  logic          freerun,
  input  logic [DW-1:0] x [4],
  output logic [DW-1:0] y [4],
  output logic          eobk_out_n
);
  localparam int NS = DW / 4;
  logic [NS-1:0] eob_n;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    logic [3:0] xs [4];
    logic [3:0] ys [4];
    for (genvar j = 0; j < 4; j++) begin : g_lane
      assign xs[j] = x[j][4*s +: 4];
      assign y[j][4*s +: 4] = ys[j];
    end
    dsd_asic #(.W(4)) u_asic (
      .clk, .clr_n, .stg, .eobk_in_n, .freerun,
      .x(xs), .y(ys), .eobk_out_n(eob_n[s])
    );
  end

  assign eobk_out_n = eob_n[0];
endmodule
