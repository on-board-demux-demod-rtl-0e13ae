// demux_demod_top: the on-board bulk demultiplexer/demodulator datapath.
//
// Chain:
//   overlap_buffer  -> 256-sample blocks with 50 % overlap, 4 samples/clock
//   fft256          -> radix-4 pipeline FFT (DSD reorder units between
//                      the butterfly stages), one transform per 64 clocks
//   freq_filter     -> bin reorder, per-carrier frequency-domain filtering
//                      and interleaving of the carriers' bands into 4 lanes
//   4 x ifft_var    -> variable-size inverse FFTs, one per lane
//   4 x ifft_reorder-> natural-order time samples, aliased halves marked
//   ifm_control +   -> interpolation from the IFFT sample rate to exactly
//   2 x ifm_filter     two samples per symbol (I and Q rails share control)
//   demod           -> shared burst QPSK demodulator with unique-word
//                      detection; its clock adjustments go back to
//                      ifm_control
//
// Lane 0 feeds the interpolator and demodulator; the time samples of all
// four lanes are also brought out, so further interpolator/demodulator
// groups can be attached to lanes 1-3 (one group takes one sample per clock,
// less than the four lanes can deliver).  The IFFT outputs (16 bits, not
// scaled) are reduced to the interpolator's 8 bits by an arithmetic shift of
// IFM_SHIFT with saturation.  block_sync of the interpolator control
// restarts its 128-slot address counter every second FFT block.
// Burst starts are announced from outside (sob_req/sob_ch, from the burst
// timing plan): the next interpolated sample of that carrier is marked as
// the first preamble sample.
// Interfaces: front-end samples din (two complex 16-bit per clock); plan RAM
// and mapping RAM write ports; loop gains; monitoring outputs of each stage.
// Follows the source: the chain FFT -> frequency-domain filter -> variable
// IFFT -> interpolator -> shared demodulator and the clock feedback path.
// Design choices: lane 0 only to the demodulator, the 16-to-8-bit scaling
// and where block_sync comes from.
module demux_demod_top
  import dd_pkg::*;
#(
  parameter int NCH = 4,
  parameter int NMAX = 32,
  parameter int IFM_SHIFT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cplx_t       din [2],
  // plan and mapping RAM writes
  input  logic        pw_en,
  input  logic [7:0]  pw_addr,
  input  plan_t       pw_data,
  input  logic        map_we,
  input  logic [6:0]  map_waddr,
  input  logic [31:0] map_wdata,
  // demodulator control
  input  logic [7:0]  kp, kf, kt,
  input  logic        sob_req,
  input  logic [1:0]  sob_ch,
  // time samples of the four lanes
  output cplx_t       lane_y [4],
  output logic [3:0]  lane_valid,
  output logic [1:0]  lane_carrier [4],
  output logic [3:0]  lane_sof,
  // monitors
  output logic        fft_eob_n,
  output logic [$clog2(NMAX)-1:0] bfly_used [4],
  output logic        ifm_slot_en,
  output logic        ifm_clk_gate,
  output logic        ifm_set_next,
  output logic        ifm_data_valid,
  output logic        ifm_underflow,
  output logic        ifm_valid,
  // demodulated data
  output logic        bit_valid,
  output logic [1:0]  bit_ch,
  output logic        bit_i,
  output logic        bit_q,
  output logic        uw_det,
  output logic        uw_inv,
  output logic [1:0]  uw_ch,
  output logic [NCH-1:0] tracking,
  output logic        acq_done,
  output logic        clk_adj
);
  // ---------------- demultiplexer ----------------
  cplx_t ob_y [4];
  logic  ob_eob_n, ob_valid;
  overlap_buffer u_ob (
    .clk, .rst_n, .din, .dout(ob_y), .eob_out_n(ob_eob_n), .out_valid(ob_valid)
  );

  cplx_t fft_y [4];
  fft256 u_fft (
    .clk, .clr_n(rst_n), .x(ob_y), .eob_in_n(ob_eob_n), .y(fft_y), .eob_out_n(fft_eob_n)
  );

  cplx_t     ff_y [4];
  ifft_tag_t ff_tag [4];
  freq_filter u_ff (
    .clk, .rst_n, .fft_y, .fft_eob_n, .pw_en, .pw_addr, .pw_data,
    .lane_y(ff_y), .lane_tag(ff_tag)
  );

  for (genvar l = 0; l < 4; l++) begin : g_lane
    cplx_t     iy;
    ifft_tag_t it;
    ifft_var #(.NMAX(NMAX)) u_ifft (
      .clk, .rst_n, .din(ff_y[l]), .tin(ff_tag[l]), .dout(iy), .tout(it),
      .bfly_used(bfly_used[l])
    );
    ifft_reorder u_ro (
      .clk, .rst_n, .din(iy), .tin(it), .dout(lane_y[l]), .dvalid(lane_valid[l]),
      .carrier(lane_carrier[l]), .sof_out(lane_sof[l])
    );
  end

  // ---------------- interpolator ----------------
  function automatic logic signed [7:0] to8(input logic signed [CW-1:0] v);
    logic signed [CW-1:0] s;
    s = v >>> IFM_SHIFT;
    if (s > 127) return 8'sd127;
    if (s < -127) return -8'sd127;
    return s[7:0];
  endfunction

  logic block_sync, frame_par;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) frame_par <= 1'b0;
    else if (!ob_eob_n) frame_par <= !frame_par;
  assign block_sync = !ob_eob_n && frame_par;

  logic              est_stb, adj_stb, data_valid;
  logic [1:0]        err_ch, slot_ch;
  logic signed [7:0] err_val;
  logic [7:0]        phase;
  logic signed [7:0] coef [16];
  ifm_control #(.NCH(NCH)) u_ifmc (
    .clk, .rst_n, .block_sync, .map_we, .map_waddr, .map_wdata,
    .est_stb, .adj_stb, .err_ch, .err_val,
    .slot_en(ifm_slot_en), .slot_ch, .clk_gate(ifm_clk_gate), .data_valid,
    .set_next(ifm_set_next), .phase, .coef
  );

  logic              fi_v, fq_v, fi_uf, fq_uf;
  logic [1:0]        fi_ch, fq_ch;
  logic signed [7:0] fi_d, fq_d;
  ifm_filter #(.NCH(NCH)) u_ifm_i (
    .clk, .rst_n, .in_valid(lane_valid[0]), .in_ch(lane_carrier[0]),
    .in_data(to8(lane_y[0].re)), .slot_en(ifm_slot_en), .slot_ch,
    .clk_gate(ifm_clk_gate), .data_valid, .coef,
    .out_valid(fi_v), .out_ch(fi_ch), .out_data(fi_d), .underflow(fi_uf)
  );
  ifm_filter #(.NCH(NCH)) u_ifm_q (
    .clk, .rst_n, .in_valid(lane_valid[0]), .in_ch(lane_carrier[0]),
    .in_data(to8(lane_y[0].im)), .slot_en(ifm_slot_en), .slot_ch,
    .clk_gate(ifm_clk_gate), .data_valid, .coef,
    .out_valid(fq_v), .out_ch(fq_ch), .out_data(fq_d), .underflow(fq_uf)
  );
  assign ifm_underflow = fi_uf | fq_uf;
  assign ifm_valid = fi_v;
  assign ifm_data_valid = data_valid;

  // ---------------- demodulator ----------------
  logic [NCH-1:0] sob_pend;
  logic           sob;
  assign sob = fi_v && sob_pend[fi_ch];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sob_pend <= '0;
    else begin
      if (sob) sob_pend[fi_ch] <= 1'b0;
      if (sob_req) sob_pend[sob_ch] <= 1'b1;
    end

  demod #(.NCH(NCH)) u_dm (
    .clk, .rst_n, .in_valid(fi_v), .in_ch(fi_ch), .sob, .i_in(fi_d), .q_in(fq_d),
    .kp, .kf, .kt, .bit_valid, .bit_ch, .bit_i, .bit_q, .uw_det, .uw_inv, .uw_ch,
    .tracking, .acq_done, .est_stb, .adj_stb, .err_ch, .err_val
  );
  assign clk_adj = adj_stb;
endmodule
