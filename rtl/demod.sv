// demod: shared burst QPSK demodulator for NCH carriers, time-multiplexed
// sample by sample.  Each carrier keeps its own state (carrier phase and
// frequency, symbol timing, parity, last samples, unique-word polarity), so
// one datapath serves every carrier.
//
// How it works:
//   * Samples arrive two per symbol per carrier (even = decision point,
//     odd = transition point), tagged with their carrier.  `sob` on a sample
//     marks the first sample of a burst's preamble.
//   * ACQ: the preamble (4*HALF samples) goes to acq_estimator.  Only one
//     burst is acquired at a time; a start on another carrier while the
//     estimator is busy is ignored.  When the estimates are ready the
//     carrier loop is preloaded with phase and frequency, the timing loop with
//     the timing estimate, and the timing estimate is sent to the
//     interpolator control (est_*).  Samples that arrive between the end of
//     the preamble and the preload are dropped.
//   * TRACK: samples are rotated by the carrier's phase (phase_rotator).
//     At an even sample the hard decisions are made, the decision-directed
//     phase error sgn(I)Q - sgn(Q)I updates the carrier loop, and the
//     Gardner timing error mid.(prev - cur) updates the timing loop and is
//     sent as a clock adjustment to the interpolator control (adj_*).  The
//     decided bits go to the unique-word detector; the output bits are the
//     decisions corrected by the carrier's polarity flag.
//
// Units: samples 8-bit signed; loop phase 256 = 360 degrees; est/adj values
// in 1/256 sample (acquisition tau0 is in 1/128 sample at 2 samples/symbol).
// The rotator applies +theta, so the loop tracks minus the received phase and
// is fed the negated phase error.
// Timing: a sample on the input gives its decision two clocks later
// (rotator register + output register).  Acquisition preloads happen two
// clocks after the last preamble sample; if a preload and a tracking update
// of another carrier fall on the same clock, the preload wins and the
// update is lost.  Likewise est_* wins over adj_*.
// Follows the source: one shared demodulator with per-carrier state, a
// preamble-based open-loop estimate that preloads the loops, decision-
// directed carrier tracking, clock feedback to the interpolator, unique-word
// detection with ambiguity resolution.  Design choices: the Gardner detector,
// the error scalings and the single-burst-at-a-time acquisition.
module demod #(
  parameter int NCH = 4,
  parameter int HALF = 16,
  parameter int UWLEN = 16,
  parameter logic [UWLEN-1:0] UW = 16'hE6A2,
  parameter int MAXERR = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic                   sob,        // first preamble sample of a burst
  input  logic signed [7:0]      i_in,
  input  logic signed [7:0]      q_in,
  input  logic [7:0]             kp, kf, kt, // loop gains
  // decided data
  output logic                   bit_valid,
  output logic [$clog2(NCH)-1:0] bit_ch,
  output logic                   bit_i,
  output logic                   bit_q,
  output logic                   uw_det,
  output logic                   uw_inv,
  output logic [$clog2(NCH)-1:0] uw_ch,
  output logic [NCH-1:0]         tracking,   // carrier is in TRACK
  output logic                   acq_done,   // preload pulse
  // clock feedback to the interpolator control
  output logic                   est_stb,
  output logic                   adj_stb,
  output logic [$clog2(NCH)-1:0] err_ch,
  output logic signed [7:0]      err_val
);
  localparam int CW = $clog2(NCH);
  localparam int PRE = 4 * HALF;           // preamble samples

  typedef enum logic [1:0] {IDLE, ACQ, WAIT, TRACK} mode_e;
  mode_e             mode [NCH];
  logic              par  [NCH];           // 0: next sample is even
  logic signed [7:0] prv_i [NCH], prv_q [NCH], mid_i [NCH], mid_q [NCH];
  logic [$clog2(PRE+1)-1:0] acnt;
  logic              acq_busy;
  logic [CW-1:0]     acq_ch;

  // ---------------- stage 0: routing ----------------
  logic start_acq, acq_in;
  assign start_acq = in_valid && sob && !acq_busy;
  assign acq_in    = start_acq ||
                     (in_valid && acq_busy && in_ch == acq_ch && mode[in_ch] == ACQ);

  logic              a_done;
  logic signed [7:0] a_theta0, a_dtheta, a_tau0;
  acq_estimator #(.HALF(HALF)) u_acq (
    .clk, .rst_n, .start(start_acq), .in_valid(acq_in), .i_in, .q_in,
    .done(a_done), .theta0(a_theta0), .dtheta(a_dtheta), .tau0(a_tau0)
  );

  logic [7:0] theta;
  logic       rot_in, rot_v;
  logic signed [7:0] rot_i, rot_q;
  assign rot_in = in_valid && !sob && mode[in_ch] == TRACK;

  phase_rotator u_rot (
    .clk, .in_valid(rot_in), .i_in, .q_in, .theta,
    .out_valid(rot_v), .i_out(rot_i), .q_out(rot_q)
  );

  logic [CW-1:0] r_ch;
  logic          r_par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        mode[c] <= IDLE; par[c] <= 1'b0;
      end
      acq_busy <= 1'b0; acq_ch <= '0; acnt <= '0; r_ch <= '0; r_par <= 1'b0;
    end else begin
      if (in_valid) begin
        par[in_ch] <= sob ? 1'b1 : !par[in_ch];
        r_ch  <= in_ch;
        r_par <= sob ? 1'b0 : par[in_ch];
      end
      if (start_acq) begin
        acq_busy <= 1'b1; acq_ch <= in_ch; acnt <= 1; mode[in_ch] <= ACQ;
      end else if (acq_in) begin
        acnt <= acnt + 1'b1;
        if (acnt == $bits(acnt)'(PRE - 1)) mode[acq_ch] <= WAIT;
      end
      if (a_done) begin
        mode[acq_ch] <= TRACK; acq_busy <= 1'b0;
      end
    end
  end

  // ---------------- loops ----------------
  logic              c_upd, t_upd;
  logic signed [7:0] pe, te;
  logic [CW-1:0]     loop_ch;
  logic signed [23:0] f0;
  logic signed [7:0] tau_unused;
  logic signed [23:0] freq_unused;
  assign loop_ch = a_done ? acq_ch : r_ch;
  // dtheta is 512 per turn over HALF symbols; the frequency accumulator is
  // 2^24 per turn per update (one update per symbol).
  assign f0 = -(24'(a_dtheta) <<< (15 - $clog2(HALF)));

  carrier_loop #(.NCH(NCH)) u_cl (
    .clk, .rst_n, .ch(loop_ch), .rd_ch(in_ch), .preload(a_done),
    .theta0(8'(-(a_theta0 >>> 1))), .freq0(f0),
    .upd(c_upd && !a_done), .err(pe), .kp, .kf, .theta, .freq(freq_unused)
  );

  timing_loop #(.NCH(NCH)) u_tl (
    .clk, .rst_n, .ch(loop_ch), .preload(a_done), .tau0(a_tau0),
    .upd(t_upd && !a_done), .err(te), .kt, .tau(tau_unused)
  );

  // ---------------- stage 1: decisions and error detectors ----------------
  function automatic logic signed [7:0] sat8(input logic signed [19:0] v);
    if (v > 127) return 8'sd127;
    if (v < -127) return -8'sd127;
    return v[7:0];
  endfunction

  logic signed [9:0]  pd;
  logic signed [19:0] gard;
  always_comb begin
    // negated decision-directed phase error, halved to 8 bits
    pd = (rot_i[7] ? -10'(rot_q) : 10'(rot_q)) - (rot_q[7] ? -10'(rot_i) : 10'(rot_i));
    pe = sat8(-20'(pd >>> 1));
    gard = 20'(mid_i[r_ch]) * (20'(prv_i[r_ch]) - 20'(rot_i))
         + 20'(mid_q[r_ch]) * (20'(prv_q[r_ch]) - 20'(rot_q));
    te = sat8(gard >>> 9);
    c_upd = rot_v && !r_par;
    t_upd = rot_v && !r_par;
  end

  always_ff @(posedge clk) begin
    if (rot_v) begin
      if (!r_par) begin prv_i[r_ch] <= rot_i; prv_q[r_ch] <= rot_q; end
      else        begin mid_i[r_ch] <= rot_i; mid_q[r_ch] <= rot_q; end
    end
  end

  logic [NCH-1:0] polarity;
  uw_detector #(.NCH(NCH), .UWLEN(UWLEN), .UW(UW), .MAXERR(MAXERR)) u_uw (
    .clk, .rst_n, .sym_valid(c_upd), .ch(r_ch), .bit_i(rot_i[7]), .bit_q(rot_q[7]),
    .uw_det, .uw_inv, .det_ch(uw_ch), .polarity
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_valid <= 1'b0; bit_ch <= '0; bit_i <= 1'b0; bit_q <= 1'b0;
      est_stb <= 1'b0; adj_stb <= 1'b0; err_ch <= '0; err_val <= '0;
    end else begin
      bit_valid <= c_upd;
      bit_ch    <= r_ch;
      bit_i     <= rot_i[7] ^ polarity[r_ch];
      bit_q     <= rot_q[7] ^ polarity[r_ch];
      est_stb   <= a_done;
      adj_stb   <= t_upd && !a_done;
      if (a_done) begin
        err_ch  <= acq_ch;
        err_val <= sat8(20'(a_tau0) <<< 1);
      end else begin
        err_ch  <= r_ch;
        err_val <= sat8(20'($signed({1'b0, kt}) * te) >>> 8);
      end
    end
  end

  always_comb
    for (int c = 0; c < NCH; c++) tracking[c] = (mode[c] == TRACK);
  assign acq_done = a_done;
endmodule
