// acq_estimator: preamble-based acquisition of carrier phase, carrier
// frequency and symbol timing for one burst, using table lookups instead of
// arithmetic units.
//
// Input accumulation: the burst starts with a "0101" preamble in both
// channels, sampled twice per symbol (even = data-detection point, odd =
// transition point).  Four 19-bit accumulators sum I and Q times the even
// and odd preamble sequences (+/-64 on their own phase, 0 on the other),
// which strips the alternating modulation: Ie, Io, Qe, Qo.  This is done
// separately over each half of the preamble (HALF symbols each).
// Coded sums of squares: each pair (U, V) is turned into a logarithmic code
// c = 16*log2(U^2 + V^2) (exponent and four mantissa bits).  The ratio of two
// sums of squares is then a code difference, and one 512-entry table gives
// atan(sqrt(Y/X)) from it.  The sign of a sum of two products resolves the
// quadrant.  Point estimates, per half:
//   carrier phase  theta = s * atan(sqrt((Qe^2+Qo^2)/(Ie^2+Io^2))) - 45 deg,
//                  s = sgn(Ie Qe + Io Qo), result modulo 180 deg
//   symbol timing  tau   = s * atan(sqrt((Io^2+Qo^2)/(Ie^2+Qe^2))),
//                  s = sgn(Ie Io + Qe Qo)
// End of preamble: theta0 = theta2 + (theta2 - theta1)/2 (modulo 180 deg),
// dtheta = theta2 - theta1 (phase change over HALF symbols), tau0 =
// (tau1 + tau2)/2.  Units: theta0 and dtheta 128 = 90 degrees (8 bits cover
// the 180-degree range the preamble can resolve; the unique word removes the
// rest), tau0 128 = 180 degrees of symbol phase.
// Timing: samples with in_valid, start marks the first (even) sample; `done`
// pulses two clocks after the last preamble sample.
module acq_estimator #(
  parameter int HALF = 16        // symbols per preamble half
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              in_valid,
  input  logic signed [7:0] i_in,
  input  logic signed [7:0] q_in,
  output logic              done,
  output logic signed [7:0] theta0,
  output logic signed [7:0] dtheta,
  output logic signed [7:0] tau0
);
  localparam int SH = $clog2(HALF) + 6;       // 19-bit sums back to 8 bits
  localparam real PI = 3.14159265358979323846;

  // atan(sqrt(2^(d/16))) = atan(2^(d/32)) in units of 90 deg = 128, d = cY - cX
  typedef logic [7:0] atan_t [512];
  function automatic atan_t build_atan();
    atan_t t;
    for (int k = 0; k < 512; k++) begin
      int d, v;
      d = (k < 256) ? k : k - 512;
      v = $rtoi($floor($atan($pow(2.0, real'(d) / 32.0)) * 256.0 / PI + 0.5));
      t[k] = 8'((v > 127) ? 127 : v);
    end
    return t;
  endfunction
  localparam atan_t ATAN = build_atan();

  // coded sum of squares: 16 * log2(u^2 + v^2), exponent + 4 mantissa bits
  function automatic logic [7:0] sq_code(logic signed [7:0] u, logic signed [7:0] v);
    logic [15:0] s;
    logic [7:0]  c;
    s = 16'(u * u) + 16'(v * v);
    c = '0;
    for (int e = 0; e < 16; e++)
      if (s[e]) c = {4'(e), 4'((32'(s) << 4 >> e) & 32'hf)};
    return c;
  endfunction

  function automatic logic [7:0] atan_lut(logic [7:0] cy, logic [7:0] cx);
    logic [8:0] d;
    d = 9'({1'b0, cy}) - 9'({1'b0, cx});
    return ATAN[d];
  endfunction

  logic signed [18:0] acc_ie, acc_io, acc_qe, acc_qo;
  logic [$clog2(2*HALF)+1:0] n;      // sample count within the preamble
  logic running, half_end, calc;
  logic second;                     // the half being finished is the second
  logic signed [7:0] th1, ta1, th2, ta2;

  // preamble sequences: symbol k carries (-1)^k; the even PROM gives +/-64
  // on even samples, the odd PROM +/-64 on odd samples, 0 otherwise
  logic [$clog2(2*HALF)+1:0] nn;
  logic signed [7:0] pe, po;
  logic signed [15:0] p_ie, p_io, p_qe, p_qo;
  assign nn = start ? '0 : n;
  always_comb begin
    pe = nn[0] ? 8'sd0 : (nn[1] ? -8'sd64 : 8'sd64);
    po = nn[0] ? (nn[1] ? -8'sd64 : 8'sd64) : 8'sd0;
    p_ie = i_in * pe; p_io = i_in * po;
    p_qe = q_in * pe; p_qo = q_in * po;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0; n <= '0; half_end <= 1'b0; second <= 1'b0;
      acc_ie <= '0; acc_io <= '0; acc_qe <= '0; acc_qo <= '0;
    end else begin
      half_end <= 1'b0;
      if (in_valid && (start || running)) begin
        // a new half starts at sample 0 and at sample 2*HALF
        if (int'(nn) == 0 || int'(nn) == 2 * HALF) begin
          acc_ie <= 19'(p_ie); acc_io <= 19'(p_io);
          acc_qe <= 19'(p_qe); acc_qo <= 19'(p_qo);
        end else begin
          acc_ie <= acc_ie + 19'(p_ie); acc_io <= acc_io + 19'(p_io);
          acc_qe <= acc_qe + 19'(p_qe); acc_qo <= acc_qo + 19'(p_qo);
        end
        n <= nn + 1'b1;
        running <= (int'(nn) != 4 * HALF - 1);
        if (int'(nn) == 2 * HALF - 1 || int'(nn) == 4 * HALF - 1) begin
          half_end <= 1'b1;
          second   <= (int'(nn) == 4 * HALF - 1);
        end
      end
    end
  end

  // point estimate of one half (combinational from the finished sums)
  logic signed [7:0] ie, io, qe, qo, th_pt, ta_pt;
  always_comb begin
    logic [7:0] a_th, a_ta;
    logic signed [16:0] s_th, s_ta;
    ie = 8'(acc_ie >>> SH); io = 8'(acc_io >>> SH);
    qe = 8'(acc_qe >>> SH); qo = 8'(acc_qo >>> SH);
    a_th = atan_lut(sq_code(qe, qo), sq_code(ie, io));
    a_ta = atan_lut(sq_code(io, qo), sq_code(ie, qe));
    s_th = 17'(ie * qe) + 17'(io * qo);
    s_ta = 17'(ie * io) + 17'(qe * qo);
    th_pt = 8'((s_th < 0) ? -int'(a_th) - 64 : int'(a_th) - 64);   // 128 = 90 deg
    ta_pt = 8'((s_ta < 0) ? -int'(a_ta / 2) : int'(a_ta / 2));     // 128 = 180 deg
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0; calc <= 1'b0;
      th1 <= '0; ta1 <= '0; th2 <= '0; ta2 <= '0;
      theta0 <= '0; dtheta <= '0; tau0 <= '0;
    end else begin
      done <= 1'b0;
      calc <= 1'b0;
      if (half_end) begin
        if (second) begin th2 <= th_pt; ta2 <= ta_pt; calc <= 1'b1; end
        else        begin th1 <= th_pt; ta1 <= ta_pt; end
      end
      if (calc) begin
        logic signed [7:0] d;
        d = th2 - th1;                          // wraps modulo 180 deg
        dtheta <= d;
        theta0 <= th2 + (d >>> 1);
        tau0   <= 8'((9'(ta1) + 9'(ta2)) >>> 1);
        done   <= 1'b1;
      end
    end
  end
endmodule
