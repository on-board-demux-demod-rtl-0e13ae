// phase_rotator: removes the carrier beat from a QPSK sample by the 2x2
// rotation  I = cos(t) I' - sin(t) Q',  Q = sin(t) I' + cos(t) Q',
// where t is the carrier loop's phase estimate.  Samples are 8-bit signed
// (+/-127); the phase is 8 bits for a full turn (256 = 360 degrees).  The
// sine/cosine table (256 x 8, 127 = 1.0) is built at elaboration.  The
// products are rounded and saturated to +/-127.  Latency: one clock.
module phase_rotator (
  input  logic              clk,
  input  logic              in_valid,
  input  logic signed [7:0] i_in,
  input  logic signed [7:0] q_in,
  input  logic        [7:0] theta,
  output logic              out_valid,
  output logic signed [7:0] i_out,
  output logic signed [7:0] q_out
);
  typedef logic [7:0] trig_t [256];

  function automatic trig_t build_cos();
    trig_t t;
    for (int a = 0; a < 256; a++)
      t[a] = 8'($rtoi($floor(127.0 * $cos(2.0 * 3.14159265358979 * a / 256.0) + 0.5)));
    return t;
  endfunction

  localparam trig_t COS = build_cos();

  function automatic logic signed [7:0] sat8(logic signed [16:0] v);
    logic signed [16:0] r;
    r = (v + 17'sd64) >>> 7;                // /128 with rounding
    if (r > 127)       return 8'sd127;
    else if (r < -127) return -8'sd127;
    else               return 8'(r);
  endfunction

  always_ff @(posedge clk) begin
    logic signed [7:0] c, s;
    c = COS[theta];
    s = COS[8'(theta - 8'd64)];              // sin(t) = cos(t - 90 deg)
    i_out     <= sat8(17'(c * i_in) - 17'(s * q_in));
    q_out     <= sat8(17'(s * i_in) + 17'(c * q_in));
    out_valid <= in_valid;
  end
endmodule
