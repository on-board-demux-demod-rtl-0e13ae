// tb_acq_estimator: builds "0101" preambles (two samples per symbol) with a
// known carrier phase, frequency offset and timing offset, and checks the
// end-of-preamble estimates against values computed here:
//   theta0 = phase at the end of the preamble (modulo 180 deg),
//   dtheta = phase change over half the preamble, tau0 = timing offset,
// with the transition sample equal to g times the data sample
// (tau = atan(g)).  Several fixed cases, both signs, and 30 random ones.
module tb_acq_estimator;
  localparam real PI = 3.14159265358979323846;
  localparam int HALF = 16;
  logic clk = 0, rst_n, start, in_valid, done;
  logic signed [7:0] i_in, q_in, theta0, dtheta, tau0;
  int checks = 0, failures = 0;

  acq_estimator dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrapu(real v);     // to -128..127, modulo 256
    int r;
    r = $rtoi($floor(v + 0.5));
    r = ((r % 256) + 256) % 256;
    return (r > 127) ? r - 256 : r;
  endfunction

  function automatic int wdiff(int a, int b);
    return wrapu(real'(a - b));
  endfunction

  task automatic run(real th_deg, real f_deg, real g);
    real e_th0, e_dth, e_tau;
    start = 0; in_valid = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 4 * HALF; n++) begin
      int k;
      real ph, amp, sgn;
      k = n / 2;
      ph = (45.0 + th_deg + f_deg * k) * PI / 180.0;
      sgn = (k % 2 == 0) ? 1.0 : -1.0;
      amp = (n % 2 == 0) ? 100.0 : 100.0 * g;
      i_in = 8'($rtoi(sgn * amp * $cos(ph)));
      q_in = 8'($rtoi(sgn * amp * $sin(ph)));
      start = (n == 0); in_valid = 1;
      @(posedge clk); #1;
    end
    start = 0; in_valid = 0;
    e_th0 = (th_deg + f_deg * (2.0 * HALF - 0.5)) * 128.0 / 90.0;
    e_dth = f_deg * HALF * 128.0 / 90.0;
    e_tau = $atan(g) * 180.0 / PI * 128.0 / 180.0;
    repeat (3) begin
      @(posedge clk); #1;
      if (done) begin
        checks++;
        if (wdiff(theta0, wrapu(e_th0)) > 3 || wdiff(theta0, wrapu(e_th0)) < -3 ||
            wdiff(dtheta, wrapu(e_dth)) > 3 || wdiff(dtheta, wrapu(e_dth)) < -3 ||
            wdiff(tau0, wrapu(e_tau)) > 3 || wdiff(tau0, wrapu(e_tau)) < -3) begin
          failures++;
          $display("th %f f %f g %f: got %0d %0d %0d exp %f %f %f", th_deg, f_deg, g,
                   theta0, dtheta, tau0, e_th0, e_dth, e_tau);
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; in_valid = 0; i_in = 0; q_in = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(10.0, 0.0, 0.0);
    run(-30.0, 0.5, 0.3);
    run(60.0, -0.8, -0.4);
    run(-70.0, 1.0, 0.15);
    run(0.0, 0.2, -0.2);
    // random phase, frequency and timing offsets
    for (int r = 0; r < 30; r++)
      run(real'(int'($urandom % 161) - 80), real'(int'($urandom % 201) - 100) / 100.0,
          real'(int'($urandom % 81) - 40) / 100.0);
    checks++;
    if (checks < 36) failures++;       // every run must have produced a result
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
