// tb_fft256: runs three 256-point blocks (a tone, a random block, an
// impulse pair) through the radix-4 pipeline and compares every output bin
// with a direct DFT computed here in floating point and divided by 256.
// Checks the digit-reversed output order, the 64-clock block rate and the
// 67-clock latency of the end-of-block marker.
module tb_fft256;
  import dd_pkg::*;
  localparam int NB = 3, TOL = 6;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, clr_n, eob_in_n, eob_out_n;
  cplx_t x [4];
  cplx_t y [4];
  int checks = 0, failures = 0;
  int xr [NB][256], xi [NB][256];
  int cyc = 0, nblk = 0;

  fft256 dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int digrev3(int t);
    return ((t & 3) << 4) | (t & 12) | ((t >> 4) & 3);
  endfunction

  // compare one output block; out_t is the block clock of the output
  task automatic check_bin(int b, int t, int q);
    real er, ei;
    int k;
    k = digrev3(t) + 64 * q;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < 256; n++) begin
      real a;
      a = -2.0 * PI * real'(k * n % 256) / 256.0;
      er += real'(xr[b][n]) * $cos(a) - real'(xi[b][n]) * $sin(a);
      ei += real'(xr[b][n]) * $sin(a) + real'(xi[b][n]) * $cos(a);
    end
    er /= 256.0; ei /= 256.0;
    checks++;
    if (rabs(er - real'(y[q].re)) > TOL || rabs(ei - real'(y[q].im)) > TOL) begin
      failures++;
      if (failures < 400) $display("blk %0d t %0d bin %0d: got %0d,%0d exp %f,%f", b, k,
                                  t, y[q].re, y[q].im, er, ei);
    end
  endtask

  // output monitor
  int out_t = -1;
  int ob = 0;
  always @(negedge clk) if (clr_n) begin
    if (out_t >= 0) begin
      for (int q = 0; q < 4; q++) check_bin(ob, out_t, q);
      out_t++;
      if (out_t == 64) begin out_t = -1; ob++; end
    end
    if (!eob_out_n) begin
      checks++;
      if (cyc != 63 + 67 + 64 * nblk) begin
        failures++; $display("eob_out at cycle %0d, expected %0d", cyc, 63 + 67 + 64 * nblk);
      end
      nblk++;
    end
    // start of an output block: the clock after eob_out 67 clocks after input start
    if (cyc == 66 + 64 * ob && ob < NB && out_t < 0) out_t = 0;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      xr[0][n] = $rtoi(6000.0 * $cos(2.0 * PI * 5.0 * n / 256.0));
      xi[0][n] = $rtoi(6000.0 * $sin(2.0 * PI * 5.0 * n / 256.0));
      xr[1][n] = int'($urandom_range(16000)) - 8000;
      xi[1][n] = int'($urandom_range(16000)) - 8000;
      xr[2][n] = (n == 0) ? 20000 : (n == 77) ? -9000 : 0;
      xi[2][n] = (n == 3) ? 12000 : 0;
    end
    clr_n = 0; eob_in_n = 1;
    for (int j = 0; j < 4; j++) x[j] = '0;
    repeat (3) @(posedge clk);
    #1 clr_n = 1;
    for (int b = 0; b < NB + 2; b++)
      for (int t = 0; t < 64; t++) begin
        for (int j = 0; j < 4; j++) begin
          x[j].re = (b < NB) ? CW'(xr[b][t + 64 * j]) : '0;
          x[j].im = (b < NB) ? CW'(xi[b][t + 64 * j]) : '0;
        end
        eob_in_n = (t != 63);
        @(posedge clk); #1 cyc++;
      end
    checks++;
    if (ob != NB) begin failures++; $display("only %0d blocks checked", ob); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
