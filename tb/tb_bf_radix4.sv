// tb_bf_radix4: drives random samples into a stage-2 butterfly and compares
// each output with the 4-point DFT of the inputs, divided by 4 and
// multiplied by W_256^(q * (t mod 16) * 4), computed here in floating point.
// Also checks the one-clock latency of data and end-of-block marker and the
// restart of the position counter after eob_in_n.
module tb_bf_radix4;
  import dd_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, clr_n, eob_in_n, eob_out_n;
  cplx_t x [4];
  cplx_t y [4];
  int checks = 0, failures = 0;
  real er [4], ei [4];
  int t;

  bf_radix4 #(.STAGE(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    clr_n = 0; eob_in_n = 1;
    for (int j = 0; j < 4; j++) x[j] = '0;
    repeat (2) @(posedge clk);
    #1 clr_n = 1;
    t = 0;
    for (int c = 0; c < 300; c++) begin
      real ar [4], ai [4];
      for (int j = 0; j < 4; j++) begin
        x[j].re = CW'(int'($urandom_range(60000)) - 30000);
        x[j].im = CW'(int'($urandom_range(60000)) - 30000);
        ar[j] = real'(x[j].re); ai[j] = real'(x[j].im);
      end
      // block of 64 clocks, except one short block of 10 to test the restart
      eob_in_n = !((c < 100 && t == 63) || (c >= 100 && t == 9));
      for (int q = 0; q < 4; q++) begin
        real sr, si, a;
        sr = 0; si = 0;
        for (int j = 0; j < 4; j++) begin
          a = -2.0 * PI * real'(j * q) / 4.0;
          sr += ar[j] * $cos(a) - ai[j] * $sin(a);
          si += ar[j] * $sin(a) + ai[j] * $cos(a);
        end
        sr /= 4.0; si /= 4.0;
        a = -2.0 * PI * real'((q * (t % 16) * 4) % 256) / 256.0;
        er[q] = sr * $cos(a) - si * $sin(a);
        ei[q] = sr * $sin(a) + si * $cos(a);
      end
      @(posedge clk); #1;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (rabs(er[q] - real'(y[q].re)) > 3.0 || rabs(ei[q] - real'(y[q].im)) > 3.0) begin
          failures++;
          if (failures < 10) $display("c=%0d q=%0d got %0d %0d exp %f %f", c, q,
                                      y[q].re, y[q].im, er[q], ei[q]);
        end
      end
      checks++;
      if (eob_out_n !== eob_in_n) failures++;
      t = eob_in_n ? t + 1 : 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
