// tb_ifft_var: sends frames holding a mixture of inverse transforms
// (32, 16, 8, 4 and 2 points plus two empty slots) through one IFFT lane and
// compares every output with a direct inverse DFT computed here, taking the
// bit-reversed output order into account.  Checks the 36-clock latency
// (tag.sof) and that smaller transforms bypassed the early butterflies.
module tb_ifft_var;
  import dd_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NF = 3, L = 36;
  logic clk = 0, rst_n;
  cplx_t din, dout;
  ifft_tag_t tin, tout;
  logic [4:0] bfly_used;
  int checks = 0, failures = 0;
  int xr [NF][64], xi [NF][64];
  int base_of [64], lg_of [64];
  int bypass_cnt = 0, bfly_cnt = 0;

  ifft_var dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int bitrev(int v, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (v & (1 << b)) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  initial begin
    // frame layout
    for (int p = 0; p < 64; p++) begin
      if (p < 32)      begin base_of[p] = 0;  lg_of[p] = 5; end
      else if (p < 48) begin base_of[p] = 32; lg_of[p] = 4; end
      else if (p < 56) begin base_of[p] = 48; lg_of[p] = 3; end
      else if (p < 60) begin base_of[p] = 56; lg_of[p] = 2; end
      else if (p < 62) begin base_of[p] = 60; lg_of[p] = 1; end
      else             begin base_of[p] = p;  lg_of[p] = 0; end
    end
    for (int f = 0; f < NF; f++) for (int p = 0; p < 64; p++) begin
      xr[f][p] = int'($urandom_range(1000)) - 500;
      xi[f][p] = int'($urandom_range(1000)) - 500;
    end
    rst_n = 0; din = '0; tin = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 64 * (NF + 1); c++) begin
      int f, p;
      f = c / 64; p = c % 64;
      din = '0; tin = '0;
      if (f < NF) begin
        din.re = CW'(xr[f][p]); din.im = CW'(xi[f][p]);
        tin.valid = lg_of[p] > 0; tin.sof = (p == 0);
        tin.carrier = 2'(p % 4); tin.lg2n = 3'(lg_of[p]);
      end
      @(posedge clk); #1;
      // the first stage (span 16) works only on the second half of the
      // 32-point transform and bypasses the smaller ones
      if (f < NF) begin
        checks++;
        if (bfly_used[0] !== (p >= 16 && p < 32)) failures++;
        if (bfly_used[0]) bfly_cnt++;
        if (p >= 48 && lg_of[p] > 0 && !bfly_used[0]) bypass_cnt++;
      end
      // output for input clock c - L + 1 is visible now
      if (c - L + 1 >= 0 && (c - L + 1) / 64 < NF) begin
        int oc, of, op, n, k, b;
        real er, ei;
        oc = c - L + 1; of = oc / 64; op = oc % 64;
        checks++;
        if (tout.sof !== (op == 0)) begin failures++; $display("sof wrong at %0d", oc); end
        if (lg_of[op] > 0) begin
          n = 1 << lg_of[op]; b = base_of[op];
          k = bitrev(op - b, lg_of[op]);
          er = 0; ei = 0;
          for (int m = 0; m < n; m++) begin
            real a;
            a = 2.0 * PI * real'(m * k) / real'(n);
            er += real'(xr[of][b + m]) * $cos(a) - real'(xi[of][b + m]) * $sin(a);
            ei += real'(xr[of][b + m]) * $sin(a) + real'(xi[of][b + m]) * $cos(a);
          end
          checks++;
          if (rabs(er - real'(dout.re)) > 10.0 || rabs(ei - real'(dout.im)) > 10.0) begin
            failures++;
            if (failures < 10) $display("f%0d p%0d got %0d,%0d exp %f,%f", of, op, dout.re, dout.im, er, ei);
          end
        end
      end
    end
    $display("butterflies %0d", bfly_cnt);
    checks++;
    if (bypass_cnt == 0) begin failures++; $display("no bypass seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
