// tb_ifft_reorder: writes frames whose transforms (32, 16, 8, 4, 2 points
// and two empty slots) arrive in bit-reversed order and checks that each
// frame comes back one frame later in natural order, with only the second
// half of every transform marked valid and the right carrier number.
module tb_ifft_reorder;
  import dd_pkg::*;
  localparam int NF = 3;
  logic clk = 0, rst_n, dvalid, sof_out;
  logic [1:0] carrier;
  cplx_t din, dout;
  ifft_tag_t tin;
  int checks = 0, failures = 0;
  int base_of [64], lg_of [64];

  ifft_reorder dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int v, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (v & (1 << b)) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  initial begin
    for (int p = 0; p < 64; p++) begin
      if (p < 32)      begin base_of[p] = 0;  lg_of[p] = 5; end
      else if (p < 48) begin base_of[p] = 32; lg_of[p] = 4; end
      else if (p < 56) begin base_of[p] = 48; lg_of[p] = 3; end
      else if (p < 60) begin base_of[p] = 56; lg_of[p] = 2; end
      else if (p < 62) begin base_of[p] = 60; lg_of[p] = 1; end
      else             begin base_of[p] = p;  lg_of[p] = 0; end
    end
    rst_n = 0; din = '0; tin = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 64 * (NF + 1); c++) begin
      int f, p;
      f = c / 64; p = c % 64;
      din = '0; tin = '0;
      if (f < NF) begin
        din.re = CW'(1000 * f + p); din.im = CW'(-p);
        tin.valid = lg_of[p] > 0; tin.sof = (p == 0);
        tin.carrier = 2'(base_of[p] % 4); tin.lg2n = 3'(lg_of[p]);
      end else if (p == 0) tin.sof = 1;
      @(posedge clk); #1;
      checks++;
      if (f == 0) begin
        if (dvalid || sof_out) failures++;
      end else begin
        int q, b, src;
        bit ev;
        q = p; b = base_of[q];
        src = b + bitrev(q - b, lg_of[q]);
        ev = lg_of[q] > 0 && (q - b) >= (1 << lg_of[q]) / 2;
        if (dvalid !== ev || sof_out !== (q == 0) ||
            (ev && (dout.re !== CW'(1000 * (f - 1) + src) || carrier !== 2'(b % 4)))) begin
          failures++;
          if (failures < 10) $display("f%0d q%0d got %0d v%0d exp %0d v%0d", f, q, dout.re, dvalid,
                                      1000 * (f - 1) + src, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
