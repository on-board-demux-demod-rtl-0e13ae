// tb_freq_filter: loads a random plan, feeds three FFT frames whose bin k
// carries a value derived from k and the frame number (in the FFT's
// digit-reversed order), and checks that each lane slot of the following
// frame carries bin[plan.bin] * plan.coef with the plan's tag, one clock after
// the read address (frame clock 0 right after the end-of-block marker), and that no frame is marked valid before the first
// transform has been stored.
module tb_freq_filter;
  import dd_pkg::*;
  logic clk = 0, rst_n, fft_eob_n, pw_en;
  logic [7:0] pw_addr;
  plan_t pw_data;
  cplx_t fft_y [4];
  cplx_t lane_y [4];
  ifft_tag_t lane_tag [4];
  plan_t pl [256];
  int checks = 0, failures = 0;

  freq_filter dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int binval(int k, int f);
    return k * 37 + f * 1000 - 5000;
  endfunction

  initial begin
    rst_n = 0; fft_eob_n = 1; pw_en = 0; pw_addr = '0; pw_data = '0;
    for (int q = 0; q < 4; q++) fft_y[q] = '0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      pl[a].en = ($urandom_range(7) != 0);
      pl[a].bin = 8'($urandom_range(255));
      pl[a].coef = 16'(int'($urandom_range(32767)) - 16384);
      pl[a].carrier = 2'($urandom_range(3));
      pl[a].lg2n = 3'($urandom_range(5, 1));
      #1 pw_en = 1; pw_addr = 8'(a); pw_data = pl[a];
      @(posedge clk);
    end
    #1 pw_en = 0; rst_n = 1;
    for (int f = 0; f < 4; f++)
      for (int t = 0; t < 64; t++) begin
        for (int q = 0; q < 4; q++) begin
          int k;
          k = ((t & 3) << 4) | (t & 12) | ((t >> 4) & 3);
          k = k + 64 * q;
          fft_y[q].re = CW'(binval(k, f));
          fft_y[q].im = CW'(-binval(k, f) / 3);
        end
        fft_eob_n = (t != 63);
        @(posedge clk); #1;
        // output of read clock t of the frame built from frame f-1
        for (int l = 0; l < 4; l++) begin
          plan_t e;
          e = pl[{6'(t), 2'(l)}];
          checks++;
          if (f == 0) begin
            if (lane_tag[l].valid) failures++;
          end else begin
            int er, ei;
            er = (binval(e.bin, f - 1) * e.coef) >>> 14;
            ei = ((-binval(e.bin, f - 1) / 3) * e.coef) >>> 14;
            if (lane_tag[l].valid !== e.en || lane_tag[l].carrier !== e.carrier ||
                lane_tag[l].lg2n !== e.lg2n || lane_tag[l].sof !== (t == 0) ||
                lane_y[l].re !== CW'(er) || lane_y[l].im !== CW'(ei)) begin
              failures++;
              if (failures < 10) $display("f%0d t%0d l%0d got %0d exp %0d", f, t, l, lane_y[l].re, er);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
