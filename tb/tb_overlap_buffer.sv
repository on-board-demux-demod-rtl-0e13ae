// tb_overlap_buffer: feeds a numbered sample stream (two per clock) and
// checks that block b, read during segment b+2, holds samples
// 128b .. 128b+255 in the FFT's stream order, that blocks overlap by half,
// and the timing of eob_out_n and out_valid.
module tb_overlap_buffer;
  import dd_pkg::*;
  logic clk = 0, rst_n, eob_out_n, out_valid;
  cplx_t din [2];
  cplx_t dout [4];
  int checks = 0, failures = 0;

  overlap_buffer dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    din[0] = '0; din[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 64 * 8; cyc++) begin
      din[0].re = CW'(2 * cyc);     din[0].im = CW'(-2 * cyc);
      din[1].re = CW'(2 * cyc + 1); din[1].im = CW'(-2 * cyc - 1);
      @(posedge clk); #1;
      // registered output now shows the read of clock cyc
      if (cyc >= 128) begin
        int s, t, b;
        s = cyc / 64; t = cyc % 64; b = s - 2;
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (dout[j].re !== CW'(128 * b + t + 64 * j) || dout[j].im !== CW'(-(128 * b + t + 64 * j))) begin
            failures++;
            if (failures < 10) $display("cyc %0d j %0d got %0d", cyc, j, dout[j].re);
          end
        end
        checks++;
        if (!out_valid) failures++;
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      checks++;
      if (eob_out_n !== !(cyc % 64 == 63)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
