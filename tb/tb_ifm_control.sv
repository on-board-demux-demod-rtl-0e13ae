// tb_ifm_control: maps four channels round-robin onto the 128 slots with
// plan types 0..3 (R = 64/64, 66/64, 62/64, 68/64 input samples per
// output) and follows each channel's slots.  For every output it checks,
// against positions computed here from R alone, that exactly floor(j R) + 1
// samples have been shifted in and that the phase is frac(j R) plus the
// channel's clock error; the clock error is loaded and adjusted on one
// channel half-way.  Also checks that phase 0 gives a unit impulse at tap 8
// and that every coefficient set sums to about 1.0.
module tb_ifm_control;
  logic clk = 0, rst_n, block_sync, map_we, est_stb, adj_stb;
  logic [6:0] map_waddr;
  logic [31:0] map_wdata;
  logic [1:0] err_ch, slot_ch;
  logic signed [7:0] err_val;
  logic slot_en, clk_gate, data_valid, set_next;
  logic [7:0] phase;
  logic signed [7:0] coef [16];
  int checks = 0, failures = 0;
  int shifts [4], outs [4], errc [4];
  int dd [4] = '{0, 2, -2, 4};
  int nval = 0, nreuse = 0, nskip = 0;

  ifm_control dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; block_sync = 0; map_we = 0; est_stb = 0; adj_stb = 0;
    err_ch = 0; err_val = 0; map_waddr = 0; map_wdata = 0;
    for (int a = 0; a < 128; a++) begin
      @(posedge clk); #1;
      map_we = 1; map_waddr = 7'(a);
      map_wdata = {25'd0, 3'(a % 4), 1'b0, 1'b1, 2'(a % 4)};
    end
    @(posedge clk); #1 map_we = 0; block_sync = 1;
    for (int c = 0; c < 4; c++) begin shifts[c] = 0; outs[c] = 0; errc[c] = 0; end
    @(posedge clk); #1 rst_n = 1; block_sync = 0;
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) begin est_stb = 1; err_ch = 1; err_val = 8'sd10; end
      else if (n == 2001) begin est_stb = 0; adj_stb = 1; err_ch = 1; err_val = 8'sd3; end
      else adj_stb = 0;
      @(posedge clk); #1;
      if (n == 2001) errc[1] = 10;          // the accumulator is used a clock after it is written
      if (n == 2002) errc[1] = 13;
      if (slot_en) begin
        int c, j, need, ph;
        c = slot_ch;
        if (clk_gate) shifts[c]++;
        if (data_valid) begin
          j = outs[c] % 64;                         // plans restart every 64 outputs
          need = (outs[c] / 64) * (64 + dd[c]) + (j * (64 + dd[c])) / 64 + 1;
          ph = (((j * (64 + dd[c])) % 64) * 4 + errc[c]) % 256;
          checks++;
          if (shifts[c] != need || int'(phase) != ph) begin
            failures++;
            if (failures < 10) $display("ch %0d out %0d: shifts %0d need %0d phase %0d exp %0d",
                                        c, outs[c], shifts[c], need, phase, ph);
          end
          outs[c]++; nval++;
          if (!clk_gate) nreuse++;
        end else if (clk_gate) nskip++;
      end
      if (phase == 0) begin
        checks++;
        for (int k = 0; k < 16; k++) if (coef[k] !== ((k == 8) ? 8'sd127 : 8'sd0)) failures++;
      end else begin
        int s;
        s = 0;
        for (int k = 0; k < 16; k++) s += coef[k];
        checks++;
        if (s < 118 || s > 136) begin failures++; $display("coef sum %0d at phase %0d", s, phase); end
      end
    end
    $display("outputs %0d, reused %0d, skipped %0d", nval, nreuse, nskip);
    checks++;
    if (nreuse == 0 || nskip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
