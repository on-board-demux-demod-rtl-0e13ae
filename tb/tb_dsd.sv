// tb_dsd: checks a full 32-bit delay-switch-delay (eight 4-bit slices) in all
// four configurations.
// Each input stream i carries a tag {i, cycle}; the test checks that the
// output is the block transpose a DSD must produce:
//   radix-4, block size k: Y_j at cycle 3k + 4kg + bk + m  =  X_b at 4kg + jk + m
//   radix-2 (k = 8), pair p: Y_(2p+j) at 8 + 16g + 8b + m  =  X_(2p+b) at 16g + 8j + m
// It also checks EOBKOUT/ (EOBKIN/ delayed by 3k, or 8), the counter restart
// by EOBKIN/ and that FREERUN makes the slice ignore EOBKIN/.
module tb_dsd;
  localparam int W = 32;
  logic clk = 0, clr_n, eobk_in_n, freerun, eobk_out_n;
  logic [1:0] stg;
  logic [W-1:0] x [4];
  logic [W-1:0] y [4];
  int checks = 0, failures = 0;

  dsd #(.DW(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] tag(int i, int c);
    return W'((i << 28) | (c * 32'h00010001) ^ 32'h0a50_5a05);
  endfunction

  task automatic run(input int cfg, input bit fr, input int offset);
    int k, per, lat, ncyc;
    int eob_at [$];
    k   = (cfg == 0) ? 1 : (cfg == 1) ? 4 : (cfg == 2) ? 16 : 8;
    per = (cfg == 3) ? 16 : 4 * k;
    lat = (cfg == 3) ? 8 : 3 * k;
    ncyc = 5 * per + lat;
    stg = 2'(cfg); freerun = fr; clr_n = 0; eobk_in_n = 1;
    for (int i = 0; i < 4; i++) x[i] = '0;
    repeat (2) @(posedge clk);
    #1 clr_n = 1;
    // with FREERUN clear, an EOBKIN/ before the first block re-times the slice
    for (int c = -offset; c < ncyc; c++) begin
      for (int i = 0; i < 4; i++) x[i] = tag(i, c < 0 ? 4000 : c);
      if (fr) eobk_in_n = !((c >= 0) && (c % per == 1));
      else    eobk_in_n = !(((c + per) % per) == per - 1);
      if (!eobk_in_n && c >= 0) eob_at.push_back(c);
      #3;
      if (c >= lat) begin
        int r, g, b, m;
        r = c - lat;
        g = r / per; b = (r % per) / k; m = r % k;
        for (int j = 0; j < 4; j++) begin
          logic [W-1:0] exp_v;
          if (cfg == 3) begin
            int p, jj;
            p = j / 2; jj = j % 2;
            exp_v = tag(2 * p + b, 16 * g + 8 * jj + m);
          end else
            exp_v = tag(b, per * g + j * k + m);
          checks++;
          if (y[j] !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("cfg%0d fr%0d c=%0d Y%0d=%h exp %h", cfg, fr, c, j + 1, y[j], exp_v);
          end
        end
        // EOBKOUT/ follows EOBKIN/ by the latency
        checks++;
        if (eobk_out_n !== !((c - lat) >= 0 && ((fr && (c - lat) % per == 1) ||
                                                 (!fr && (c - lat) % per == per - 1)))) begin
          failures++;
          $display("cfg%0d c=%0d EOBKOUT/ wrong", cfg, c);
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    for (int cfg = 0; cfg < 4; cfg++) run(cfg, 0, 0);
    for (int cfg = 0; cfg < 4; cfg++) run(cfg, 1, 0);
    // start the data 3 cycles late: an EOBKIN/ marks the cycle before sample 0
    for (int cfg = 0; cfg < 4; cfg++) run(cfg, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
