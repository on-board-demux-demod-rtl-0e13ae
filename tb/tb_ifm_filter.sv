// tb_ifm_filter: writes random samples for three channels into the data
// buffer, then runs random slots (channel, shift or reuse, output or not,
// random coefficients) and compares each output with a 16-tap FIR over the
// channel's own sample history kept here.  Also checks the underflow flag
// when a channel with no buffered samples is asked for one.
module tb_ifm_filter;
  logic clk = 0, rst_n, in_valid, slot_en, clk_gate, data_valid, out_valid, underflow;
  logic [1:0] in_ch, slot_ch, out_ch;
  logic signed [7:0] in_data, out_data;
  logic signed [7:0] coef [16];
  int checks = 0, failures = 0;
  int hist [4][$];          // samples written, per channel
  int used [4];             // samples shifted in, per channel
  int sr [4][16];

  ifm_filter dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; slot_en = 0; clk_gate = 0; data_valid = 0;
    in_ch = 0; slot_ch = 0; in_data = 0;
    for (int k = 0; k < 16; k++) coef[k] = 0;
    for (int c = 0; c < 4; c++) begin used[c] = 0; for (int k = 0; k < 16; k++) sr[c][k] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      in_valid = 1; in_ch = 2'(n % 3); in_data = 8'(int'($urandom_range(200)) - 100);
      hist[n % 3].push_back(int'(in_data));
      @(posedge clk); #1;
    end
    in_valid = 0;
    for (int n = 0; n < 300; n++) begin
      int c, acc, e;
      bit uf;
      c = (n < 290) ? int'($urandom_range(2)) : 3;    // channel 3 has no data
      slot_en = 1; slot_ch = 2'(c);
      clk_gate = (used[c] < 45) ? 1'($urandom_range(1)) : 1'b0;
      if (c == 3) clk_gate = 1;
      data_valid = 1'($urandom_range(1));
      for (int k = 0; k < 16; k++) coef[k] = 8'(int'($urandom_range(100)) - 50);
      uf = 0;
      if (clk_gate) begin
        for (int k = 15; k > 0; k--) sr[c][k] = sr[c][k-1];
        if (used[c] < hist[c].size()) begin sr[c][0] = hist[c][used[c]]; used[c]++; end
        else begin sr[c][0] = 0; uf = 1; end
      end
      acc = 0;
      for (int k = 0; k < 16; k++) acc += sr[c][k] * int'(coef[k]);
      e = (acc + 64) >>> 7;
      if (e > 127) e = 127;
      if (e < -127) e = -127;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== data_valid || (data_valid && (out_data !== 8'(e) || out_ch !== 2'(c))) ||
          underflow !== uf) begin
        failures++;
        if (failures < 10) $display("n %0d ch %0d got %0d v%0d uf%0d exp %0d v%0d uf%0d", n, c,
                                    out_data, out_valid, underflow, e, data_valid, uf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
