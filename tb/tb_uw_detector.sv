// tb_uw_detector: sends random symbols to two interleaved carriers, embeds
// the unique word in carrier 1 (with two bit errors) and its inverse in
// carrier 2, and checks that detections happen exactly where the words end,
// with the right channel and inversion flag, and that random data around
// them gives no false detection.  The expected result is computed here by
// counting disagreements independently.
module tb_uw_detector;
  localparam logic [15:0] UW = 16'hE6A2;
  logic clk = 0, rst_n, sym_valid, bit_i, bit_q, uw_det, uw_inv;
  logic [1:0] ch, det_ch;
  logic [3:0] polarity;
  int checks = 0, failures = 0, ndet = 0;
  logic [15:0] hi [4], hq [4];

  uw_detector dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sym_valid = 0; ch = 0; bit_i = 0; bit_q = 0;
    for (int c = 0; c < 4; c++) begin hi[c] = '0; hq[c] = '0; end
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int c, pos, m;
      bit exp_det, exp_inv;
      c = 1 + (n % 2); pos = n / 2;
      ch = 2'(c); sym_valid = 1;
      bit_i = 1'($urandom_range(1)); bit_q = 1'($urandom_range(1));
      if (pos >= 100 && pos < 116) begin
        logic b;
        b = UW[115 - pos];
        if (c == 2) b = ~b;
        bit_i = b; bit_q = b;
        if (c == 1 && (pos == 103 || pos == 110)) bit_q = ~b;   // two bit errors
      end
      hi[c] = {hi[c][14:0], bit_i}; hq[c] = {hq[c][14:0], bit_q};
      m = $countones(hi[c] ^ UW) + $countones(hq[c] ^ UW);
      exp_det = (m <= 3) || (m >= 29);
      exp_inv = (m >= 29);
      @(posedge clk); #1;
      checks++;
      if (uw_det !== exp_det || (exp_det && (uw_inv !== exp_inv || det_ch !== ch))) begin
        failures++;
        $display("n %0d ch %0d det %0d inv %0d exp %0d %0d", n, c, uw_det, uw_inv, exp_det, exp_inv);
      end
      if (uw_det) ndet++;
      if (pos == 115) begin
        checks++;
        if (c == 1 && (!uw_det || uw_inv)) failures++;
        if (c == 2 && (!uw_det || !uw_inv || !polarity[2])) failures++;
      end
    end
    checks++;
    if (ndet < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
