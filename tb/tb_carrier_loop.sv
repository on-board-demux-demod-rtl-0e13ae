// tb_carrier_loop: closes the loop around an ideal phase detector for two
// carriers served in turn, each with its own frequency offset and a wrong
// starting phase, and checks that both lock (phase error within 2 units and
// the frequency accumulator at the offset), that the carriers' contexts do
// not disturb each other, that preload sets phase and frequency, and the
// exact value of one multiply-accumulate step.
module tb_carrier_loop;
  logic clk = 0, rst_n, preload, upd;
  logic [1:0] ch, rd_ch;
  assign rd_ch = ch;
  logic [7:0] theta0, kp, kf, theta;
  logic signed [7:0] err;
  logic signed [23:0] freq0;
  logic signed [23:0] freq;
  int checks = 0, failures = 0;
  int truep [2], off [2];

  carrier_loop dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int v);
    v = v % 256; if (v > 127) v -= 256; if (v < -128) v += 256;
    return v;
  endfunction

  initial begin
    rst_n = 0; preload = 0; upd = 0; ch = 0; theta0 = 0; freq0 = 0; err = 0;
    kp = 8'd40; kf = 8'd200;
    @(posedge clk); #1 rst_n = 1;
    // exact single step: f = 0 + 200 * (-5) = -1000
    ch = 2; upd = 1; err = -8'sd5;
    @(posedge clk); #1 upd = 0;
    checks++; if (freq !== -24'sd1000) begin failures++; $display("step freq %0d", freq); end
    // preload both carriers 20 units away from the truth, no frequency
    truep[0] = 100; truep[1] = 200; off[0] = 3; off[1] = -2;
    for (int c = 0; c < 2; c++) begin
      ch = 2'(c); preload = 1; theta0 = 8'(truep[c] - 20); freq0 = 0;
      @(posedge clk); #1 preload = 0;
      checks++; if (theta !== theta0 || freq !== 0) failures++;
    end
    for (int n = 0; n < 1200; n++) begin
      int c, e;
      c = n % 2;
      ch = 2'(c); #1;
      truep[c] = (truep[c] + off[c]) % 256;
      e = wrap(truep[c] - int'(theta));
      err = 8'(e); upd = 1;
      @(posedge clk); #1 upd = 0;
      if (n >= 1000) begin
        checks++;
        if (e > 2 || e < -2) begin
          failures++; if (failures < 10) $display("n %0d ch %0d err %0d", n, c, e);
        end
      end
    end
    for (int c = 0; c < 2; c++) begin
      ch = 2'(c); #1;
      checks++;
      if (int'(freq >>> 16) - off[c] > 1 || int'(freq >>> 16) - off[c] < -1) begin
        failures++; $display("ch %0d freq %0d expected %0d", c, freq >>> 16, off[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
