// tb_timing_loop: closes the first-order loop around an ideal timing
// detector for two carriers with different timing offsets and checks that
// both settle on their own offset, that preload sets the estimate, and the
// exact result of one update; then 500 random preloads and updates on
// random carriers, each compared with a bit-exact model of the accumulators.
module tb_timing_loop;
  logic clk = 0, rst_n, preload, upd;
  logic [1:0] ch;
  logic signed [7:0] tau0, err, tau;
  logic [7:0] kt;
  int checks = 0, failures = 0;
  int target [2];
  logic [15:0] model [4];

  timing_loop dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; preload = 0; upd = 0; ch = 0; tau0 = 0; err = 0; kt = 8'd128;
    @(posedge clk); #1 rst_n = 1;
    ch = 3; preload = 1; tau0 = 8'sd5;
    @(posedge clk); #1 preload = 0;
    checks++; if (tau !== 8'sd5) failures++;
    upd = 1; err = 8'sd4;                 // +128*4/256 = +2
    @(posedge clk); #1 upd = 0;
    checks++; if (tau !== 8'sd7) begin failures++; $display("step tau %0d", tau); end
    target[0] = -40; target[1] = 70; kt = 8'd30;
    for (int c = 0; c < 2; c++) begin
      ch = 2'(c); preload = 1; tau0 = 8'sd0;
      @(posedge clk); #1 preload = 0;
    end
    for (int n = 0; n < 400; n++) begin
      int c;
      c = n % 2; ch = 2'(c); #1;
      err = 8'(target[c] - int'(tau)); upd = 1;
      @(posedge clk); #1 upd = 0;
    end
    for (int c = 0; c < 2; c++) begin
      ch = 2'(c); #1;
      checks++;
      if (int'(tau) - target[c] > 8 || int'(tau) - target[c] < -8) begin
        failures++; $display("ch %0d tau %0d target %0d", c, tau, target[c]);
      end
    end
    // random operations against a model of the four accumulators
    for (int c = 0; c < 4; c++) begin
      ch = 2'(c); preload = 1; tau0 = 8'sd0; model[c] = '0;
      @(posedge clk); #1 preload = 0;
    end
    for (int n = 0; n < 500; n++) begin
      int op, c;
      op = int'($urandom % 3); c = int'($urandom % 4);
      ch = 2'(c); kt = 8'($urandom); err = 8'($urandom); tau0 = 8'($urandom);
      preload = (op == 0); upd = (op == 1);
      if (op == 0) model[c] = {tau0, 8'd0};
      else if (op == 1) model[c] = model[c] + 16'(int'(kt) * int'(err));
      @(posedge clk); #1 preload = 0; upd = 0;
      checks++;
      if (tau !== model[c][15:8]) begin
        failures++;
        if (failures < 10) $display("op %0d ch %0d tau %0d model %0d", op, c, tau, model[c][15:8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
