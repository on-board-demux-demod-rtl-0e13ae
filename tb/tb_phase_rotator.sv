// tb_phase_rotator: rotates random samples by random phases and compares
// with the rotation computed here in floating point (tolerance 2 LSB).
module tb_phase_rotator;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, in_valid, out_valid;
  logic signed [7:0] i_in, q_in, i_out, q_out;
  logic [7:0] theta;
  int checks = 0, failures = 0;

  phase_rotator dut (.*);

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

  initial begin
    in_valid = 0; i_in = 0; q_in = 0; theta = 0;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      real a, ei, eq;
      #1;
      i_in = 8'(int'($urandom_range(180)) - 90);
      q_in = 8'(int'($urandom_range(180)) - 90);
      theta = 8'($urandom_range(255));
      in_valid = n[0];
      a = 2.0 * PI * real'(theta) / 256.0;
      ei = $cos(a) * real'(i_in) - $sin(a) * real'(q_in);
      eq = $sin(a) * real'(i_in) + $cos(a) * real'(q_in);
      @(posedge clk); #1;
      checks++;
      if (rabs(ei - real'(i_out)) > 2.0 || rabs(eq - real'(q_out)) > 2.0 || out_valid !== in_valid) begin
        failures++;
        if (failures < 10) $display("th %0d in %0d,%0d got %0d,%0d exp %f,%f", theta, i_in, q_in, i_out, q_out, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
