// tb_demux_demod_top: end-to-end run of the whole receive chain at its
// default parameters.
// Stimulus: a complex tone exactly on FFT bin 42 (amplitude A) at two
// samples per clock.  Frequency plan: lane 0 carries carrier 0 (8-point
// inverse transform, bins 40-47, frame clocks 0-7) and carrier 1 (32-point,
// bins 100-131, clocks 32-63); lane 1 carries carrier 2 (16-point, bins
// 200-215); the rest of the plan is empty.  Interpolator map: carrier 0 on
// every 16th slot with a plan that needs more input than output, carrier 1
// on every 4th slot with a plan that reuses samples.  A burst start is
// announced for carrier 0 once samples flow.
// Data checks, after the pipeline has filled: every valid lane-0 sample of
// carrier 0 has magnitude A (one bin through an unscaled inverse transform)
// and every valid sample of carriers 1 and 2 is close to zero.
// Mechanism counts (a failure for each that never happens): FFT blocks
// (DSD reorder switching), IFFT stages bypassed for small transforms, full
// 32-point transforms, valid reordered samples, interpolator slots without
// output (skip), slots reusing a sample, set-next flags, interpolated
// outputs, burst acquisition and preload, symbol decisions and clock
// adjustments fed back to the interpolator.
module tb_demux_demod_top;
  import dd_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real A = 1500.0;
  localparam int BIN = 42;
  localparam int NCLK = 7000;

  logic clk = 0, rst_n;
  cplx_t din [2];
  logic pw_en, map_we, sob_req;
  logic [7:0] pw_addr;
  plan_t pw_data;
  logic [6:0] map_waddr;
  logic [31:0] map_wdata;
  logic [7:0] kp, kf, kt;
  logic [1:0] sob_ch;
  cplx_t lane_y [4];
  logic [3:0] lane_valid, lane_sof;
  logic [1:0] lane_carrier [4];
  logic fft_eob_n;
  logic [4:0] bfly_used [4];
  logic ifm_slot_en, ifm_clk_gate, ifm_set_next, ifm_data_valid, ifm_underflow, ifm_valid;
  logic bit_valid, bit_i, bit_q, uw_det, uw_inv, acq_done, clk_adj;
  logic [1:0] bit_ch, uw_ch;
  logic [3:0] tracking;
  int checks = 0, failures = 0;

  demux_demod_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (NCLK + 3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int n = 0;
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      real ph;
      ph = 2.0 * PI * real'(BIN) * real'((2 * n + k) % 256) / 256.0;
      din[k].re <= 16'($rtoi(A * $cos(ph)));
      din[k].im <= 16'($rtoi(A * $sin(ph)));
    end
    n <= n + 1;
  end

  // ---------------- monitors ----------------
  int cyc = 0;
  int m_fft = 0, m_bypass = 0, m_full = 0, m_lane = 0, m_skip = 0, m_reuse = 0;
  int m_setnext = 0, m_ifm = 0, m_acq = 0, m_dec = 0, m_adj = 0, m_uf = 0;
  int c0 = 0, c1 = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!fft_eob_n) m_fft++;
    if (bfly_used[0] != 5'b11111 && bfly_used[0] != 5'b00000) m_bypass++;
    if (bfly_used[0][0]) m_full++;           // the 16-span stage works only for 32 points
    if (lane_valid[0]) m_lane++;
    if (ifm_slot_en && ifm_data_valid == 1'b0) m_skip++;
    if (ifm_slot_en && !ifm_clk_gate && ifm_data_valid) m_reuse++;
    if (ifm_set_next) m_setnext++;
    if (ifm_valid) m_ifm++;
    if (ifm_underflow) m_uf++;
    if (acq_done) m_acq++;
    if (bit_valid) m_dec++;
    if (clk_adj) m_adj++;
    if (cyc > 1500) begin
      for (int l = 0; l < 2; l++) if (lane_valid[l]) begin
        real mag;
        mag = $sqrt(real'(lane_y[l].re) ** 2 + real'(lane_y[l].im) ** 2);
        checks++;
        if (l == 0 && lane_carrier[l] == 0) begin
          c0++;
          if (mag < 0.9 * A || mag > 1.1 * A) begin
            failures++;
            if (failures < 10) $display("carrier 0 magnitude %f at %0d", mag, cyc);
          end
        end else begin
          c1++;
          if (mag > 0.05 * A) begin
            failures++;
            if (failures < 10) $display("carrier %0d magnitude %f at %0d",
                                        lane_carrier[l], mag, cyc);
          end
        end
      end
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end
  endtask

  // ---------------- sequence ----------------
  initial begin
    rst_n = 0; pw_en = 0; map_we = 0; sob_req = 0; sob_ch = 0;
    pw_addr = 0; pw_data = '0; map_waddr = 0; map_wdata = 0;
    kp = 8'd16; kf = 8'd2; kt = 8'd4;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // frequency plan: entry 4c+l = lane l, frame clock c
    for (int c = 0; c < 64; c++)
      for (int l = 0; l < 4; l++) begin
        plan_t p;
        p = '0;
        if (l == 0 && c < 8) begin
          p.en = 1; p.bin = 8'(40 + c); p.carrier = 0; p.lg2n = 3;
        end else if (l == 0 && c >= 32) begin
          p.en = 1; p.bin = 8'(100 + c - 32); p.carrier = 1; p.lg2n = 5;
        end else if (l == 1 && c < 16) begin
          p.en = 1; p.bin = 8'(200 + c); p.carrier = 2; p.lg2n = 4;
        end
        p.coef = 16'sd16384;
        pw_en = 1; pw_addr = 8'(4 * c + l); pw_data = p;
        @(posedge clk); #1;
      end
    pw_en = 0;
    // interpolator mapping RAM: {type, setnext, enable, channel}
    for (int s = 0; s < 128; s++) begin
      map_we = 1; map_waddr = 7'(s);
      if (s % 16 == 0)     map_wdata = {25'd0, 3'd1, (s == 0) ? 1'b1 : 1'b0, 1'b1, 2'd0};
      else if (s % 4 == 1) map_wdata = {25'd0, 3'd2, 1'b0, 1'b1, 2'd1};
      else                 map_wdata = 32'd0;
      @(posedge clk); #1;
    end
    map_we = 0;
    repeat (1500) @(posedge clk);
    #1 sob_req = 1; sob_ch = 0;
    @(posedge clk); #1 sob_req = 0;
    repeat (NCLK - 1500 - 400) @(posedge clk);
    $display("fft %0d bypass %0d full %0d lane %0d skip %0d reuse %0d setnext %0d ifm %0d",
             m_fft, m_bypass, m_full, m_lane, m_skip, m_reuse, m_setnext, m_ifm);
    $display("acq %0d decisions %0d adjust %0d underflow %0d checked c0 %0d other %0d",
             m_acq, m_dec, m_adj, m_uf, c0, c1);
    need("FFT block", m_fft);
    need("IFFT stage bypass", m_bypass);
    need("IFFT full size", m_full);
    need("reordered sample", m_lane);
    need("interpolator skip", m_skip);
    need("interpolator reuse", m_reuse);
    need("set-next", m_setnext);
    need("interpolated sample", m_ifm);
    need("acquisition preload", m_acq);
    need("symbol decision", m_dec);
    need("clock adjust", m_adj);
    checks++;
    if (c0 < 100 || c1 < 100) begin
      failures++; $display("too few lane samples checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
