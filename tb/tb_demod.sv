// tb_demod: two interleaved QPSK bursts (carriers 0 and 1) at two samples
// per symbol, each with its own carrier phase and frequency offset.  Each
// burst is a "0101" preamble, the unique word in both rails, then random
// data.  Carrier 1 starts after carrier 0 has been acquired.  Checks: both
// bursts are acquired (preload pulse), the unique word is found on both,
// every data symbol after the unique word comes out with the transmitted
// bits (180-degree ambiguity removed by the unique word), and the clock
// feedback strobes (estimate and adjust) occur.
module tb_demod;
  localparam real PI = 3.14159265358979323846;
  localparam int HALF = 16;
  localparam logic [15:0] UW = 16'hE6A2;
  localparam int NSYM = 2 * HALF + 16 + 200;
  localparam int DSTART = 2 * HALF + 16;

  logic clk = 0, rst_n;
  logic in_valid, sob;
  logic [1:0] in_ch;
  logic signed [7:0] i_in, q_in;
  logic [7:0] kp, kf, kt;
  logic bit_valid, bit_i, bit_q, uw_det, uw_inv, acq_done, est_stb, adj_stb;
  logic [1:0] bit_ch, uw_ch, err_ch;
  logic [3:0] tracking;
  logic signed [7:0] err_val;
  int checks = 0, failures = 0;

  demod dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitted bits per carrier: {i, q}
  logic [1:0] txb [2][NSYM];
  real th [2], fr [2];
  int  idx [2];                 // next sample index per carrier
  // expected symbol index of each decision, per carrier
  int  expq0 [$], expq1 [$];
  int  uwseen [2], acqs = 0, ests = 0, adjs = 0, datachk [2];

  function automatic logic signed [7:0] q8(real v);
    return 8'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  // complex baseband sample n (two per symbol) of carrier c
  task automatic sample(input int c, input int n, output logic signed [7:0] si,
                        output logic signed [7:0] sq);
    int k;
    real a_i, a_q, ph, cr, ci;
    k = n / 2;
    if (n % 2 == 0) begin
      a_i = txb[c][k][1] ? -80.0 : 80.0;
      a_q = txb[c][k][0] ? -80.0 : 80.0;
    end else begin
      a_i = ((txb[c][k][1] ? -80.0 : 80.0) + (txb[c][k+1][1] ? -80.0 : 80.0)) / 2.0;
      a_q = ((txb[c][k][0] ? -80.0 : 80.0) + (txb[c][k+1][0] ? -80.0 : 80.0)) / 2.0;
    end
    ph = (th[c] + fr[c] * (real'(n) / 2.0)) * PI / 180.0;
    cr = a_i * $cos(ph) - a_q * $sin(ph);
    ci = a_i * $sin(ph) + a_q * $cos(ph);
    si = q8(cr); sq = q8(ci);
  endtask

  task automatic send(input int c);
    logic signed [7:0] si, sq;
    sample(c, idx[c], si, sq);
    in_valid = 1; in_ch = 2'(c); sob = (idx[c] == 0); i_in = si; q_in = sq;
    // a decision is made for an even sample that enters while tracking
    if (idx[c] % 2 == 0 && tracking[c] && idx[c] != 0) begin
      if (c == 0) expq0.push_back(idx[c] / 2); else expq1.push_back(idx[c] / 2);
    end
    idx[c]++;
  endtask

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (acq_done) acqs++;
    if (est_stb) ests++;
    if (adj_stb) adjs++;
    if (uw_det) uwseen[uw_ch] = 1;
    if (bit_valid) begin
      int k;
      if (bit_ch == 0) k = expq0.pop_front(); else k = expq1.pop_front();
      if (k >= DSTART && uwseen[bit_ch]) begin
        checks++; datachk[bit_ch]++;
        if ({bit_i, bit_q} !== txb[bit_ch][k]) begin
          failures++;
          if (failures < 10)
            $display("carrier %0d symbol %0d: got %b%b exp %b", bit_ch, k, bit_i, bit_q,
                     txb[bit_ch][k]);
        end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; sob = 0; in_ch = 0; i_in = 0; q_in = 0;
    kp = 8'd16; kf = 8'd2; kt = 8'd4;
    th[0] = 30.0; fr[0] = 0.4;
    th[1] = -110.0; fr[1] = -0.3;
    for (int c = 0; c < 2; c++) begin
      idx[c] = 0; uwseen[c] = 0; datachk[c] = 0;
      for (int k = 0; k < NSYM; k++) begin
        if (k < 2 * HALF)   txb[c][k] = (k % 2 == 0) ? 2'b00 : 2'b11;
        else if (k < DSTART) txb[c][k] = {2{UW[15 - (k - 2 * HALF)]}};
        else                txb[c][k] = 2'($urandom);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // carrier 0 alone until acquired, then both interleaved
    while (idx[0] < 4 * HALF + 10) begin
      send(0); @(posedge clk); #1;
      in_valid = 0; @(posedge clk); #1;
    end
    while (idx[0] < 2 * NSYM - 2 || idx[1] < 2 * NSYM - 2) begin
      if (idx[0] < 2 * NSYM - 2) begin send(0); @(posedge clk); #1; end
      if (idx[1] < 2 * NSYM - 2) begin send(1); @(posedge clk); #1; end
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (acqs != 2) begin failures++; $display("acquisitions %0d", acqs); end
    checks++; if (ests != 2) begin failures++; $display("estimates %0d", ests); end
    checks++; if (adjs == 0) begin failures++; $display("no clock adjust"); end
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (!uwseen[c] || datachk[c] < 150) begin
        failures++; $display("carrier %0d: uw %0d data %0d", c, uwseen[c], datachk[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
