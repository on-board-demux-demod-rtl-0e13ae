// ifm_control: shared control of the interpolating filter module (IFM).
//
// The IFM turns each carrier's demultiplexed samples, whose rate is some
// value near two samples per symbol, into exactly two samples per symbol
// placed on the symbol peaks and zero crossings.  It does this with a FIR
// filter whose coefficients are picked per output by a fractional phase.
// This module produces, for every processing slot, which channel is served,
// whether a new input sample must be shifted into that channel's filter
// (clock gate), whether an output is produced (data valid) and the 16
// filter coefficients.
//   * Block address counter (7 bits), restarted by block_sync, reads the
//     128 x 32 mapping RAM: word bits [1:0] channel ID, [2] channel enable,
//     [3] set-next, [6:4] channel type (which phase plan), other bits spare.
//   * Four 14-bit carrier address counters step through their carrier's
//     phase plan; a comparator restarts a counter at the end of its plan.
//   * Six phase plan PROMs (one per carrier type), 8-bit words, 128 deep
//     (the plans used here repeat within 68 slots):
//     [5:0] fractional phase (1/64 sample), [6] clock gate, [7] data valid.
//     Plan type t converts R_t = (64 + D_t)/64 input samples per output:
//     per slot, a sample is shifted in if the next output needs a newer one,
//     and an output is made once the newest needed sample is present; so
//     with R > 1 some slots give no output, with R < 1 samples are reused.
//   * Clock error accumulators, one per channel: loaded with the clock
//     estimate at the start of a burst, incremented by the demodulator's
//     clock adjustments (8 bits, 1/256 sample).
//   * The sum of plan phase and clock error (8 bits) addresses the 16
//     coefficient PROMs: a 16-tap Hamming-windowed sinc interpolator,
//     coefficient k(mu) = 127 * sinc(8 - k - mu) * w(k - mu), 256 phases.
// Timing: slot outputs are registered: the mapping RAM word read in clock n
// drives the outputs in clock n+1.  The plan ratios D_t and the bit
// assignments of the RAM and PROM words are this design's choices.
module ifm_control
  import dd_pkg::*;
#(
  parameter int NCH = 4,
  parameter int NTAP = 16,
  parameter int D0 = 0, parameter int D1 = 2, parameter int D2 = -2,
  parameter int D3 = 4, parameter int D4 = -4, parameter int D5 = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              block_sync,
  input  logic              map_we,          // mapping RAM write
  input  logic [6:0]        map_waddr,
  input  logic [31:0]       map_wdata,
  input  logic              est_stb,         // clock estimate (start of burst)
  input  logic              adj_stb,         // clock adjust from the demodulator
  input  logic [1:0]        err_ch,
  input  logic signed [7:0] err_val,
  output logic              slot_en,         // a channel is served this slot
  output logic [1:0]        slot_ch,
  output logic              clk_gate,        // shift a new sample in
  output logic              data_valid,      // the filter output is a sample
  output logic              set_next,
  output logic [7:0]        phase,           // phase correction used
  output logic signed [7:0] coef [NTAP]
);
  localparam int PLEN = 128;
  localparam int DS [6] = '{D0, D1, D2, D3, D4, D5};
  typedef logic [7:0] prom_t [6*PLEN];
  typedef logic [7:0] coef_t [256*NTAP];

  // plan length of a type: 64 outputs, and 64 + D slots when D > 0
  function automatic int plan_len(int d);
    return (d > 0) ? 64 + d : 64;
  endfunction

  function automatic prom_t build_plans();
    prom_t p;
    for (int t = 0; t < 6; t++) begin
      int pin, j, need;
      pin = 0; j = 0;
      for (int a = 0; a < PLEN; a++) begin
        logic g, v;
        need = (j * (64 + DS[t])) / 64 + 1;       // floor(j R) + 1
        g = (pin < need);
        if (g) pin++;
        v = (pin == need);
        p[t*PLEN + a] = {v, g, 6'((j * (64 + DS[t])) % 64)};
        if (v) j++;
        if (a % plan_len(DS[t]) == plan_len(DS[t]) - 1) begin pin = 0; j = 0; end
      end
    end
    return p;
  endfunction

  function automatic coef_t build_coefs();
    coef_t c;
    for (int m = 0; m < 256; m++)
      for (int k = 0; k < NTAP; k++) begin
        real x, s, w;
        x = real'(NTAP / 2 - k) - real'(m) / 256.0;
        s = (x == 0.0) ? 1.0 : $sin(3.14159265358979 * x) / (3.14159265358979 * x);
        w = 0.54 + 0.46 * $cos(3.14159265358979 * x / real'(NTAP / 2 + 1));
        c[m*NTAP + k] = 8'($rtoi($floor(127.0 * s * w + 0.5)));
      end
    return c;
  endfunction

  localparam prom_t PLAN = build_plans();
  localparam coef_t COEF = build_coefs();

  logic [31:0]       map_ram [128];
  logic [6:0]        baddr;
  logic [13:0]       caddr [NCH];
  logic signed [7:0] err_acc [NCH];

  always_ff @(posedge clk) if (map_we) map_ram[map_waddr] <= map_wdata;

  // mapping word of this clock
  logic [31:0] w;
  logic [1:0]  w_ch;
  logic [2:0]  w_type;
  logic [7:0]  pword;
  assign w      = map_ram[baddr];
  assign w_ch   = w[1:0];
  assign w_type = (w[6:4] > 3'd5) ? 3'd5 : w[6:4];
  assign pword  = PLAN[{w_type, caddr[w_ch][6:0]}];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      baddr <= '0;
      for (int c = 0; c < NCH; c++) begin caddr[c] <= '0; err_acc[c] <= '0; end
      slot_en <= 1'b0; slot_ch <= '0; clk_gate <= 1'b0; data_valid <= 1'b0;
      set_next <= 1'b0; phase <= '0;
    end else begin
      baddr <= block_sync ? 7'd0 : baddr + 7'd1;
      if (w[2]) begin
        // carrier address counter with restart comparator
        if (int'(caddr[w_ch]) == plan_len(DS[w_type]) - 1) caddr[w_ch] <= '0;
        else                                                caddr[w_ch] <= caddr[w_ch] + 14'd1;
      end
      if (est_stb)      err_acc[err_ch] <= err_val;
      else if (adj_stb) err_acc[err_ch] <= err_acc[err_ch] + err_val;
      slot_en    <= w[2];
      slot_ch    <= w_ch;
      clk_gate   <= w[2] && pword[6];
      data_valid <= w[2] && pword[7];
      set_next   <= w[3];
      phase      <= {pword[5:0], 2'b00} + 8'(err_acc[w_ch]);
    end
  end

  always_comb for (int k = 0; k < NTAP; k++) coef[k] = COEF[{phase, 4'(k)}];
endmodule
