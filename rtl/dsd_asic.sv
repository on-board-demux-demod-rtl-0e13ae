// dsd_asic: one 4-bit-wide slice of a delay-switch-delay (DSD) reorder unit.
//
// A DSD sits between two butterflies of a pipeline FFT and transposes 4x4
// groups of k-sample blocks across its four input streams, so that the next
// butterfly sees the four samples it combines at the same time.  It works in
// three steps: input stream i is delayed by i*k clocks, a switch permutes the
// four streams, and output stream j is delayed by (3-j)*k clocks.
//
// Configuration (STG0-1, used as the delay-multiplexer select MUXSL0-1):
//   stg   X2  X3  X4 | Y1  Y2  Y3  Y4   switch
//   0      1   2   3 |  3   2   1   0   4-state, changes every clock
//   1      4   8  12 | 12   8   4   0   4-state, every 4 clocks
//   2     16  32  48 | 48  32  16   0   4-state, every 16 clocks
//   3      8   0   8 |  8   0   8   0   2-state (radix 2), every 8 clocks
// The delay lines are 16/32/48-stage shift registers on X2/X3/X4 and 48/32/16
// on Y1/Y2/Y3, each read through a 4:1 multiplexer; X1 and Y4 are never delayed.
// 4-state switch in state s: OUT_j = IN_((s-j) mod 4) (state 0 swaps B/D,
// 1 swaps A/B and C/D, 2 swaps A/C, 3 swaps A/D and B/C).
// 2-state switch: state 0 straight through, state 1 swaps A/B and C/D.
// The delay values, shift-register lengths, 4:1 multiplexers, the switch
// states and the controller's pin names follow the ASIC's published
// description; the controller's timing below is this design's own choice.
//
// Controller: a 6-bit cycle counter gives the switch state (bits [2k..] of the
// count).  CLR/ (clr_n) low clears the counter and the shift registers.
// EOBKIN/ (eobk_in_n) low marks the last sample of an input block; the next
// sample is sample 0 of the following block (counter restarts) unless FREERUN
// is high, in which case the counter just keeps counting.  EOBKOUT/ is
// EOBKIN/ delayed by the slice latency (3k, or 8 in radix-2 mode), so it marks
// the last sample of the reordered output block.  All outputs are valid the
// same cycle as the shift-register taps (no extra output register).
module dsd_asic
  import dd_pkg::*;
#(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         clr_n,       // CLR/
  input  logic [1:0]   stg,         // STG0-STG1
  input  logic         eobk_in_n,   // EOBKIN/
  input  logic         freerun,     // FREERUN
  input  logic [W-1:0] x [4],       // X1n..X4n
  output logic [W-1:0] y [4],       // Y1n..Y4n
  output logic         eobk_out_n   // EOBKOUT/
);

  localparam int L = 48;            // longest shift register

  logic [5:0]   cnt;
  logic [1:0]   state;
  logic [W-1:0] sr_in  [1:3][L];    // input-side shift registers (X2..X4)
  logic [W-1:0] sr_out [0:2][L];    // output-side shift registers (Y1..Y3)
  logic [W-1:0] din    [4];         // after input delay (INA..IND)
  logic [W-1:0] sw     [4];         // after switch (OUTA..OUTD)
  logic [L-1:0] eob_sr;

  // delay (in clocks) of input stream i / output stream j for a configuration
  function automatic int in_delay(int i, logic [1:0] cfg);
    case (cfg)
      2'd0: return i;
      2'd1: return 4 * i;
      2'd2: return 16 * i;
      default: return (i % 2) * 8;
    endcase
  endfunction

  function automatic int out_delay(int j, logic [1:0] cfg);
    return in_delay(3 - j, cfg);
  endfunction

  // ---------------- controller ----------------
  always_ff @(posedge clk) begin
    if (!clr_n)                      cnt <= '0;
    else if (!eobk_in_n && !freerun) cnt <= '0;
    else                             cnt <= cnt + 6'd1;
  end

  always_comb begin
    case (stg)
      2'd0:    state = cnt[1:0];
      2'd1:    state = cnt[3:2];
      2'd2:    state = cnt[5:4];
      default: state = {1'b0, cnt[3]};
    endcase
  end

  // ---------------- shift registers (BCLR/ = clr_n) ----------------
  always_ff @(posedge clk) begin
    if (!clr_n) begin
      for (int i = 1; i <= 3; i++) for (int t = 0; t < L; t++) sr_in[i][t] <= '0;
      for (int j = 0; j <= 2; j++) for (int t = 0; t < L; t++) sr_out[j][t] <= '0;
      eob_sr <= '1;
    end else begin
      for (int i = 1; i <= 3; i++) begin
        sr_in[i][0] <= x[i];
        for (int t = 1; t < L; t++) sr_in[i][t] <= sr_in[i][t-1];
      end
      for (int j = 0; j <= 2; j++) begin
        sr_out[j][0] <= sw[j];
        for (int t = 1; t < L; t++) sr_out[j][t] <= sr_out[j][t-1];
      end
      eob_sr <= {eob_sr[L-2:0], eobk_in_n};
    end
  end

  // ---------------- input delay multiplexers ----------------
  always_comb begin
    din[0] = x[0];
    for (int i = 1; i <= 3; i++) begin
      int d;
      d = in_delay(i, stg);
      din[i] = (d == 0) ? x[i] : sr_in[i][d-1];
    end
  end

  // ---------------- switch elements (SWAEN..SWDEN select) ----------------
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic [1:0] sel;
      if (stg == 2'd3) sel = 2'(j) ^ {1'b0, state[0]};
      else             sel = state - 2'(j);
      sw[j] = din[sel];
    end
  end

  // ---------------- output delay multiplexers ----------------
  always_comb begin
    y[3] = sw[3];
    for (int j = 0; j <= 2; j++) begin
      int d;
      d = out_delay(j, stg);
      y[j] = (d == 0) ? sw[j] : sr_out[j][d-1];
    end
    eobk_out_n = (stg == 2'd3) ? eob_sr[7] : eob_sr[3 * in_delay(1, stg) - 1];
  end

endmodule
