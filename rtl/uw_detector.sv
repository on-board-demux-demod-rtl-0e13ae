// uw_detector: unique-word detector for up to NCH carriers served in turn.
// The same UW pattern is sent in both the I and the Q channel, so the hard
// decisions of both are compared with it: a carrier's last UWLEN I bits and
// last UWLEN Q bits are kept in its own shift registers, and the number of
// disagreements over all 2*UWLEN bits is counted.  At most MAXERR
// disagreements is a detection; at least 2*UWLEN - MAXERR is a detection of
// the inverted word, meaning the carrier phase was recovered 180 degrees off,
// and the carrier's polarity flag is toggled so later data can be corrected.
// Timing: one symbol per clock when sym_valid; uw_det/uw_inv are registered
// (one clock).  The pattern, its length and MAXERR are this design's choice.
module uw_detector #(
  parameter int NCH = 4,
  parameter int UWLEN = 16,
  parameter logic [UWLEN-1:0] UW = 16'hE6A2,
  parameter int MAXERR = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sym_valid,
  input  logic [$clog2(NCH)-1:0] ch,
  input  logic                   bit_i,
  input  logic                   bit_q,
  output logic                   uw_det,
  output logic                   uw_inv,
  output logic [$clog2(NCH)-1:0] det_ch,
  output logic [NCH-1:0]         polarity   // 1: carrier's data must be inverted
);
  logic [UWLEN-1:0] si [NCH];
  logic [UWLEN-1:0] sq [NCH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin si[c] <= '0; sq[c] <= '0; end
      uw_det <= 1'b0; uw_inv <= 1'b0; det_ch <= '0; polarity <= '0;
    end else begin
      uw_det <= 1'b0; uw_inv <= 1'b0;
      if (sym_valid) begin
        logic [UWLEN-1:0] ni, nq;
        int m;
        ni = {si[ch][UWLEN-2:0], bit_i};
        nq = {sq[ch][UWLEN-2:0], bit_q};
        si[ch] <= ni;
        sq[ch] <= nq;
        m = $countones(ni ^ UW) + $countones(nq ^ UW);
        det_ch <= ch;
        if (m <= MAXERR) begin
          uw_det <= 1'b1;
          polarity[ch] <= 1'b0;
        end else if (m >= 2 * UWLEN - MAXERR) begin
          uw_det <= 1'b1; uw_inv <= 1'b1;
          polarity[ch] <= 1'b1;
        end
      end
    end
  end
endmodule
