// carrier_loop: second-order carrier-phase tracking loop shared by up to
// NCH carriers in turn.  Each carrier keeps its own phase accumulator
// (16 bits, top 8 = phase, 256 = 360 degrees) and frequency accumulator
// (24 bits, phase step per update in 1/65536 of the phase unit).  An update
// with phase error e (8 bits, same unit as the phase) is one
// multiply-accumulate per accumulator:
//   f <- f + Kf * e          K_dtheta = Kf / 65536   (= (Wn Ts)^2)
//   p <- p + f/256 + Kp * e  K_theta  = Kp / 256     (= 2 zeta Wn Ts)
// preload writes a carrier's accumulators from the acquisition estimates so
// a burst starts already near lock.  theta shows carrier rd_ch's phase
// combinationally (a separate read port, so one carrier's phase can be read
// while another is updated); freq shows carrier ch's frequency; updates and preloads take effect at the clock edge.
// The widths and gain scaling are this design's own choices.
module carrier_loop #(
  parameter int NCH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NCH)-1:0] ch,       // carrier updated or preloaded
  input  logic [$clog2(NCH)-1:0] rd_ch,    // carrier whose phase is shown
  input  logic                   preload,
  input  logic [7:0]             theta0,   // initial phase
  input  logic signed [23:0]     freq0,    // initial frequency accumulator
  input  logic                   upd,
  input  logic signed [7:0]      err,
  input  logic [7:0]             kp,
  input  logic [7:0]             kf,
  output logic [7:0]             theta,
  output logic signed [23:0]     freq
);
  logic        [15:0] ph [NCH];
  logic signed [23:0] fr [NCH];

  assign theta = ph[rd_ch][15:8];
  assign freq  = fr[ch];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin ph[c] <= '0; fr[c] <= '0; end
    end else if (preload) begin
      ph[ch] <= {theta0, 8'd0};
      fr[ch] <= freq0;
    end else if (upd) begin
      logic signed [23:0] fn;
      fn = fr[ch] + 24'($signed({1'b0, kf}) * err);
      fr[ch] <= fn;
      ph[ch] <= ph[ch] + 16'(fn >>> 8) + 16'($signed({1'b0, kp}) * err);
    end
  end
endmodule
