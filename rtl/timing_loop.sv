// timing_loop: first-order symbol-timing tracking loop shared by up to NCH
// carriers.  Each carrier has a 16-bit timing accumulator whose top 8 bits
// are the timing estimate (256 = one symbol).  An update with timing error e
// adds Kt * e (K_tau = Kt / 256 = Wn Ts); preload writes the acquisition
// estimate at the end of the preamble.  tau is the selected carrier's
// estimate (combinational); it is what is fed back to the interpolating
// filter as accumulated clock error.  Widths are this design's choice.
module timing_loop #(
  parameter int NCH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NCH)-1:0] ch,
  input  logic                   preload,
  input  logic signed [7:0]      tau0,
  input  logic                   upd,
  input  logic signed [7:0]      err,
  input  logic [7:0]             kt,
  output logic signed [7:0]      tau
);
  logic signed [15:0] acc [NCH];

  assign tau = acc[ch][15:8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) acc[c] <= '0;
    end else if (preload) acc[ch] <= {tau0, 8'd0};
    else if (upd)         acc[ch] <= acc[ch] + 16'($signed({1'b0, kt}) * err);
  end
endmodule
