// freq_filter: receive data filtering in the frequency domain, with the
// FFT's sample reorder buffer.
//
// The four FFT output streams (digit-reversed, see fft256) are written into
// one bank of a double-buffered 256-bin memory at their natural bin index.
// While the next transform is written, the finished bank is read through a
// plan RAM of 256 entries, four per clock: entry 4c+l gives the bin that
// IFFT lane l receives in frame clock c, a real filter weight (the
// square-root-Nyquist response, Q2.14), the carrier number and the size of
// the inverse transform it belongs to.  The product bin*weight is the
// filtered frequency sample.  This is how the carriers' bands are cut out and
// interleaved for the shared IFFT; the plan RAM is written through a simple
// write port, so the frequency plan can be changed in service.
// Timing: eob_in_n marks the last FFT output clock of a transform; the
// filtered frame is produced during the following 64 clocks with one clock of
// read/multiply latency; tag.sof marks frame clock 0 of each lane.
// Filter weights are real (a zero-phase response) - this design's choice.
module freq_filter
  import dd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cplx_t     fft_y [4],
  input  logic      fft_eob_n,
  input  logic      pw_en,          // plan RAM write
  input  logic [7:0] pw_addr,
  input  plan_t     pw_data,
  output cplx_t     lane_y [4],
  output ifft_tag_t lane_tag [4]
);
  cplx_t      binmem [2][256];
  plan_t      plan [256];
  logic       wbank;              // bank being written by the FFT
  logic [5:0] wt;                 // FFT output clock
  logic [5:0] rc;                 // frame clock of the read side
  assign rc = wt;
  logic       have_frame;

  always_ff @(posedge clk) if (pw_en) plan[pw_addr] <= pw_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank <= 1'b0; wt <= '0; have_frame <= 1'b0;
    end else begin
      wt <= fft_eob_n ? wt + 6'd1 : 6'd0;

      if (!fft_eob_n) begin
        wbank <= ~wbank;
        have_frame <= 1'b1;
      end
    end
  end

  // FFT output clock t = 16 q1 + 4 q2 + q3, stream q4 -> bin q1 + 4 q2 + 16 q3 + 64 q4
  always_ff @(posedge clk) begin
    for (int q = 0; q < 4; q++)
      binmem[wbank][{2'(q), wt[1:0], wt[3:2], wt[5:4]}] <= fft_y[q];
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      plan_t e;
      cplx_t b;
      logic signed [31:0] pr, pi;
      e  = plan[{rc, 2'(l)}];
      b  = binmem[~wbank][e.bin];
      pr = b.re * e.coef;
      pi = b.im * e.coef;
      lane_y[l].re <= CW'(pr >>> TWF);
      lane_y[l].im <= CW'(pi >>> TWF);
      lane_tag[l].valid   <= have_frame && e.en;
      lane_tag[l].sof     <= have_frame && rc == 6'd0;
      lane_tag[l].carrier <= e.carrier;
      lane_tag[l].lg2n    <= e.lg2n;
    end
  end
endmodule
