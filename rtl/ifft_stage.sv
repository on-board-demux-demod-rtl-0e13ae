// ifft_stage: one radix-2 single-delay-feedback stage of the variable-length
// IFFT, span D.  A D-deep FIFO holds the first half of each 2D-sample group;
// when the second half arrives the stage outputs x[n] + x[n+D] and stores
// (x[n] - x[n+D]) * W_2D^(-n) to be output D clocks later.  A sample whose
// transform is smaller than 2D bypasses the butterfly: the stage then is a
// plain D-clock delay, so the stream order is untouched.  Tags travel with
// their samples; a tag with sof restarts the group counter.  Latency D + 1.
module ifft_stage
  import dd_pkg::*;
#(
  parameter int D = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cplx_t     din,
  input  ifft_tag_t tin,
  output cplx_t     dout,
  output ifft_tag_t tout,
  output logic      bfly_used   // a butterfly (not a bypass) was done this clock
);
  localparam int LGD = $clog2(D);
  typedef logic [2*CW-1:0] tw_tbl_t [256];

  function automatic tw_tbl_t build();
    tw_tbl_t tb;
    for (int e = 0; e < 256; e++) tb[e] = twiddle256(e);
    return tb;
  endfunction
  localparam tw_tbl_t TW = build();

  cplx_t      fd [D];
  ifft_tag_t  ft [D];
  logic [LGD:0] cnt, cnt_now;
  logic       second, active;
  cplx_t      sum, dif, w;

  // sof marks group position 0 of the sample arriving now
  assign cnt_now = tin.sof ? '0 : cnt;
  assign second  = cnt_now[LGD];
  assign active  = tin.valid && (int'(tin.lg2n) >= LGD + 1);

  always_comb begin
    logic [7:0] e;
    e = 8'((256 - ((int'(cnt_now) % D) * (128 / D))) % 256);
    w = cplx_t'(TW[e]);
    sum.re = fd[D-1].re + din.re;
    sum.im = fd[D-1].im + din.im;
    dif.re = fd[D-1].re - din.re;
    dif.im = fd[D-1].im - din.im;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt_now + 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int i = 1; i < D; i++) begin
      fd[i] <= fd[i-1];
      ft[i] <= ft[i-1];
    end
    ft[0] <= rst_n ? tin : '0;
    tout  <= rst_n ? ft[D-1] : '0;
    if (second && active) begin
      dout      <= sum;
      fd[0]     <= cmul_tw(dif, w);
      bfly_used <= 1'b1;
    end else begin
      dout      <= fd[D-1];
      fd[0]     <= din;
      bfly_used <= 1'b0;
    end
  end
endmodule
