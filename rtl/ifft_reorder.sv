// ifft_reorder: sample reorder buffer after one IFFT lane.  Each 64-slot
// frame is written into one bank of a double buffer, every sample at its
// natural time position (the lane delivers each transform bit-reversed),
// while the previous frame is read from the other bank in slot order.  With
// 50 % overlap-and-save only the second half of each inverse transform is a
// valid linear-convolution output; the first (aliased) half is read out
// marked invalid.  Timing: the banks swap at each incoming sof; a frame is
// read out during the 64 clocks after it was written, with one register,
// so slot p of frame f leaves 65 clocks after it entered.
module ifft_reorder
  import dd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      din,
  input  ifft_tag_t  tin,
  output cplx_t      dout,
  output logic       dvalid,
  output logic [1:0] carrier,
  output logic       sof_out
);
  cplx_t      mem  [2][64];
  ifft_tag_t  tmem [2][64];
  logic       wb;
  logic [5:0] p;
  logic       have, started, have_now;
  logic       wb_now;
  logic [5:0] p_now, waddr;

  assign wb_now = tin.sof ? ~wb : wb;
  assign p_now  = tin.sof ? 6'd0 : p;
  assign have_now = tin.sof ? started : have;

  always_comb begin
    logic [5:0] mask, off, rev;
    mask = 6'((1 << tin.lg2n) - 1);
    off  = p_now & mask;
    rev  = '0;
    for (int b = 0; b < 6; b++)
      if (b < int'(tin.lg2n)) rev[int'(tin.lg2n) - 1 - b] = off[b];
    waddr = (p_now & ~mask) | rev;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb <= 1'b0; p <= '0; have <= 1'b0; started <= 1'b0;
    end else begin
      wb <= wb_now;
      p  <= p_now + 6'd1;
      if (tin.sof) begin
        started <= 1'b1;
        have    <= started;    // a whole frame has been stored
      end
    end
  end

  always_ff @(posedge clk) begin
    mem[wb_now][waddr]  <= din;
    tmem[wb_now][waddr] <= tin;
  end

  always_ff @(posedge clk) begin
    ifft_tag_t t;
    t = tmem[~wb_now][p_now];
    dout    <= mem[~wb_now][p_now];
    carrier <= t.carrier;
    sof_out <= rst_n && have_now && p_now == 6'd0;
    dvalid  <= rst_n && have_now && t.valid && t.lg2n != 3'd0 && p_now[3'(t.lg2n - 3'd1)];
  end
endmodule
