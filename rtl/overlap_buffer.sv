// overlap_buffer: forms the overlapping data blocks of overlap-and-save
// filtering.  Samples arrive two per clock (the front end's complex rate is
// twice the 11.52 MHz pipeline clock); every 64 clocks a 256-sample block is
// sent to the FFT, made of the 128 samples just finished and the 128 before
// them (50 % overlap).  The memory holds three 128-sample segments: one is
// written while the other two are read.  Output order is the FFT's: in
// block clock t (0..63) stream j carries sample t + 64 j of the block.
// Timing: input clock c of segment s; block built from segments s-2 and s-1
// is read during segment s, one clock after the address (registered
// output).  eob_out_n is low with the last output clock of a block;
// out_valid goes high once two segments have been collected.
module overlap_buffer
  import dd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t din [2],       // samples 2c and 2c+1 of the current segment
  output cplx_t dout [4],
  output logic  eob_out_n,
  output logic  out_valid
);
  cplx_t      mem [3][128];
  logic [5:0] c;
  logic [1:0] seg;
  logic [1:0] nseg;            // segments collected, saturating at 2

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0; seg <= '0; nseg <= '0;
    end else begin
      c <= c + 6'd1;
      if (c == 6'd63) begin
        seg <= (seg == 2'd2) ? 2'd0 : seg + 2'd1;
        if (nseg != 2'd2) nseg <= nseg + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    mem[seg][{c, 1'b0}] <= din[0];
    mem[seg][{c, 1'b1}] <= din[1];
  end

  // block sample n = c + 64 j: n < 128 in segment seg-2, else segment seg-1
  always_ff @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      logic [1:0] sg;
      logic [7:0] n;
      n  = 8'(c) + 8'(64 * j);
      sg = (n[7] == 1'b0) ? ((seg == 2'd0) ? 2'd1 : (seg == 2'd1) ? 2'd2 : 2'd0)
                          : ((seg == 2'd0) ? 2'd2 : seg - 2'd1);
      dout[j] <= mem[sg][n[6:0]];
    end
    eob_out_n <= !(rst_n && c == 6'd63);
    out_valid <= rst_n && nseg == 2'd2;
  end
endmodule
