// ifm_filter: the per-rail part of the interpolating filter module; one
// instance serves the I samples and one the Q samples.
// Data buffer: samples arriving from the IFFT side are written, by channel
// ID, into that channel's 64-entry circular buffer (input address counter);
// the output address counter of a channel advances whenever the control
// asks for a new sample for it, so samples are provided on demand.
// Shift register: each channel has its own 16-tap register (kept in a
// small RAM and loaded into the working register for the slot, hence
// "latch & RAM").  On a slot with clock gate the channel's register shifts in
// the next buffered sample; without it the contents are reused.  The 16
// products with the slot's coefficients are summed by an adder tree and
// divided by 128 (coefficients have 127 = 1.0), saturated to 8 bits.
// The output latch carries data valid and the channel ID to the
// demodulator.  Timing: output registered one clock after the slot.  A
// channel whose buffer is empty when a sample is demanded shifts in zero and
// raises underflow.
module ifm_filter #(
  parameter int NCH = 4,
  parameter int NTAP = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the IFFT side
  input  logic              in_valid,
  input  logic [1:0]        in_ch,
  input  logic signed [7:0] in_data,
  // slot control from ifm_control
  input  logic              slot_en,
  input  logic [1:0]        slot_ch,
  input  logic              clk_gate,
  input  logic              data_valid,
  input  logic signed [7:0] coef [NTAP],
  // to the demodulator
  output logic              out_valid,
  output logic [1:0]        out_ch,
  output logic signed [7:0] out_data,
  output logic              underflow
);
  logic signed [7:0] buffer [NCH][64];
  logic [5:0]        wp [NCH];
  logic [5:0]        rp [NCH];
  logic signed [7:0] sr [NCH][NTAP];

  // working register of this slot, after an optional shift
  logic signed [7:0] cur [NTAP];
  logic              empty;
  always_comb begin
    empty = (wp[slot_ch] == rp[slot_ch]);
    for (int k = 0; k < NTAP; k++) cur[k] = sr[slot_ch][k];
    if (clk_gate) begin
      for (int k = NTAP - 1; k > 0; k--) cur[k] = sr[slot_ch][k-1];
      cur[0] = empty ? 8'sd0 : buffer[slot_ch][rp[slot_ch]];
    end
  end

  // adder tree (written as a sum; synthesis builds the tree)
  logic signed [19:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAP; k++) acc += 20'(cur[k] * coef[k]);
  end

  always_ff @(posedge clk) begin
    if (in_valid) buffer[in_ch][wp[in_ch]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        wp[c] <= '0; rp[c] <= '0;
        for (int k = 0; k < NTAP; k++) sr[c][k] <= '0;
      end
      out_valid <= 1'b0; out_ch <= '0; out_data <= '0; underflow <= 1'b0;
    end else begin
      logic signed [19:0] r;
      if (in_valid) wp[in_ch] <= wp[in_ch] + 6'd1;
      underflow <= 1'b0;
      if (slot_en && clk_gate) begin
        for (int k = 0; k < NTAP; k++) sr[slot_ch][k] <= cur[k];
        if (!empty) rp[slot_ch] <= rp[slot_ch] + 6'd1;
        else        underflow <= 1'b1;
      end
      r = (acc + 20'sd64) >>> 7;
      out_valid <= slot_en && data_valid;
      out_ch    <= slot_ch;
      out_data  <= (r > 127) ? 8'sd127 : (r < -127) ? -8'sd127 : 8'(r);
    end
  end
endmodule
