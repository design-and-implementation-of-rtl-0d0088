// Accumulator of the serial polyphase channelizer (coherent phase summation).
//
// Adds the N phasor-turned sub-filter outputs of one channel sample, which
// arrive one per cycle between a 'first' and a 'last' flag. On 'last' it
// drops SHIFT fraction bits (arithmetic shift, rounding toward minus
// infinity), saturates to OUT_W bits and presents the channel sample with a
// one-cycle out_valid pulse. With the default formats the 33 fraction bits of
// the phasor product become the 19 fraction bits of the 30-bit output.
// The 30-bit output format is the specified one; truncation and saturation
// are this design's choices.
module path_accumulator
  import radio_pkg::*;
#(
  parameter int IW    = 49,
  parameter int NMAX  = 21,
  parameter int SHIFT = PH_FRAC,
  parameter int AW    = IW + $clog2(NMAX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [IW-1:0]     in_re,
  input  logic signed [IW-1:0]     in_im,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im
);

  logic signed [AW-1:0] acc_re, acc_im, nxt_re, nxt_im;

  always_comb begin
    nxt_re = (first ? AW'(0) : acc_re) + AW'(in_re);
    nxt_im = (first ? AW'(0) : acc_im) + AW'(in_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re    <= '0;
      acc_im    <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        acc_re <= nxt_re;
        acc_im <= nxt_im;
        if (last) begin
          out_re <= sat_out(64'(nxt_re >>> SHIFT));
          out_im <= sat_out(64'(nxt_im >>> SHIFT));
        end
      end
    end
  end

endmodule
