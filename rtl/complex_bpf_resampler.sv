// Complex band-pass filter and re-sampler in front of a channelizer.
//
// The bandpass-sampled RF stream (real, one sample per in_valid) is filtered by
// a TAPS-tap FIR filter with complex coefficients. Its pass band covers one
// standard's alias and its stop band that alias's mirror image, so the output
// is an image-free complex signal. Because the band is then image free, it can
// be down-sampled by a large factor D by simply keeping every D-th filter
// output: the spectrum is translated, not folded onto itself. D = 7 for WLAN
// (840 -> 120 MS/s) and D = 8 for UMTS (840 -> 105 MS/s).
//
// Only the kept outputs are computed: after every D-th input the filter is
// evaluated over the TAPS newest inputs (2*TAPS multipliers) and the result,
// scaled back to the input format (coefficients have 11 fraction bits) and
// saturated to 16 bits, appears one cycle later with out_valid. The first
// output follows input number D-1 (counting from 0). Coefficients are loaded
// one tap at a time; the filter length and the coefficient values are this
// design's choice. Registers reset to zero; the coefficients do not reset.
module complex_bpf_resampler
  import radio_pkg::*;
#(
  parameter int TAPS = 32,
  parameter int D    = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  in_data,
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]  coef_re,
  input  logic signed [COEF_W-1:0]  coef_im,
  output logic                      out_valid,
  output sample_t                   out_data
);

  localparam int PW   = DATA_W + COEF_W;
  localparam int SUMW = PW + $clog2(TAPS);

  logic signed [DATA_W-1:0] x [TAPS];
  logic signed [COEF_W-1:0] c_re [TAPS];
  logic signed [COEF_W-1:0] c_im [TAPS];
  logic [$clog2(D)-1:0]     phase;

  always_ff @(posedge clk) begin
    if (coef_we) begin
      c_re[coef_addr] <= coef_re;
      c_im[coef_addr] <= coef_im;
    end
  end

  // The filter over the delay line as it will be after this input.
  logic signed [SUMW-1:0] acc_re, acc_im;
  always_comb begin
    logic signed [DATA_W-1:0] v;
    acc_re = '0;
    acc_im = '0;
    for (int n = 0; n < TAPS; n++) begin
      v      = (n == 0) ? in_data : x[n-1];
      acc_re = acc_re + SUMW'(PW'(v) * PW'(c_re[n]));
      acc_im = acc_im + SUMW'(PW'(v) * PW'(c_im[n]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < TAPS; n++) x[n] <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        x[0] <= in_data;
        for (int n = 1; n < TAPS; n++) x[n] <= x[n-1];
        if (int'(phase) == D - 1) begin
          phase       <= '0;
          out_valid   <= 1'b1;
          out_data.re <= sat_data(64'(acc_re >>> COEF_FRAC));
          out_data.im <= sat_data(64'(acc_im >>> COEF_FRAC));
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
