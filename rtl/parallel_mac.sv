// Parallel multiply-and-accumulate of the serial polyphase channelizer.
//
// Computes one sub-filter output per cycle: T real coefficients times the T
// complex samples of one shift-register row, summed in an adder tree. Before the
// sum, the product of column t is turned by j^(s*t), a quarter turn per column
// for every quarter of a channel spacing the wanted channel sits off a bin
// centre (s = 0..3). A quarter turn only swaps and negates the real and
// imaginary parts, so it costs no multiplier. With s = 0 this is a plain
// T-tap sub-filter. The result keeps full precision (DATA_W+COEF_W+log2(T)
// bits, 19 fraction bits) and is registered: one cycle of latency. in_tag is a
// side-band word delayed with the data (phasor index, first/last flags).
// T parallel multipliers per path follow the serial-polyphase, parallel-MAC
// structure; the complex data (2T multipliers) and the quarter-turn
// construction for s are this design's.
module parallel_mac
  import radio_pkg::*;
#(
  parameter int T     = 10,
  parameter int TAG_W = 8,
  parameter int ACC_W = DATA_W + COEF_W + $clog2(T)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sample_t                  data [T],
  input  logic signed [COEF_W-1:0] coef [T],
  input  logic [1:0]               s,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_re,
  output logic signed [ACC_W-1:0]  out_im,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int PW = DATA_W + COEF_W;

  logic signed [ACC_W-1:0] sum_re, sum_im;

  always_comb begin
    logic signed [PW-1:0] pr, pi;
    logic [1:0] rot;
    sum_re = '0;
    sum_im = '0;
    for (int t = 0; t < T; t++) begin
      pr  = PW'(data[t].re) * PW'(coef[t]);
      pi  = PW'(data[t].im) * PW'(coef[t]);
      rot = 2'(s * 2'(t));
      unique case (rot)
        2'd0: begin sum_re = sum_re + ACC_W'(pr); sum_im = sum_im + ACC_W'(pi); end
        2'd1: begin sum_re = sum_re - ACC_W'(pi); sum_im = sum_im + ACC_W'(pr); end
        2'd2: begin sum_re = sum_re - ACC_W'(pr); sum_im = sum_im - ACC_W'(pi); end
        2'd3: begin sum_re = sum_re + ACC_W'(pi); sum_im = sum_im - ACC_W'(pr); end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re  <= sum_re;
        out_im  <= sum_im;
        out_tag <= in_tag;
      end
    end
  end

endmodule
