// Phasor multiplication of the serial polyphase channelizer.
//
// Turns one sub-filter output by the complex phasor exp(j*2*pi*idx/N4). The
// table holds N4 = 4*N phasors, one full turn in steps of a quarter of the
// channel spacing, so that a channel centred on a bin or on a quarter of a bin
// can be selected. The phasors are 16-bit values with 14 fraction bits,
// computed at elaboration as round(2^14*cos) and round(2^14*sin). The complex
// product keeps full precision (IW+PH_W+1 bits) and is registered: one cycle of
// latency. in_tag travels alongside. The 16-bit phasor format is the
// specified one; the 4N-entry table and the single register stage are this
// design's choices.
module phasor_mult
  import radio_pkg::*;
#(
  parameter int N4    = 20,
  parameter int IW    = 32,
  parameter int TAG_W = 2,
  parameter int OW    = IW + PH_W + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [IW-1:0]      in_re,
  input  logic signed [IW-1:0]      in_im,
  input  logic [$clog2(N4)-1:0]     idx,
  input  logic [TAG_W-1:0]          in_tag,
  output logic                      out_valid,
  output logic signed [OW-1:0]      out_re,
  output logic signed [OW-1:0]      out_im,
  output logic [TAG_W-1:0]          out_tag
);

  typedef logic signed [PH_W-1:0] tab_t [N4];

  function automatic tab_t make_table(input bit sine);
    tab_t tb;
    real ang;
    for (int i = 0; i < N4; i++) begin
      ang   = 2.0 * 3.14159265358979323846 * real'(i) / real'(N4);
      tb[i] = PH_W'($rtoi($floor((sine ? $sin(ang) : $cos(ang)) * real'(1 << PH_FRAC) + 0.5)));
    end
    return tb;
  endfunction

  localparam tab_t COS_TAB = make_table(1'b0);
  localparam tab_t SIN_TAB = make_table(1'b1);

  logic signed [PH_W-1:0] c, d;
  assign c = COS_TAB[idx];
  assign d = SIN_TAB[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re  <= OW'(in_re) * OW'(c) - OW'(in_im) * OW'(d);
        out_im  <= OW'(in_re) * OW'(d) + OW'(in_im) * OW'(c);
        out_tag <= in_tag;
      end
    end
  end

endmodule
