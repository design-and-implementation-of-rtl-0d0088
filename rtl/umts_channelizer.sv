// UMTS channelizer: 21-path polyphase channelizer with embedded 17/10
// resampling.
//
// The input arrives at 105 MS/s (the RF band down-sampled by 8); channels are
// 5 MHz apart, so there are 21 bins. The rate is brought to 61.76 MS/s by
// zero-packing by 10 and keeping one sample in 17, neither of which is done
// literally: each state takes one or two real inputs (357 inputs in 210
// states) and filters them with the coefficient set that matches the
// up-sampled phase. The prototype filter has 2520 taps, designed at 1050 MHz,
// split into 210 sets of 12 taps. Inputs are written to row
// (16 - 10*j) mod 21, which gives the loading sequence R16,R6 / R17,R7 /
// R18,R8 / R19 / ... / R4,R15 / R5 of the 210-state period.
//
// The engine needs 21 compute cycles per output (12 multipliers, one row per
// cycle), so keeping up with 105 MS/s in and 61.76 MS/s out needs a processing
// clock of about 1.3 GHz; at lower clocks in_ready throttles the input. Ports
// and timing are those of polyphase_channelizer.
module umts_channelizer
  import radio_pkg::*;
#(
  parameter int N      = 21,
  parameter int T      = 12,
  parameter int L      = 10,
  parameter int M      = 17,
  parameter int R_INIT = 9,
  parameter int A0     = 16,
  parameter int NW     = $clog2(N),
  parameter int CAW    = $clog2(N*L*T)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  sample_t                  in_data,
  input  logic                     coef_we,
  input  logic [CAW-1:0]           coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic [NW-1:0]            k,
  input  logic [1:0]               s,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  output logic                     state_start
);

  polyphase_channelizer #(
    .N(N), .T(T), .L(L), .M(M), .R_INIT(R_INIT), .A0(A0)
  ) u_engine (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .coef_we, .coef_addr, .coef_data,
    .k, .s,
    .out_valid, .out_re, .out_im, .state_start
  );

endmodule
