// Serial polyphase channelizer with parallel MAC (one channel, tunable).
//
// Extracts one channel, centred at (k + s/4) channel spacings, from a complex
// input stream, filters it with an N-path polyphase prototype filter of N*L*T
// taps and resamples it by L/M. The defaults are the WLAN channelizer: input
// at 120 MS/s, N = 5 paths of T = 10 taps (a 50-tap prototype), 24 MHz channel
// spacing, down-sampling by 6 to 20 MS/s. The UMTS channelizer is the same
// engine with N = 21, T = 12, L = 10, M = 17 (see umts_channelizer).
//
// Structure: decoder (state machine) -> shift register bank and coefficient
// bank (one row and one coefficient set per cycle) -> parallel MAC (T
// multipliers, quarter-turn per column for s) -> phasor multiplication ->
// accumulator over the N paths. USE_DA replaces the coefficient bank and the
// multipliers by a distributed-arithmetic sub-filter (da_mac) that gives the
// same results bit for bit; the default uses multipliers. Each output takes N compute cycles; the next
// state's inputs are taken during them, so with L = 1 and M >= N the engine
// accepts one input per clock and a 120 MHz clock suffices for WLAN.
//
// Interface: in_valid/in_ready handshake for 16-bit complex samples (8
// fraction bits); coefficient writes by prototype index (12-bit, 11 fraction
// bits); k (0..N-1) and s (0..3) select the channel and are sampled at the
// start of every output's computation; out_valid pulses with a 30-bit complex
// sample (19 fraction bits). Latency from the start of a state (the cycle
// after its last input) to out_valid is N+2 cycles.
//
// The output is y[m] = sum_n h[n] x[j] exp(-j*2*pi*(4k+s)*j/(4N)), summed over
// the non-zero terms of the L-fold zero-packed input, with j = (t_m - n)/L and
// t_m = M*m + R_INIT + M - L the output instant in up-sampled ticks.
module polyphase_channelizer
  import radio_pkg::*;
#(
  parameter int N      = 5,
  parameter int T      = 10,
  parameter int L      = 1,
  parameter int M      = 6,
  parameter int R_INIT = 0,
  parameter int A0     = 4,
  parameter bit USE_DA = 1'b0,   // 0: T multipliers (DSP slices), 1: distributed arithmetic
  parameter int NW     = $clog2(N),
  parameter int CAW    = $clog2(N*L*T)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input samples
  input  logic                     in_valid,
  output logic                     in_ready,
  input  sample_t                  in_data,
  // prototype coefficient load
  input  logic                     coef_we,
  input  logic [CAW-1:0]           coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  // tuning
  input  logic [NW-1:0]            k,
  input  logic [1:0]               s,
  // channel output
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  output logic                     state_start
);

  localparam int NSETS = N * L;
  localparam int SW    = $clog2(NSETS);
  localparam int PW    = $clog2(4 * N);
  localparam int MACW  = DATA_W + COEF_W + $clog2(T);
  localparam int PMW   = MACW + PH_W + 1;
  localparam int TAGW  = PW + 2;

  logic          load_we;
  logic [NW-1:0] load_addr;
  logic          rd_valid, rd_first, rd_last;
  logic [NW-1:0] rd_row;
  logic [SW-1:0] rd_set;
  logic [PW-1:0] rd_pidx;
  logic [1:0]    rd_s;

  channelizer_decoder #(
    .N(N), .L(L), .M(M), .R_INIT(R_INIT), .A0(A0)
  ) u_decoder (
    .clk, .rst_n,
    .in_valid, .in_ready, .k, .s,
    .load_we, .load_addr,
    .rd_valid, .rd_row, .rd_set, .rd_pidx, .rd_s, .rd_first, .rd_last,
    .state_start
  );

  sample_t row [T];

  shift_register_bank #(.N(N), .T(T)) u_bank (
    .clk, .rst_n,
    .we(load_we), .waddr(load_addr), .wdata(in_data),
    .raddr(rd_row), .rrow(row)
  );

  logic                   mac_valid;
  logic signed [MACW-1:0] mac_re, mac_im;
  logic [TAGW-1:0]        mac_tag;

  if (USE_DA) begin : g_da
    da_mac #(.T(T), .NSETS(NSETS), .TAG_W(TAGW)) u_mac (
      .clk, .rst_n,
      .coef_we, .coef_addr, .coef_data,
      .in_valid(rd_valid), .data(row), .set(rd_set), .s(rd_s),
      .in_tag({rd_pidx, rd_first, rd_last}),
      .out_valid(mac_valid), .out_re(mac_re), .out_im(mac_im), .out_tag(mac_tag)
    );
  end else begin : g_mult
    logic signed [COEF_W-1:0] coefs [T];

    coef_bank #(.NSETS(NSETS), .T(T)) u_coefs (
      .clk,
      .we(coef_we), .waddr(coef_addr), .wdata(coef_data),
      .rset(rd_set), .rdata(coefs)
    );

    parallel_mac #(.T(T), .TAG_W(TAGW)) u_mac (
      .clk, .rst_n,
      .in_valid(rd_valid), .data(row), .coef(coefs), .s(rd_s),
      .in_tag({rd_pidx, rd_first, rd_last}),
      .out_valid(mac_valid), .out_re(mac_re), .out_im(mac_im), .out_tag(mac_tag)
    );
  end

  logic                  ph_valid;
  logic signed [PMW-1:0] ph_re, ph_im;
  logic [1:0]            ph_tag;

  phasor_mult #(.N4(4 * N), .IW(MACW), .TAG_W(2)) u_phasor (
    .clk, .rst_n,
    .in_valid(mac_valid), .in_re(mac_re), .in_im(mac_im),
    .idx(mac_tag[TAGW-1:2]), .in_tag(mac_tag[1:0]),
    .out_valid(ph_valid), .out_re(ph_re), .out_im(ph_im), .out_tag(ph_tag)
  );

  path_accumulator #(.IW(PMW), .NMAX(N), .SHIFT(PH_FRAC)) u_acc (
    .clk, .rst_n,
    .in_valid(ph_valid), .first(ph_tag[1]), .last(ph_tag[0]),
    .in_re(ph_re), .in_im(ph_im),
    .out_valid, .out_re, .out_im
  );

endmodule
