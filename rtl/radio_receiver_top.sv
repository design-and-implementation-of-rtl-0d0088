// Dual-standard (WLAN + UMTS) software radio receiver back end.
//
// The RF band holding both standards is bandpass sampled at 840 MS/s right
// after the LNA; the aliases of both bands fall, spectrally inverted and
// without overlap, between 36 and 410 MHz. This module takes that real sample
// stream and splits it into two paths:
//
//   WLAN: complex band-pass filter, keep 1 in 7 (120 MS/s), 5-path polyphase
//         channelizer (24 MHz bins) with 6:1 down-sampling -> 20 MS/s.
//   UMTS: complex band-pass filter, keep 1 in 8 (105 MS/s), 21-path polyphase
//         channelizer (5 MHz bins) with 17/10 resampling -> 61.76 MS/s.
//
// Each channelizer extracts the one channel selected by its k (bin) and s
// (quarter-bin offset) inputs. A four-entry FIFO sits between each re-sampler
// and its channelizer; samples that find it full are dropped and counted.
//
// All coefficients are loaded through one write port: coef_target selects
// the WLAN or UMTS band-pass filter (complex taps, coef_re/coef_im) or the
// WLAN or UMTS prototype filter (real taps, coef_re, addressed by prototype
// index). WLAN_USE_DA builds the WLAN sub-filters with distributed arithmetic
// instead of multipliers (same results). Everything runs from clk; adc_valid marks ADC samples. At full
// rate the WLAN path keeps up with one ADC sample per clock; the UMTS
// channelizer needs 21 cycles per output and keeps up only if ADC samples
// come at most once every two clocks. The split into two paths, the
// decimation factors and the channelizer sizes follow the specified design;
// the single clock, the FIFOs and the shared coefficient port are this
// design's own.
module radio_receiver_top
  import radio_pkg::*;
#(
  parameter int BPF_TAPS  = 32,
  parameter int FIFO_DEPTH = 4,
  parameter bit WLAN_USE_DA = 1'b0   // WLAN sub-filters by distributed arithmetic
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // bandpass-sampled RF input
  input  logic                     adc_valid,
  input  logic signed [DATA_W-1:0] adc_data,
  // coefficient load port
  input  logic                     coef_we,
  input  coef_target_e             coef_target,
  input  logic [11:0]              coef_addr,
  input  logic signed [COEF_W-1:0] coef_re,
  input  logic signed [COEF_W-1:0] coef_im,
  // channel selection
  input  logic [2:0]               wlan_k,
  input  logic [1:0]               wlan_s,
  input  logic [4:0]               umts_k,
  input  logic [1:0]               umts_s,
  // WLAN channel output (20 MS/s in real time)
  output logic                     wlan_valid,
  output logic signed [OUT_W-1:0]  wlan_re,
  output logic signed [OUT_W-1:0]  wlan_im,
  // UMTS channel output (61.76 MS/s in real time)
  output logic                     umts_valid,
  output logic signed [OUT_W-1:0]  umts_re,
  output logic signed [OUT_W-1:0]  umts_im,
  // buffer status
  output logic                     wlan_overflow,
  output logic [15:0]              wlan_dropped,
  output logic                     umts_overflow,
  output logic [15:0]              umts_dropped
);

  localparam int BAW = $clog2(BPF_TAPS);

  // ---------------- WLAN path ----------------
  logic    wb_valid, wf_valid, wc_ready;
  sample_t wb_data, wf_data;

  complex_bpf_resampler #(.TAPS(BPF_TAPS), .D(7)) u_wlan_bpf (
    .clk, .rst_n,
    .in_valid(adc_valid), .in_data(adc_data),
    .coef_we(coef_we && coef_target == TGT_WLAN_BPF), .coef_addr(coef_addr[BAW-1:0]),
    .coef_re, .coef_im,
    .out_valid(wb_valid), .out_data(wb_data)
  );

  sample_fifo #(.DEPTH(FIFO_DEPTH)) u_wlan_fifo (
    .clk, .rst_n,
    .wr_valid(wb_valid), .wr_data(wb_data),
    .rd_valid(wf_valid), .rd_ready(wc_ready), .rd_data(wf_data),
    .overflow(wlan_overflow), .dropped(wlan_dropped)
  );

  polyphase_channelizer #(.USE_DA(WLAN_USE_DA)) u_wlan_chan (
    .clk, .rst_n,
    .in_valid(wf_valid), .in_ready(wc_ready), .in_data(wf_data),
    .coef_we(coef_we && coef_target == TGT_WLAN_PROTO), .coef_addr(coef_addr[5:0]),
    .coef_data(coef_re),
    .k(wlan_k), .s(wlan_s),
    .out_valid(wlan_valid), .out_re(wlan_re), .out_im(wlan_im),
    .state_start()
  );

  // ---------------- UMTS path ----------------
  logic    ub_valid, uf_valid, uc_ready;
  sample_t ub_data, uf_data;

  complex_bpf_resampler #(.TAPS(BPF_TAPS), .D(8)) u_umts_bpf (
    .clk, .rst_n,
    .in_valid(adc_valid), .in_data(adc_data),
    .coef_we(coef_we && coef_target == TGT_UMTS_BPF), .coef_addr(coef_addr[BAW-1:0]),
    .coef_re, .coef_im,
    .out_valid(ub_valid), .out_data(ub_data)
  );

  sample_fifo #(.DEPTH(FIFO_DEPTH)) u_umts_fifo (
    .clk, .rst_n,
    .wr_valid(ub_valid), .wr_data(ub_data),
    .rd_valid(uf_valid), .rd_ready(uc_ready), .rd_data(uf_data),
    .overflow(umts_overflow), .dropped(umts_dropped)
  );

  umts_channelizer u_umts_chan (
    .clk, .rst_n,
    .in_valid(uf_valid), .in_ready(uc_ready), .in_data(uf_data),
    .coef_we(coef_we && coef_target == TGT_UMTS_PROTO), .coef_addr(coef_addr),
    .coef_data(coef_re),
    .k(umts_k), .s(umts_s),
    .out_valid(umts_valid), .out_re(umts_re), .out_im(umts_im),
    .state_start()
  );

endmodule
