// Shared word lengths and types of the dual-standard channelizing receiver.
//
// The fixed-point formats are those of the WLAN channelizer: input samples are
// 16 bits (sign, 7 integer, 8 fraction bits), prototype-filter coefficients 12
// bits (sign, 11 fraction bits), complex phasors 16 bits (sign, 1 integer, 14
// fraction bits) and channel outputs 30 bits (sign, 10 integer, 19 fraction
// bits). The UMTS channelizer uses the same formats, which is a choice of this
// design. The coefficient-load target encoding is this design's own.
package radio_pkg;

  localparam int DATA_W    = 16;
  localparam int DATA_FRAC = 8;
  localparam int COEF_W    = 12;
  localparam int COEF_FRAC = 11;
  localparam int PH_W      = 16;
  localparam int PH_FRAC   = 14;
  localparam int OUT_W     = 30;
  localparam int OUT_FRAC  = 19;

  // One complex sample at the channelizer input.
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } sample_t;

  // Which coefficient memory a write on the receiver's coefficient bus goes to.
  typedef enum logic [1:0] {
    TGT_WLAN_BPF   = 2'd0,
    TGT_UMTS_BPF   = 2'd1,
    TGT_WLAN_PROTO = 2'd2,
    TGT_UMTS_PROTO = 2'd3
  } coef_target_e;

  // Saturate a wide signed value to OUT_W bits.
  function automatic logic signed [OUT_W-1:0] sat_out(input logic signed [63:0] v);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (OUT_W-1)) - 64'sd1;
    lo = -(64'sd1 <<< (OUT_W-1));
    if (v > hi)      return hi[OUT_W-1:0];
    else if (v < lo) return lo[OUT_W-1:0];
    else             return v[OUT_W-1:0];
  endfunction

  // Saturate a wide signed value to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] sat_data(input logic signed [63:0] v);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (DATA_W-1)) - 64'sd1;
    lo = -(64'sd1 <<< (DATA_W-1));
    if (v > hi)      return hi[DATA_W-1:0];
    else if (v < lo) return lo[DATA_W-1:0];
    else             return v[DATA_W-1:0];
  endfunction

endpackage
