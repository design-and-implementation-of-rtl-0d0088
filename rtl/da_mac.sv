// Distributed-arithmetic (DA) sub-filter: a multiplier-free alternative to
// parallel_mac, with its own coefficient store.
//
// A T-tap sub-filter sum_t c_t*x_t is rewritten over the bits of the data:
// sum_b 2^b * LUT(x_0[b], ..., x_{T-1}[b]), the sign bit weighted -2^B. The
// look-up table holds, for every pattern of data bits, the sum of the
// coefficients whose bit is set. The T taps are split into groups of G (two
// 32-entry tables for T=10, G=5) so the tables stay small. Every coefficient
// set of the channelizer has its own tables; writing a coefficient rebuilds
// the 2^G entries of its group from the stored coefficients.
//
// This version is fully bit parallel: all 17 bit planes of the real and the
// imaginary data are looked up in the same cycle, so it delivers one
// sub-filter output per cycle, like parallel_mac. The quarter turn j^(s*t) of
// column t is applied to the data before the look-up (the coefficients are
// real, so turning the data or the product gives the same result), which
// needs one more data bit. The result is bit-identical to parallel_mac and is
// registered: one cycle of latency. Coefficients are written by prototype
// index n (set n mod NSETS, tap n div NSETS); tables do not reset, so every
// coefficient must be written once after power-up. The grouping and the
// bit-parallel form are this design's choices.
module da_mac
  import radio_pkg::*;
#(
  parameter int T     = 10,
  parameter int NSETS = 5,
  parameter int G     = 5,
  parameter int TAG_W = 8,
  parameter int ACC_W = DATA_W + COEF_W + $clog2(T)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // coefficient load
  input  logic                         coef_we,
  input  logic [$clog2(NSETS*T)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]     coef_data,
  // one sub-filter evaluation
  input  logic                         in_valid,
  input  sample_t                      data [T],
  input  logic [$clog2(NSETS)-1:0]     set,
  input  logic [1:0]                   s,
  input  logic [TAG_W-1:0]             in_tag,
  output logic                         out_valid,
  output logic signed [ACC_W-1:0]      out_re,
  output logic signed [ACC_W-1:0]      out_im,
  output logic [TAG_W-1:0]             out_tag
);

  localparam int NG  = (T + G - 1) / G;       // groups of taps
  localparam int NE  = 1 << G;                // entries per table
  localparam int LW  = COEF_W + $clog2(G) + 1;  // table word
  localparam int XW  = DATA_W + 1;            // turned data width
  localparam int AW  = $clog2(NSETS*T);
  localparam int SW  = $clog2(NSETS);

  logic signed [COEF_W-1:0] shadow [NSETS][T];
  logic signed [LW-1:0]     lut    [NSETS][NG][NE];

  // ---------------- table maintenance ----------------
  // A write rebuilds all entries of the written group from the stored
  // coefficients, so the tables are right once every tap has been written.
  logic [AW-1:0] wset_w, wtap_w;
  logic [SW-1:0] wset;
  int            wtap, wg;
  logic signed [COEF_W-1:0] grp [G];

  assign wset_w = AW'(coef_addr % AW'(NSETS));
  assign wtap_w = AW'(coef_addr / AW'(NSETS));
  assign wset   = wset_w[SW-1:0];
  always_comb begin
    wtap = int'(wtap_w);
    wg   = (wtap / G) % NG;
    for (int i = 0; i < G; i++) begin
      if (wg * G + i >= T)         grp[i] = '0;
      else if (wg * G + i == wtap) grp[i] = coef_data;
      else                         grp[i] = shadow[wset][(wg * G + i) % T];
    end
  end

  always_ff @(posedge clk) begin
    if (coef_we && wtap < T) begin
      shadow[wset][wtap] <= coef_data;
      for (int e = 0; e < NE; e++) begin
        logic signed [LW-1:0] acc;
        acc = '0;
        for (int i = 0; i < G; i++)
          if (e[i]) acc = acc + LW'(grp[i]);
        lut[wset][wg][e] <= acc;
      end
    end
  end

  // ---------------- evaluation ----------------
  logic signed [XW-1:0] xr [T];
  logic signed [XW-1:0] xi [T];

  always_comb begin
    for (int t = 0; t < T; t++) begin
      unique case (2'(s * 2'(t)))
        2'd0: begin xr[t] =  XW'(data[t].re); xi[t] =  XW'(data[t].im); end
        2'd1: begin xr[t] = -XW'(data[t].im); xi[t] =  XW'(data[t].re); end
        2'd2: begin xr[t] = -XW'(data[t].re); xi[t] = -XW'(data[t].im); end
        2'd3: begin xr[t] =  XW'(data[t].im); xi[t] = -XW'(data[t].re); end
      endcase
    end
  end

  logic signed [ACC_W-1:0] sum_re, sum_im;

  always_comb begin
    logic [G-1:0] ar, ai;
    logic signed [ACC_W-1:0] pr, pi;
    sum_re = '0;
    sum_im = '0;
    for (int g = 0; g < NG; g++) begin
      for (int b = 0; b < XW; b++) begin
        for (int i = 0; i < G; i++) begin
          ar[i] = (g * G + i < T) ? xr[(g * G + i) % T][b] : 1'b0;
          ai[i] = (g * G + i < T) ? xi[(g * G + i) % T][b] : 1'b0;
        end
        pr = ACC_W'(lut[set][g][ar]) <<< b;
        pi = ACC_W'(lut[set][g][ai]) <<< b;
        if (b == XW - 1) begin
          sum_re = sum_re - pr;
          sum_im = sum_im - pi;
        end else begin
          sum_re = sum_re + pr;
          sum_im = sum_im + pi;
        end
      end
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
