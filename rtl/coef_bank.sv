// Filter coefficient bank of the serial polyphase channelizer.
//
// Holds the NSETS*T real coefficients of the prototype low-pass filter h[n],
// regrouped into NSETS sets of T taps: set c holds h[c], h[c+NSETS],
// h[c+2*NSETS], ... (stride NSETS). One set is read per cycle, all T taps at
// once, combinationally. Coefficients are loaded one at a time by their index
// n in the prototype filter, so software can retune the receiver; the write
// lands in set n mod NSETS, tap n div NSETS. The memory is written as T
// columns of NSETS words so that it maps onto T small RAMs. There is no reset:
// the contents are undefined until loaded. The set layout (stride NSETS)
// follows the polyphase partition; making the bank writable instead of a
// fixed ROM is this design's choice, as no coefficient values are specified.
module coef_bank
  import radio_pkg::*;
#(
  parameter int NSETS = 5,   // coefficient sets (paths times up-sampling factor)
  parameter int T     = 10   // taps per set
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [$clog2(NSETS*T)-1:0]        waddr,   // prototype index n
  input  logic signed [COEF_W-1:0]          wdata,
  input  logic [$clog2(NSETS)-1:0]          rset,
  output logic signed [COEF_W-1:0]          rdata [T]
);

  localparam int AW = $clog2(NSETS*T);

  logic signed [COEF_W-1:0] mem [T][NSETS];

  logic [AW-1:0] wset, wtap;
  assign wset = AW'(waddr % AW'(NSETS));
  assign wtap = AW'(waddr / AW'(NSETS));

  always_ff @(posedge clk) begin
    if (we && wtap < AW'(T)) mem[wtap[$clog2(T)-1:0]][wset[$clog2(NSETS)-1:0]] <= wdata;
  end

  always_comb begin
    for (int t = 0; t < T; t++)
      rdata[t] = mem[t][rset];
  end

endmodule
