// Shift register bank of the serial polyphase channelizer.
//
// N rows (one per polyphase path) of T-deep complex sample delay lines. A write
// shifts the new sample into column 0 of the addressed row and moves that row's
// older samples one column on; the other rows hold. One whole row (all T
// columns) is read combinationally per cycle and feeds the parallel MAC. A read
// and a write of the same row in the same cycle return the row as it was before
// the write. All registers reset to zero, so the filter starts from silence.
// Which row each input goes to is decided by the decoder (serpentine loading).
// The bank as such is part of the serial polyphase structure; organising each
// row as a T-deep shift register and resetting it are this design's choices.
module shift_register_bank
  import radio_pkg::*;
#(
  parameter int N = 5,   // rows = polyphase paths
  parameter int T = 10   // columns = taps per sub-filter
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  sample_t              wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output sample_t              rrow [T]
);

  sample_t mem [N][T];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < T; c++)
          mem[r][c] <= '0;
    end else if (we) begin
      mem[waddr][0] <= wdata;
      for (int c = 1; c < T; c++)
        mem[waddr][c] <= mem[waddr][c-1];
    end
  end

  always_comb begin
    for (int c = 0; c < T; c++)
      rrow[c] = mem[raddr][c];
  end

endmodule
