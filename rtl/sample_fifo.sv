// Small synchronous FIFO for complex samples, with overflow counting.
//
// Decouples a re-sampler, which delivers a sample whenever one is ready, from a
// channelizer, which takes inputs only between its compute bursts. A write
// into a full FIFO is dropped and counted in 'dropped' (saturating) and
// 'overflow' (sticky). Reads use a first-word-fall-through valid/ready
// handshake. Depth must be a power of two. This buffer is an addition of this
// design: the receiver runs from one clock, where a free-running ADC stream
// and a bursty channelizer meet.
module sample_fifo
  import radio_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  sample_t       wr_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output sample_t       rd_data,
  output logic          overflow,
  output logic [15:0]   dropped
);

  localparam int AW = $clog2(DEPTH);

  sample_t       mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          full, do_wr, do_rd;

  assign full     = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign rd_valid = (wptr != rptr);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_valid && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      if (wr_valid && !do_wr) begin
        overflow <= 1'b1;
        if (dropped != '1) dropped <= dropped + 1'b1;
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    do_rd |-> rd_valid);

endmodule
