// Decoder: the state-machine controller of the serial polyphase channelizer.
//
// The channelizer computes one output sample per "state". A state is entered
// with the up-sampled time residue r (0..L-1, the age in up-sampled ticks of
// the newest input at the output instant); it first needs
// floor((r_prev+M)/L) new inputs and then reads the N rows of the shift
// register bank, one per cycle. This realises resampling by L/M: with
// L=1, M=6 (WLAN) every state takes six inputs into a five-path filter; with
// L=10, M=17 (UMTS) it takes one or two inputs, 357 inputs in 210 states.
//
// Loading: input j goes to row (A0 - L*j) mod N, a constant step of -L modulo
// N within a state and across states (serpentine loading). For UMTS with
// A0=16 this reproduces the register loading sequence R16,R6 / R17,R7 /
// R18,R8 / R19 / ... / R4,R15 / R5 of the 210-state period.
//
// Reading: the row holding the input of age q (q = 0 newest .. N-1) is
// (a0 + L*q) mod N, a0 being the row of the newest input. It is filtered with
// coefficient set c = r + L*q (sets of stride N*L in the prototype) and turned
// by phasor index (4k+s)*(q - i0) mod 4N, i0 being the index of the newest
// input; this phase term includes the heterodyne of the channel at
// (k + s/4) channel spacings to base band. Rows are read in the order
// q = N-1 down to 0, the same order in which the next state's inputs overwrite
// them, so the next state's inputs can be taken while the current state is
// still being computed: load i of the next state is accepted only once row
// q = N-1-i has been read. With one input per clock the WLAN channelizer then
// takes one input every cycle and gives one output every six.
//
// Interface: in_valid/in_ready accept an input; load_we/load_addr write it to
// the bank in the same cycle. rd_valid/rd_row/rd_set/rd_pidx/rd_first/rd_last
// describe the row read this cycle (combinational from registers). k and s
// are sampled when a state's computation starts. The state counts, the
// loading step and the UMTS loading sequence follow the specified design; the
// read order, the overlap of loading with computing and the handshake are
// this design's own.
module channelizer_decoder #(
  parameter int N      = 5,    // polyphase paths
  parameter int L      = 1,    // up-sampling factor
  parameter int M      = 6,    // down-sampling factor
  parameter int R_INIT = 0,    // residue before state 0
  parameter int A0     = 4,    // row of the first input
  parameter int NW     = $clog2(N),
  parameter int SW     = $clog2(N*L),
  parameter int PW     = $clog2(4*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [NW-1:0] k,
  input  logic [1:0]    s,
  output logic          load_we,
  output logic [NW-1:0] load_addr,
  output logic          rd_valid,
  output logic [NW-1:0] rd_row,
  output logic [SW-1:0] rd_set,
  output logic [PW-1:0] rd_pidx,
  output logic [1:0]    rd_s,
  output logic          rd_first,
  output logic          rd_last,
  output logic          state_start   // a state's computation starts this cycle
);

  localparam int N4    = 4 * N;
  localparam int LN    = L % N;
  localparam int CW    = $clog2((L + M) / L + 2);  // width of the load counter
  localparam int NEED0 = (R_INIT + M) / L;

  // ---------------- loading side ----------------
  logic [CW-1:0] ld_need;     // inputs still needed by the state being loaded
  logic [CW-1:0] ld_idx;      // inputs already taken in that state
  logic [NW-1:0] wp;          // row for the next input
  logic [NW-1:0] last_row;    // row of the newest input
  logic [PW-1:0] i0mod;       // index of the newest input, modulo 4N
  logic [$clog2(L+1)-1:0] r_cur;  // residue of the state being loaded

  // ---------------- computing side ----------------
  logic          busy;
  logic [NW-1:0] cc;          // read index (0..N-1) of this cycle when busy
  logic [NW-1:0] cur_row;
  logic [SW-1:0] cur_set;
  logic [PW-1:0] cur_pidx;
  logic [PW-1:0] cur_k4;
  logic [1:0]    cur_s;

  logic          start;
  logic [CW-1:0] need_next;
  logic [NW-1:0] row0;
  logic [SW-1:0] set0;
  logic [PW-1:0] pidx0, k4_now;
  logic          take;
  logic [NW-1:0] ld_idx_sat;

  assign start     = (ld_need == '0) && !busy;
  assign need_next = CW'((int'(r_cur) + M) / L);
  assign k4_now    = PW'(4 * int'(k) + int'(s));
  assign row0      = NW'((int'(last_row) + N - LN) % N);          // q = N-1
  assign set0      = SW'(int'(r_cur) + L * (N - 1));
  assign pidx0     = PW'((int'(k4_now) * ((N - 1 + N4 - int'(i0mod)) % N4)) % N4);
  assign ld_idx_sat = (int'(ld_idx) >= N - 1) ? NW'(N - 1) : NW'(ld_idx);

  always_comb begin
    if (start)      in_ready = (need_next != '0);
    else if (busy)  in_ready = (ld_need != '0) && (ld_idx_sat <= cc);
    else            in_ready = (ld_need != '0);
  end

  assign take      = in_valid && in_ready;
  assign load_we   = take;
  assign load_addr = wp;

  assign rd_valid    = start || busy;
  assign rd_row      = start ? row0  : cur_row;
  assign rd_set      = start ? set0  : cur_set;
  assign rd_pidx     = start ? pidx0 : cur_pidx;
  assign rd_s        = start ? s     : cur_s;
  assign rd_first    = start;
  assign rd_last     = start ? (N == 1) : (busy && cc == NW'(N - 1));
  assign state_start = start;

  function automatic logic [PW-1:0] pstep(input logic [PW-1:0] p, input logic [PW-1:0] k4);
    return PW'((int'(p) + N4 - int'(k4)) % N4);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_need  <= CW'(NEED0);
      ld_idx   <= '0;
      wp       <= NW'(A0 % N);
      last_row <= NW'((A0 + LN) % N);
      i0mod    <= PW'(N4 - 1);
      r_cur    <= ($clog2(L+1))'((R_INIT + M) % L);
      busy     <= 1'b0;
      cc       <= '0;
      cur_row  <= '0;
      cur_set  <= '0;
      cur_pidx <= '0;
      cur_k4   <= '0;
      cur_s    <= '0;
    end else begin
      // loading side
      if (start) begin
        ld_need <= need_next - CW'(take);
        ld_idx  <= CW'(take);
        r_cur   <= ($clog2(L+1))'((int'(r_cur) + M) % L);
      end else if (take) begin
        ld_need <= ld_need - 1'b1;
        ld_idx  <= ld_idx + 1'b1;
      end
      if (take) begin
        wp       <= NW'((int'(wp) + N - LN) % N);
        last_row <= wp;
        i0mod    <= PW'((int'(i0mod) + 1) % N4);
      end
      // computing side
      if (start) begin
        busy     <= (N > 1);
        cc       <= NW'(1 % N);
        cur_row  <= NW'((int'(row0) + N - LN) % N);
        cur_set  <= SW'(int'(set0) - L);
        cur_pidx <= pstep(pidx0, k4_now);
        cur_k4   <= k4_now;
        cur_s    <= s;
      end else if (busy) begin
        if (cc == NW'(N - 1)) busy <= 1'b0;
        cc       <= cc + 1'b1;
        cur_row  <= NW'((int'(cur_row) + N - LN) % N);
        cur_set  <= SW'(int'(cur_set) - L);
        cur_pidx <= pstep(cur_pidx, cur_k4);
      end
    end
  end

  // A row must never be overwritten before it has been read for the state
  // being computed.
  a_no_early_load: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && take) |-> (ld_idx_sat <= cc));
  a_k_range: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (int'(k) < N));

endmodule
