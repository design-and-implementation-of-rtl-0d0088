// Testbench of the channelizer decoder in the UMTS configuration
// (N=21, L=10, M=17, first input to R16).
//
// With an input offered every clock it checks, for 420 states (two full
// 210-state periods): the register each input is loaded into, against the
// loading sequence R16,R6 / R17,R7 / R18,R8 / R19 / ... / R4,R15 / R5 and the
// rule "-10 modulo 21"; the number of inputs of every state (1 or 2, 357 per
// 210 states); for every compute cycle the row, coefficient set and phasor
// index, worked out from the input count; and that a register that is not
// reloaded between two states moves on by 17 coefficient sets (mod 210).
module tb_channelizer_decoder;

  localparam int N = 21, L = 10, M = 17, R_INIT = 9, A0 = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_ready;
  logic [4:0] k = 5'd7;
  logic [1:0] s = 2'd2;
  logic       load_we, rd_valid, rd_first, rd_last, state_start;
  logic [4:0] load_addr, rd_row;
  logic [7:0] rd_set;
  logic [6:0] rd_pidx;
  logic [1:0] rd_s;

  channelizer_decoder #(.N(N), .L(L), .M(M), .R_INIT(R_INIT), .A0(A0)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .k, .s,
    .load_we, .load_addr,
    .rd_valid, .rd_row, .rd_set, .rd_pidx, .rd_s, .rd_first, .rd_last,
    .state_start
  );

  int checks = 0, failures = 0;
  int nloads = 0, state = -1, cyc_in_state = 0;
  int loads_of_state[$];
  int addr_of_input[$];
  int set_of_row_prev[N], set_of_row_cur[N];
  bit loaded_since[N];
  int carry_checks = 0;

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("state %0d: %s = %0d, want %0d", state, what, got, want);
    end
  endtask

  function automatic int cum_inputs(input int m);   // inputs loaded by the end of state m
    return (R_INIT + M * (m + 1)) / L;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      if (load_we) begin
        addr_of_input.push_back(int'(load_addr));
        expect_eq(int'(load_addr), ((A0 - L * nloads) % N + N * L) % N, "load row");
        loaded_since[load_addr] = 1'b1;
        nloads++;
      end
      if (rd_valid) begin
        int m, i0, r, q, k4;
        if (state_start) begin
          state++;
          cyc_in_state = 0;
          for (int a = 0; a < N; a++) begin
            set_of_row_prev[a] = set_of_row_cur[a];
          end
        end
        m  = state;
        i0 = cum_inputs(m) - 1;
        r  = (R_INIT + M * (m + 1)) % L;
        q  = N - 1 - cyc_in_state;
        k4 = 4 * 7 + 2;
        expect_eq(int'(rd_first), int'(cyc_in_state == 0), "first");
        expect_eq(int'(rd_last), int'(cyc_in_state == N - 1), "last");
        expect_eq(int'(rd_row), (i0 - q >= 0) ? addr_of_input[i0 - q] : ((A0 - L * (i0 - q)) % N + N) % N, "row");
        expect_eq(int'(rd_set), r + L * q, "coefficient set");
        expect_eq(int'(rd_pidx), ((k4 * (q - i0)) % (4 * N) + 4 * N) % (4 * N), "phasor index");
        expect_eq(int'(rd_s), 2, "s");
        set_of_row_cur[rd_row] = int'(rd_set);
        if (cyc_in_state == N - 1) begin
          if (m > 0)
            for (int a = 0; a < N; a++)
              if (!loaded_since[a]) begin
                expect_eq((set_of_row_cur[a] - set_of_row_prev[a] + 210) % 210, 17, "set step");
                carry_checks++;
              end
          for (int a = 0; a < N; a++) loaded_since[a] = 1'b0;
        end
        cyc_in_state++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int table_v [6][2];
    int first_in;
    repeat (3) @(negedge clk);
    rst_n = 1;
    in_valid = 1;
    wait (nloads == 714);
    @(posedge clk);
    #1;
    in_valid = 0;
    repeat (30) @(negedge clk);
    // the register loading sequence of the 210-state period
    table_v = '{'{16, 6}, '{17, 7}, '{18, 8}, '{19, -1}, '{4, 15}, '{5, -1}};
    foreach (table_v[e]) begin
      int m;
      m = (e < 4) ? e : 204 + e;
      first_in = (m == 0) ? 0 : cum_inputs(m - 1);
      expect_eq(cum_inputs(m) - first_in, (table_v[e][1] < 0) ? 1 : 2, "inputs in state");
      expect_eq(addr_of_input[first_in], table_v[e][0], "first register of state");
      if (table_v[e][1] >= 0) expect_eq(addr_of_input[first_in + 1], table_v[e][1], "second register of state");
    end
    expect_eq(cum_inputs(209), 357, "inputs per 210 states");
    expect_eq(nloads, 714, "inputs taken for 420 states");
    expect_eq(state, 419, "states computed");
    checks++;
    if (carry_checks < 1000) begin failures++; $display("too few set-step checks: %0d", carry_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
