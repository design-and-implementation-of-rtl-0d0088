// Testbench of the UMTS channelizer (21 paths x 12 taps, 2520-tap prototype,
// 17/10 resampling).
//
// 1. Random prototype, random complex input offered every clock, channel at
//    +37.5 MHz (k=7, s=2): every output must match the reference model bit
//    for bit; 714 inputs (two 357-input periods) must give exactly 420
//    outputs (two 210-state periods); the engine is compute bound, so outputs
//    must come exactly 21 clocks apart.
// 2. Retune to -12.5 MHz (k=18, s=2) and to a bin-centred channel (k=3, s=0)
//    with random gaps in the input: outputs still match.
module tb_umts_channelizer;
  import radio_pkg::*;
  import chan_ref_pkg::*;

  localparam int N = 21, T = 12, L = 10, M = 17, R_INIT = 9;
  localparam int NTAP = N * L * T;
  localparam int NX = 1600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid = 0, in_ready;
  sample_t                  in_data = '0;
  logic                     coef_we = 0;
  logic [11:0]              coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic [4:0]               k = 5'd7;
  logic [1:0]               s = 2'd2;
  logic                     out_valid, state_start;
  logic signed [OUT_W-1:0]  out_re, out_im;

  umts_channelizer dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .coef_we, .coef_addr, .coef_data, .k, .s,
    .out_valid, .out_re, .out_im, .state_start
  );

  int h[] = new[NTAP];
  int xr[] = new[NX];
  int xi[] = new[NX];
  int checks = 0, failures = 0;
  int nsent = 0, nout = 0, throttled = 0;
  int k4_of[$];
  longint cyc = 0, last_out_cyc = -1;
  bit check_rate = 0;
  int rate_errs = 0, retunes = 0, one_in = 0, two_in = 0, loads_in_state = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && state_start) k4_of.push_back(4 * int'(k) + int'(s));

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint yr, yi;
      chan_ref(N, T, L, M, R_INIT, h, xr, xi, nout, k4_of[nout], yr, yi);
      checks++;
      if (yr != longint'(out_re) || yi != longint'(out_im)) begin
        failures++;
        if (failures < 10)
          $display("mismatch out %0d: got (%0d,%0d) want (%0d,%0d)", nout, out_re, out_im, yr, yi);
      end
      if (check_rate && last_out_cyc >= 0 && cyc - last_out_cyc != N) rate_errs++;
      last_out_cyc = cyc;
      nout++;
    end
  end

  task automatic load_coefs();
    for (int n = 0; n < NTAP; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 12'(n); coef_data = COEF_W'(h[n]);
    end
    @(negedge clk) coef_we = 0;
  endtask

  task automatic feed(input int count, input int gap_pct);
    int sent = 0;
    while (sent < count) begin
      @(negedge clk);
      in_valid = ($urandom_range(99) >= gap_pct);
      in_data.re = DATA_W'(xr[nsent]);
      in_data.im = DATA_W'(xi[nsent]);
      #1;
      if (in_valid && !in_ready) throttled++;
      if (in_valid && in_ready) begin sent++; nsent++; end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic drain();
    repeat (2 * N + 10) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NTAP; n++) h[n] = $urandom_range(4095) - 2048;
    for (int j = 0; j < NX; j++) begin
      xr[j] = $urandom_range(8191) - 4096;
      xi[j] = $urandom_range(8191) - 4096;
    end
    repeat (3) @(negedge clk);
    load_coefs();
    rst_n = 1;

    check_rate = 1;
    feed(714, 0);
    drain();
    check_rate = 0;
    checks++;
    if (nout != 420) begin failures++; $display("714 inputs gave %0d outputs, want 420", nout); end
    checks++;
    if (rate_errs != 0) begin failures++; $display("%0d output spacing errors", rate_errs); end
    checks++;
    if (throttled == 0) begin failures++; $display("input was never throttled"); end

    k = 5'd18; s = 2'd2; retunes++;
    feed(300, 40);
    drain();
    k = 5'd3; s = 2'd0; retunes++;
    feed(300, 70);
    drain();

    $display("outputs=%0d retunes=%0d throttled=%0d", nout, retunes, throttled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
