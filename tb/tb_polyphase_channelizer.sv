// Testbench of the WLAN channelizer (polyphase_channelizer at its defaults:
// 5 paths x 10 taps, 6:1 down-sampling).
//
// 1. Random 50-tap prototype, random complex input at one sample per clock,
//    channel k=2 s=0: every output must match the reference model bit for bit,
//    the input must never be throttled and the outputs must come exactly six
//    clocks apart (real time: 120 MS/s in, 20 MS/s out).
// 2. Retune to a quarter-bin channel (k=3, s=1, the -42 MHz WLAN channel),
//    then (k=4, s=2), with random gaps in the input: outputs still match.
// A second instance built with distributed arithmetic (USE_DA=1) gets the
// same stimulus and must give the same outputs, cycle for cycle.
// 3. Physical check: a windowed-sinc prototype and a complex tone in bin 1;
//    the channel tuned to bin 1 must carry far more power than bin 3.
module tb_polyphase_channelizer;
  import radio_pkg::*;
  import chan_ref_pkg::*;

  localparam int N = 5, T = 10, L = 1, M = 6, R_INIT = 0;
  localparam int NTAP = N * L * T;
  localparam int NX = 2400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid = 0, in_ready;
  sample_t                  in_data = '0;
  logic                     coef_we = 0;
  logic [5:0]               coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic [2:0]               k = 3'd2;
  logic [1:0]               s = 2'd0;
  logic                     out_valid, state_start;
  logic signed [OUT_W-1:0]  out_re, out_im;

  polyphase_channelizer dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .coef_we, .coef_addr, .coef_data, .k, .s,
    .out_valid, .out_re, .out_im, .state_start
  );

  logic                     da_valid, da_ready, da_start;
  logic signed [OUT_W-1:0]  da_re, da_im;
  int                       da_diffs = 0, da_outs = 0;

  polyphase_channelizer #(.USE_DA(1'b1)) dut_da (
    .clk, .rst_n, .in_valid, .in_ready(da_ready), .in_data,
    .coef_we, .coef_addr, .coef_data, .k, .s,
    .out_valid(da_valid), .out_re(da_re), .out_im(da_im), .state_start(da_start)
  );

  always @(negedge clk) begin
    if (rst_n) begin
      if (da_valid) da_outs++;
      if (da_valid != out_valid || da_ready != in_ready ||
          (out_valid && (da_re != out_re || da_im != out_im))) da_diffs++;
    end
  end

  int h[] = new[NTAP];
  int xr[] = new[NX];
  int xi[] = new[NX];
  int checks = 0, failures = 0;
  int nsent = 0, nout = 0, stalls = 0;
  int k4_of[$];
  longint cyc = 0, last_out_cyc = -1;
  bit check_rate = 0, compare = 1;
  int rate_errs = 0, retunes = 0, quarter_outs = 0;
  real pow_acc;

  always @(posedge clk) cyc <= cyc + 1;

  // record the tuning each state was computed with
  always @(negedge clk) if (rst_n && state_start) k4_of.push_back(4 * int'(k) + int'(s));

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint yr, yi;
      if (compare) begin
        chan_ref(N, T, L, M, R_INIT, h, xr, xi, nout, k4_of[nout], yr, yi);
        checks++;
        if (yr != longint'(out_re) || yi != longint'(out_im)) begin
          failures++;
          if (failures < 10)
            $display("mismatch out %0d: got (%0d,%0d) want (%0d,%0d)", nout, out_re, out_im, yr, yi);
        end
        if (k4_of[nout] % 4 != 0) quarter_outs++;
      end
      pow_acc += real'(out_re) * real'(out_re) + real'(out_im) * real'(out_im);
      if (check_rate && last_out_cyc >= 0 && cyc - last_out_cyc != M) rate_errs++;
      last_out_cyc = cyc;
      nout++;
    end
  end

  task automatic load_coefs();
    for (int n = 0; n < NTAP; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 6'(n); coef_data = COEF_W'(h[n]);
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
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) begin sent++; nsent++; end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic drain();
    repeat (4 * N + 10) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
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

    // 1. real-time stream, bin 2
    check_rate = 1;
    feed(6 * 60, 0);
    drain();
    check_rate = 0;
    checks++;
    if (stalls != 0 || rate_errs != 0) begin
      failures++;
      $display("rate: %0d stalls, %0d output spacing errors", stalls, rate_errs);
    end
    checks++;
    if (nout != 60) begin failures++; $display("expected 60 outputs, got %0d", nout); end

    // 2. retune to quarter-bin channels, with gaps
    k = 3'd3; s = 2'd1; retunes++;
    feed(6 * 40, 30);
    drain();
    k = 3'd4; s = 2'd2; retunes++;
    feed(6 * 40 + 3, 50);
    drain();
    checks++;
    if (quarter_outs < 60) begin failures++; $display("quarter-bin outputs %0d", quarter_outs); end

    // 3. tone in bin 1 through a low-pass prototype
    compare = 0;
    for (int n = 0; n < NTAP; n++) begin
      real a, w;
      a = real'(n) - real'(NTAP - 1) / 2.0;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(n) / real'(NTAP - 1));
      h[n] = $rtoi(2047.0 * w * ((a == 0.0) ? 1.0 : $sin(3.14159265358979 * a / real'(N)) /
                                               (3.14159265358979 * a / real'(N))) / 2.0);
    end
    load_coefs();
    for (int j = nsent; j < NX; j++) begin
      xr[j] = $rtoi(2000.0 * $cos(2.0 * 3.14159265358979 * real'(j) / real'(N)));
      xi[j] = $rtoi(2000.0 * $sin(2.0 * 3.14159265358979 * real'(j) / real'(N)));
    end
    begin
      real p_on, p_off;
      k = 3'd1; s = 2'd0;
      feed(6 * 20, 0); drain();
      pow_acc = 0.0;
      feed(6 * 40, 0); drain();
      p_on = pow_acc;
      k = 3'd3; s = 2'd0;
      feed(6 * 20, 0); drain();
      pow_acc = 0.0;
      feed(6 * 40, 0); drain();
      p_off = pow_acc;
      checks++;
      if (!(p_on > 100.0 * p_off) || p_on == 0.0) begin
        failures++;
        $display("tone: in-band power %g, out-of-band power %g", p_on, p_off);
      end
    end

    checks++;
    if (da_diffs != 0 || da_outs != nout) begin
      failures++; $display("DA instance differs in %0d cycles", da_diffs);
    end
    $display("outputs=%0d retunes=%0d quarter-bin outputs=%0d", nout, retunes, quarter_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
