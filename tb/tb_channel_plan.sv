// Channel-plan testbench: every WLAN and UMTS channel of the receiver.
//
// Both channelizers get windowed-sinc prototype filters (cut-off at half a
// bin; the UMTS one designed at the ten times up-sampled rate, 1050 MHz). For
// each of the three WLAN channels (-42, -12, +48 MHz at 120 MS/s) and the
// twelve UMTS channels (+37.5 ... -12.5 MHz at 105 MS/s) a complex tone is
// put at the channel centre. The channelizer tuned to that channel must carry
// at least 100 times the power it carries when tuned one bin away, and the
// tuned output must be a steady tone (constant magnitude within 10 %).
module tb_channel_plan;
  import radio_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // WLAN channelizer
  logic                     w_valid = 0, w_ready, w_out, w_start;
  sample_t                  w_data = '0;
  logic                     w_we = 0;
  logic [5:0]               w_addr = '0;
  logic signed [COEF_W-1:0] w_coef = '0;
  logic [2:0]               w_k = '0;
  logic [1:0]               w_s = '0;
  logic signed [OUT_W-1:0]  w_re, w_im;

  polyphase_channelizer u_wlan (
    .clk, .rst_n, .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .coef_we(w_we), .coef_addr(w_addr), .coef_data(w_coef), .k(w_k), .s(w_s),
    .out_valid(w_out), .out_re(w_re), .out_im(w_im), .state_start(w_start));

  // UMTS channelizer
  logic                     u_valid = 0, u_ready, u_out, u_start;
  sample_t                  u_data = '0;
  logic                     u_we = 0;
  logic [11:0]              u_addr = '0;
  logic signed [COEF_W-1:0] u_coef = '0;
  logic [4:0]               u_k = '0;
  logic [1:0]               u_s = '0;
  logic signed [OUT_W-1:0]  u_re, u_im;

  umts_channelizer u_umts (
    .clk, .rst_n, .in_valid(u_valid), .in_ready(u_ready), .in_data(u_data),
    .coef_we(u_we), .coef_addr(u_addr), .coef_data(u_coef), .k(u_k), .s(u_s),
    .out_valid(u_out), .out_re(u_re), .out_im(u_im), .state_start(u_start));

  int checks = 0, failures = 0;
  int tested_wlan = 0, tested_umts = 0;
  real pw_sum, pu_sum, pw_min, pw_max, pu_min, pu_max;
  int  nw_meas, nu_meas;
  bit  measure = 0;

  always @(negedge clk) begin
    if (measure && w_out) begin
      real p;
      p = real'(w_re) * real'(w_re) + real'(w_im) * real'(w_im);
      pw_sum += p; nw_meas++;
      if (p < pw_min) pw_min = p;
      if (p > pw_max) pw_max = p;
    end
    if (measure && u_out) begin
      real p;
      p = real'(u_re) * real'(u_re) + real'(u_im) * real'(u_im);
      pu_sum += p; nu_meas++;
      if (p < pu_min) pu_min = p;
      if (p > pu_max) pu_max = p;
    end
  end

  function automatic int design_tap(input int n, input int len, input real fc, input real gain);
    real a, w, x;
    a = real'(n) - real'(len - 1) / 2.0;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(len - 1));
    x = 2.0 * fc * ((a == 0.0) ? 1.0 : $sin(2.0 * PI * fc * a) / (2.0 * PI * fc * a));
    return $rtoi(gain * w * x);
  endfunction

  // feed a tone of k4/(4N) cycles per sample to one channelizer
  int wj = 0, uj = 0;
  task automatic run_wlan(input int tone_k4, input int nin);
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      w_valid = 1;
      w_data.re = DATA_W'($rtoi(3000.0 * $cos(2.0 * PI * real'(tone_k4) * real'(wj) / 20.0)));
      w_data.im = DATA_W'($rtoi(3000.0 * $sin(2.0 * PI * real'(tone_k4) * real'(wj) / 20.0)));
      #1;
      while (!w_ready) begin @(negedge clk); #1; end
      wj++;
    end
    @(negedge clk) w_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic run_umts(input int tone_k4, input int nin);
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      u_valid = 1;
      u_data.re = DATA_W'($rtoi(3000.0 * $cos(2.0 * PI * real'(tone_k4) * real'(uj) / 84.0)));
      u_data.im = DATA_W'($rtoi(3000.0 * $sin(2.0 * PI * real'(tone_k4) * real'(uj) / 84.0)));
      #1;
      while (!u_ready) begin @(negedge clk); #1; end
      uj++;
    end
    @(negedge clk) u_valid = 0;
    repeat (60) @(negedge clk);
  endtask

  function automatic void start_meas();
    pw_sum = 0.0; pu_sum = 0.0; nw_meas = 0; nu_meas = 0;
    pw_min = 1.0e300; pu_min = 1.0e300; pw_max = 0.0; pu_max = 0.0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wlan_k4[3];
    int umts_k4[12];
    wlan_k4 = '{13, 18, 8};                           // -42, -12, +48 MHz
    for (int c = 0; c < 12; c++) umts_k4[c] = (30 - 4 * c + 84) % 84;  // +37.5 ... -12.5 MHz

    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      w_we = 1; w_addr = 6'(n); w_coef = COEF_W'(design_tap(n, 50, 0.5 / 5.0, 2000.0 * 2.5));
    end
    @(negedge clk) w_we = 0;
    for (int n = 0; n < 2520; n++) begin
      @(negedge clk);
      u_we = 1; u_addr = 12'(n); u_coef = COEF_W'(design_tap(n, 2520, 0.5 / 210.0, 2000.0 * 105.0));
    end
    @(negedge clk) u_we = 0;
    rst_n = 1;

    foreach (wlan_k4[c]) begin
      real p_on, p_off, var_ok;
      int k4, k4_off;
      k4 = wlan_k4[c];
      k4_off = (k4 + 4) % 20;
      w_k = 3'(k4 / 4); w_s = 2'(k4 % 4);
      run_wlan(k4, 6 * 15);
      start_meas(); measure = 1; run_wlan(k4, 6 * 40); measure = 0;
      p_on = pw_sum / real'(nw_meas);
      var_ok = (pw_max <= 1.21 * pw_min) ? 1.0 : 0.0;
      w_k = 3'(k4_off / 4); w_s = 2'(k4_off % 4);
      run_wlan(k4, 6 * 15);
      start_meas(); measure = 1; run_wlan(k4, 6 * 40); measure = 0;
      p_off = pw_sum / real'(nw_meas);
      checks += 2;
      if (!(p_on > 100.0 * p_off)) begin failures++; $display("WLAN k4=%0d: on %g off %g", k4, p_on, p_off); end
      if (var_ok == 0.0) begin failures++; $display("WLAN k4=%0d: magnitude not steady", k4); end
      $display("WLAN channel k=%0d s=%0d: rejection of the next bin %0.1f dB", k4 / 4, k4 % 4, 10.0 * $log10(p_on / p_off));
      tested_wlan++;
    end

    foreach (umts_k4[c]) begin
      real p_on, p_off, var_ok;
      int k4, k4_off;
      k4 = umts_k4[c];
      k4_off = (k4 + 4) % 84;
      u_k = 5'(k4 / 4); u_s = 2'(k4 % 4);
      run_umts(k4, 300);
      start_meas(); measure = 1; run_umts(k4, 120); measure = 0;
      p_on = pu_sum / real'(nu_meas);
      var_ok = (pu_max <= 1.21 * pu_min) ? 1.0 : 0.0;
      u_k = 5'(k4_off / 4); u_s = 2'(k4_off % 4);
      run_umts(k4, 300);
      start_meas(); measure = 1; run_umts(k4, 120); measure = 0;
      p_off = pu_sum / real'(nu_meas);
      checks += 2;
      if (!(p_on > 100.0 * p_off)) begin failures++; $display("UMTS k4=%0d: on %g off %g", k4, p_on, p_off); end
      if (var_ok == 0.0) begin failures++; $display("UMTS k4=%0d: magnitude not steady", k4); end
      $display("UMTS channel k=%0d s=%0d: rejection of the next bin %0.1f dB", k4 / 4, k4 % 4, 10.0 * $log10(p_on / p_off));
      tested_umts++;
    end

    checks++;
    if (tested_wlan != 3 || tested_umts != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
