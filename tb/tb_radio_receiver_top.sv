// End-to-end testbench of the dual-standard receiver, every parameter at its
// default (32-tap band-pass filters, 5x10 WLAN and 21x12 UMTS channelizers).
//
// A random bandpass-sampled ADC stream runs through both paths; the reference
// model filters and decimates it (by 7 and by 8) and then channelizes it
// (6:1 and 17/10), and every WLAN and UMTS output is compared bit for bit.
//   Phase 1: ADC sample every other clock; WLAN at bin 2 (+48 MHz), UMTS at
//            bin 7 + 2/4 (+37.5 MHz). The UMTS channelizer throttles its FIFO
//            (back-pressure), no sample may be dropped.
//   Phase 2: retune (mode switch) to WLAN -42 MHz (k=3, s=1) and UMTS
//            -12.5 MHz (k=18, s=2).
//   Phase 3: ADC sample every clock. WLAN keeps up in real time (no drop,
//            outputs still exact); the UMTS FIFO overflows and drops samples.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_radio_receiver_top;
  import radio_pkg::*;
  import chan_ref_pkg::*;

  localparam int TAPS = 32;
  localparam int NX1 = 8400, NX2 = 4200, NX3 = 2800;
  localparam int NX = NX1 + NX2 + NX3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     adc_valid = 0;
  logic signed [DATA_W-1:0] adc_data = '0;
  logic                     coef_we = 0;
  coef_target_e             coef_target = TGT_WLAN_BPF;
  logic [11:0]              coef_addr = '0;
  logic signed [COEF_W-1:0] coef_re = '0, coef_im = '0;
  logic [2:0]               wlan_k = 3'd2;
  logic [1:0]               wlan_s = 2'd0;
  logic [4:0]               umts_k = 5'd7;
  logic [1:0]               umts_s = 2'd2;
  logic                     wlan_valid, umts_valid, wlan_overflow, umts_overflow;
  logic signed [OUT_W-1:0]  wlan_re, wlan_im, umts_re, umts_im;
  logic [15:0]              wlan_dropped, umts_dropped;

  radio_receiver_top dut (
    .clk, .rst_n, .adc_valid, .adc_data,
    .coef_we, .coef_target, .coef_addr, .coef_re, .coef_im,
    .wlan_k, .wlan_s, .umts_k, .umts_s,
    .wlan_valid, .wlan_re, .wlan_im, .umts_valid, .umts_re, .umts_im,
    .wlan_overflow, .wlan_dropped, .umts_overflow, .umts_dropped
  );

  int x[] = new[NX];
  int wbr[2][TAPS], umr[2][TAPS];
  int wcr[] = new[TAPS];
  int wci[] = new[TAPS];
  int ucr[] = new[TAPS];
  int uci[] = new[TAPS];
  int hw[] = new[50];
  int hu[] = new[2520];
  int wxr[] = new[NX / 7];
  int wxi[] = new[NX / 7];
  int uxr[] = new[NX / 8];
  int uxi[] = new[NX / 8];

  int checks = 0, failures = 0;
  int nw = 0, nu = 0;
  int w_switch = 1 << 30, u_switch = 1 << 30, u_stop = 1 << 30;
  int w_k4_old = 8, w_k4_new = 13, u_k4_old = 30, u_k4_new = 74;
  // mechanism counters
  int n_backpressure = 0, n_retune = 0, n_quarter_w = 0, n_half_u = 0;
  int n_one_in = 0, n_two_in = 0, n_overflow_cycles = 0, n_wlan_stall = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.u_umts_fifo.rd_valid && !dut.uc_ready) n_backpressure++;
      if (dut.u_wlan_fifo.rd_valid && !dut.wc_ready) n_wlan_stall++;
      if (dut.u_umts_fifo.wr_valid && dut.u_umts_fifo.full && !dut.u_umts_fifo.do_rd) n_overflow_cycles++;
      if (dut.u_umts_chan.u_engine.u_decoder.state_start) begin
        if (dut.u_umts_chan.u_engine.u_decoder.need_next == 1) n_one_in++;
        if (dut.u_umts_chan.u_engine.u_decoder.need_next == 2) n_two_in++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && wlan_valid) begin
      longint yr, yi;
      int k4;
      k4 = (nw >= w_switch) ? w_k4_new : w_k4_old;
      if (k4 % 4 != 0) n_quarter_w++;
      chan_ref(5, 10, 1, 6, 0, hw, wxr, wxi, nw, k4, yr, yi);
      checks++;
      if (yr != longint'(wlan_re) || yi != longint'(wlan_im)) begin
        failures++;
        if (failures < 10) $display("WLAN out %0d: got (%0d,%0d) want (%0d,%0d)", nw, wlan_re, wlan_im, yr, yi);
      end
      nw++;
    end
    if (rst_n && umts_valid) begin
      longint yr, yi;
      int k4;
      k4 = (nu >= u_switch) ? u_k4_new : u_k4_old;
      if (nu < u_stop) begin
        if (k4 % 4 == 2) n_half_u++;
        chan_ref(21, 12, 10, 17, 9, hu, uxr, uxi, nu, k4, yr, yi);
        checks++;
        if (yr != longint'(umts_re) || yi != longint'(umts_im)) begin
          failures++;
          if (failures < 10) $display("UMTS out %0d: got (%0d,%0d) want (%0d,%0d)", nu, umts_re, umts_im, yr, yi);
        end
      end
      nu++;
    end
  end

  task automatic wr(input coef_target_e tg, input int a, input int re, input int im);
    @(negedge clk);
    coef_we = 1; coef_target = tg; coef_addr = 12'(a); coef_re = COEF_W'(re); coef_im = COEF_W'(im);
  endtask

  task automatic run_adc(input int from, input int to, input int every);
    for (int j = from; j < to; j++) begin
      @(negedge clk);
      adc_valid = 1; adc_data = DATA_W'(x[j]);
      repeat (every - 1) begin @(negedge clk); adc_valid = 0; end
    end
    @(negedge clk) adc_valid = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NX; j++) x[j] = $urandom_range(2047) - 1024;
    for (int n = 0; n < TAPS; n++) begin
      wcr[n] = $urandom_range(2047) - 1024; wci[n] = $urandom_range(2047) - 1024;
      ucr[n] = $urandom_range(2047) - 1024; uci[n] = $urandom_range(2047) - 1024;
    end
    for (int n = 0; n < 50; n++)   hw[n] = $urandom_range(4095) - 2048;
    for (int n = 0; n < 2520; n++) hu[n] = $urandom_range(4095) - 2048;
    for (int m = 0; m < NX / 7; m++) bpf_ref(TAPS, 7, wcr, wci, x, m, wxr[m], wxi[m]);
    for (int m = 0; m < NX / 8; m++) bpf_ref(TAPS, 8, ucr, uci, x, m, uxr[m], uxi[m]);

    repeat (3) @(negedge clk);
    for (int n = 0; n < TAPS; n++) wr(TGT_WLAN_BPF, n, wcr[n], wci[n]);
    for (int n = 0; n < TAPS; n++) wr(TGT_UMTS_BPF, n, ucr[n], uci[n]);
    for (int n = 0; n < 50; n++)   wr(TGT_WLAN_PROTO, n, hw[n], 0);
    for (int n = 0; n < 2520; n++) wr(TGT_UMTS_PROTO, n, hu[n], 0);
    @(negedge clk) coef_we = 0;
    rst_n = 1;

    // phase 1
    run_adc(0, NX1, 2);
    repeat (200) @(negedge clk);
    checks++;
    if (wlan_dropped != 0 || umts_dropped != 0) begin
      failures++; $display("phase 1 dropped samples: %0d %0d", wlan_dropped, umts_dropped);
    end
    // phase 2: mode switch
    w_switch = nw; u_switch = nu;
    wlan_k = 3'd3; wlan_s = 2'd1;
    umts_k = 5'd18; umts_s = 2'd2;
    n_retune++;
    run_adc(NX1, NX1 + NX2, 2);
    repeat (200) @(negedge clk);
    checks++;
    if (umts_dropped != 0) begin failures++; $display("phase 2 dropped %0d", umts_dropped); end
    // phase 3: full ADC rate, UMTS overflows
    u_stop = nu;
    run_adc(NX1 + NX2, NX, 1);
    repeat (400) @(negedge clk);
    checks++;
    if (wlan_dropped != 0 || wlan_overflow) begin failures++; $display("WLAN dropped %0d at full rate", wlan_dropped); end
    checks++;
    if (!umts_overflow || umts_dropped == 0) begin failures++; $display("UMTS never overflowed"); end
    checks++;
    if (nw != NX / 7 / 6) begin failures++; $display("WLAN outputs %0d want %0d", nw, NX / 7 / 6); end

    $display("WLAN outputs=%0d UMTS outputs=%0d (%0d compared)", nw, nu, u_stop);
    $display("back-pressure cycles=%0d retunes=%0d WLAN quarter-bin outputs=%0d UMTS half-bin outputs=%0d",
             n_backpressure, n_retune, n_quarter_w, n_half_u);
    $display("UMTS 1-input states=%0d 2-input states=%0d overflow cycles=%0d dropped=%0d WLAN stalls=%0d",
             n_one_in, n_two_in, n_overflow_cycles, umts_dropped, n_wlan_stall);
    checks += 7;
    if (n_backpressure == 0) failures++;
    if (n_retune == 0) failures++;
    if (n_quarter_w == 0) failures++;
    if (n_half_u == 0) failures++;
    if (n_one_in == 0) failures++;
    if (n_two_in == 0) failures++;
    if (n_overflow_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
