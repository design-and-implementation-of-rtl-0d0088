// Testbench of the parallel MAC (10 taps).
// Random complex data, real coefficients and quarter-bin offsets s; the
// reference multiplies each product by the complex number j^(s*t) written out
// as cos/sin of a multiple of 90 degrees and sums. Checks the one-cycle
// latency and that the tag travels with the data.
module tb_parallel_mac;
  import radio_pkg::*;

  localparam int T = 10;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(T);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid = 0, out_valid;
  sample_t                  data [T];
  logic signed [COEF_W-1:0] coef [T];
  logic [1:0]               s = '0;
  logic [7:0]               in_tag = '0, out_tag;
  logic signed [ACC_W-1:0]  out_re, out_im;

  parallel_mac #(.T(T), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid, .data, .coef, .s, .in_tag,
    .out_valid, .out_re, .out_im, .out_tag);

  int checks = 0, failures = 0;
  longint want_re, want_im;
  int want_tag;
  int seen_s[4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin data[t] = '0; coef[t] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      in_valid = 1;
      s = 2'($urandom_range(3));
      seen_s[s]++;
      in_tag = 8'($urandom);
      want_re = 0; want_im = 0;
      for (int t = 0; t < T; t++) begin
        int cs, sn;
        longint pr, pi;
        data[t].re = DATA_W'($urandom);
        data[t].im = DATA_W'($urandom);
        coef[t]    = COEF_W'($urandom);
        pr = longint'(data[t].re) * coef[t];
        pi = longint'(data[t].im) * coef[t];
        cs = $rtoi($floor($cos(3.14159265358979 / 2.0 * real'(int'(s) * t)) + 0.5));
        sn = $rtoi($floor($sin(3.14159265358979 / 2.0 * real'(int'(s) * t)) + 0.5));
        want_re += pr * cs - pi * sn;
        want_im += pr * sn + pi * cs;
      end
      want_tag = int'(in_tag);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_re) != want_re || longint'(out_im) != want_im || int'(out_tag) != want_tag) begin
        failures++;
        if (failures < 10) $display("it %0d s=%0d: got v%0d (%0d,%0d) want (%0d,%0d)", it, s, out_valid, out_re, out_im, want_re, want_im);
      end
      #1;
      checks++;
      @(negedge clk);
      if (out_valid) failures++;
    end
    for (int i = 0; i < 4; i++) begin checks++; if (seen_s[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
