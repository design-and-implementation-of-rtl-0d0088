// Testbench of the complex band-pass filter and re-sampler (32 taps, keep 1
// in 7). Random complex coefficients and random real input with gaps in
// in_valid; every output must match the direct FIR-and-decimate model, and
// there must be exactly one output per 7 inputs.
module tb_complex_bpf_resampler;
  import radio_pkg::*;
  import chan_ref_pkg::*;

  localparam int TAPS = 32, D = 7, NX = 7 * 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid = 0, coef_we = 0, out_valid;
  logic signed [DATA_W-1:0] in_data = '0;
  logic [4:0]               coef_addr = '0;
  logic signed [COEF_W-1:0] coef_re = '0, coef_im = '0;
  sample_t                  out_data;

  complex_bpf_resampler #(.TAPS(TAPS), .D(D)) dut (
    .clk, .rst_n, .in_valid, .in_data, .coef_we, .coef_addr, .coef_re, .coef_im,
    .out_valid, .out_data);

  int cr[] = new[TAPS];
  int ci[] = new[TAPS];
  int x[] = new[NX];
  int checks = 0, failures = 0, nout = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int yr, yi;
      bpf_ref(TAPS, D, cr, ci, x, nout, yr, yi);
      checks++;
      if (yr != int'(out_data.re) || yi != int'(out_data.im)) begin
        failures++;
        if (failures < 10) $display("out %0d: got (%0d,%0d) want (%0d,%0d)", nout, out_data.re, out_data.im, yr, yi);
      end
      nout++;
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
    for (int n = 0; n < TAPS; n++) begin
      cr[n] = $urandom_range(4095) - 2048;
      ci[n] = $urandom_range(4095) - 2048;
    end
    for (int j = 0; j < NX; j++) x[j] = (j < NX / 2) ? $urandom_range(8191) - 4096 : int'($signed(16'($urandom)));
    for (int n = 0; n < TAPS; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 5'(n); coef_re = COEF_W'(cr[n]); coef_im = COEF_W'(ci[n]);
    end
    @(negedge clk) coef_we = 0;
    rst_n = 1;
    for (int j = 0; j < NX; j++) begin
      while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_data = DATA_W'(x[j]);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != NX / D) begin failures++; $display("outputs %0d want %0d", nout, NX / D); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
