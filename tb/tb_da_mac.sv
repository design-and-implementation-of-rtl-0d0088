// Testbench of the distributed-arithmetic sub-filter (10 taps, 5 sets).
// Loads random coefficients by prototype index (some rewritten later to
// exercise table rebuilding), then drives random complex data, sets and
// quarter-bin offsets, including the most negative data value, and compares
// each result with the directly computed sum of products turned by j^(s*t).
module tb_da_mac;
  import radio_pkg::*;

  localparam int T = 10, NSETS = 5, NTAP = T * NSETS;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(T);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     coef_we = 0, in_valid = 0, out_valid;
  logic [5:0]               coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  sample_t                  data [T];
  logic [2:0]               set = '0;
  logic [1:0]               s = '0;
  logic [7:0]               in_tag = '0, out_tag;
  logic signed [ACC_W-1:0]  out_re, out_im;

  da_mac #(.T(T), .NSETS(NSETS), .TAG_W(8)) dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid, .data, .set, .s, .in_tag,
    .out_valid, .out_re, .out_im, .out_tag);

  int h[NTAP];
  int checks = 0, failures = 0;

  task automatic wcoef(input int n, input int v);
    @(negedge clk);
    coef_we = 1; coef_addr = 6'(n); coef_data = COEF_W'(v); h[n] = v;
    @(negedge clk) coef_we = 0;
  endtask

  task automatic eval_check(input int it);
    longint wr, wi;
    int c;
    @(negedge clk);
    in_valid = 1;
    s = 2'($urandom_range(3));
    c = $urandom_range(NSETS - 1);
    set = 3'(c);
    in_tag = 8'($urandom);
    wr = 0; wi = 0;
    for (int t = 0; t < T; t++) begin
      longint a, b, pr, pi;
      data[t].re = ($urandom_range(9) == 0) ? 16'sh8000 : DATA_W'($urandom);
      data[t].im = ($urandom_range(9) == 0) ? 16'sh8000 : DATA_W'($urandom);
      a = longint'(data[t].re); b = longint'(data[t].im);
      pr = a * h[c + NSETS * t];
      pi = b * h[c + NSETS * t];
      case ((int'(s) * t) % 4)
        0: begin wr += pr; wi += pi; end
        1: begin wr -= pi; wi += pr; end
        2: begin wr -= pr; wi -= pi; end
        default: begin wr += pi; wi -= pr; end
      endcase
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(out_re) != wr || longint'(out_im) != wi || out_tag != in_tag) begin
      failures++;
      if (failures < 10) $display("it %0d set %0d s %0d: got (%0d,%0d) want (%0d,%0d)", it, c, s, out_re, out_im, wr, wi);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) data[t] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NTAP; n++) wcoef(n, $urandom_range(4095) - 2048);
    for (int it = 0; it < 1000; it++) eval_check(it);
    // rewrite some coefficients, including extreme values
    for (int i = 0; i < 20; i++) wcoef($urandom_range(NTAP - 1), (i % 2) ? -2048 : 2047);
    for (int it = 0; it < 1000; it++) eval_check(it);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
