// Testbench of the accumulator (coherent phase summation), 21 paths.
// Random groups of 21 inputs with first/last flags and random idle cycles;
// checks the sum, the 14-bit truncating shift, the saturation to 30 bits
// (some groups are made large enough to saturate) and the one-cycle
// out_valid pulse after 'last'.
module tb_path_accumulator;
  import radio_pkg::*;

  localparam int N = 21, IW = 49;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid = 0, first = 0, last = 0, out_valid;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic signed [OUT_W-1:0] out_re, out_im;

  path_accumulator #(.IW(IW), .NMAX(N)) dut (
    .clk, .rst_n, .in_valid, .first, .last, .in_re, .in_im, .out_valid, .out_re, .out_im);

  int checks = 0, failures = 0, saturated = 0, pulses = 0;

  function automatic longint satw(input longint v);
    longint hi, lo;
    hi = (longint'(1) <<< 29) - 1;
    lo = -(longint'(1) <<< 29);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  always @(negedge clk) if (out_valid) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 500; g++) begin
      longint sr, si, wr, wi;
      int big;
      sr = 0; si = 0;
      big = (g % 5 == 0) ? 44 : 36;
      for (int p = 0; p < N; p++) begin
        longint a, b;
        while ($urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 0; first = 0; last = 0;
        end
        @(negedge clk);
        a = longint'($signed($urandom)) <<< (big - 32);
        b = longint'($signed($urandom)) <<< (big - 32);
        in_valid = 1; first = (p == 0); last = (p == N - 1);
        in_re = IW'(a); in_im = IW'(b);
        sr += a; si += b;
      end
      wr = satw(sr >>> 14);
      wi = satw(si >>> 14);
      if (wr != (sr >>> 14) || wi != (si >>> 14)) saturated++;
      @(negedge clk);
      in_valid = 0; first = 0; last = 0;
      checks++;
      if (!out_valid || longint'(out_re) != wr || longint'(out_im) != wi) begin
        failures++;
        if (failures < 10) $display("group %0d: got (%0d,%0d) want (%0d,%0d)", g, out_re, out_im, wr, wi);
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (pulses != 500) begin failures++; $display("pulses %0d", pulses); end
    checks++; if (saturated == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated groups=%0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
