// Testbench of the phasor multiplication in the UMTS size (84 phasors).
// Random inputs and indices; the reference forms the phasor from $cos/$sin
// rounded to 14 fraction bits and does the complex product. Also checks the
// table's corner values (index 0 is 1.0, index N4/4 is j).
module tb_phasor_mult;
  import radio_pkg::*;

  localparam int N4 = 84, IW = 32, OW = IW + PH_W + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid = 0, out_valid;
  logic signed [IW-1:0]  in_re = '0, in_im = '0;
  logic [6:0]            idx = '0;
  logic [1:0]            in_tag = '0, out_tag;
  logic signed [OW-1:0]  out_re, out_im;

  phasor_mult #(.N4(N4), .IW(IW), .TAG_W(2)) dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .idx, .in_tag,
    .out_valid, .out_re, .out_im, .out_tag);

  int checks = 0, failures = 0;

  task automatic one(input longint a, input longint b, input int i);
    longint c, d, wr, wi;
    real ang;
    @(negedge clk);
    in_valid = 1; in_re = IW'(a); in_im = IW'(b); idx = 7'(i); in_tag = 2'(i);
    ang = 2.0 * 3.14159265358979323846 * real'(i) / real'(N4);
    c = longint'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
    d = longint'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
    wr = a * c - b * d;
    wi = a * d + b * c;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(out_re) != wr || longint'(out_im) != wi || out_tag != 2'(i)) begin
      failures++;
      if (failures < 10) $display("idx %0d: got (%0d,%0d) want (%0d,%0d)", i, out_re, out_im, wr, wi);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(1000, 0, 0);
    checks++; if (out_re != 1000 * 16384 || out_im != 0) failures++;
    one(1000, 0, N4 / 4);
    checks++; if (out_re != 0 || out_im != 1000 * 16384) failures++;
    for (int it = 0; it < 2000; it++)
      one(longint'($signed($urandom)), longint'($signed($urandom)), $urandom_range(N4 - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
