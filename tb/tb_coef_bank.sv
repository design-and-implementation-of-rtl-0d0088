// Testbench of the coefficient bank in the UMTS size (210 sets x 12 taps).
// Writes a random 2520-tap prototype by prototype index in random order, then
// reads every set and checks that tap t of set c is h[c + 210*t].
module tb_coef_bank;
  import radio_pkg::*;

  localparam int NSETS = 210, T = 12, NTAP = NSETS * T;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                     we = 0;
  logic [11:0]              waddr = '0;
  logic signed [COEF_W-1:0] wdata = '0;
  logic [7:0]               rset = '0;
  logic signed [COEF_W-1:0] rdata [T];

  coef_bank #(.NSETS(NSETS), .T(T)) dut (.clk, .we, .waddr, .wdata, .rset, .rdata);

  int h[NTAP];
  int order[NTAP];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NTAP; n++) begin h[n] = $urandom_range(4095) - 2048; order[n] = n; end
    for (int n = NTAP - 1; n > 0; n--) begin
      int j, tmp;
      j = $urandom_range(n); tmp = order[n]; order[n] = order[j]; order[j] = tmp;
    end
    for (int i = 0; i < NTAP; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(order[i]); wdata = COEF_W'(h[order[i]]);
    end
    @(negedge clk) we = 0;
    for (int c = 0; c < NSETS; c++) begin
      @(negedge clk);
      rset = 8'(c);
      #1;
      for (int t = 0; t < T; t++) begin
        checks++;
        if (int'(rdata[t]) != h[c + NSETS * t]) begin
          failures++;
          if (failures < 10) $display("set %0d tap %0d: got %0d want %0d", c, t, rdata[t], h[c + NSETS * t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
