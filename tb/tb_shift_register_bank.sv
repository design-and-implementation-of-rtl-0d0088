// Testbench of the shift register bank (5 rows x 10 columns).
// Random writes to random rows; every cycle a random row is read and compared
// with a model kept as queues, one per row. Checks that a write shifts only
// its own row and that a same-cycle read returns the row before the write.
module tb_shift_register_bank;
  import radio_pkg::*;

  localparam int N = 5, T = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         we = 0;
  logic [2:0]   waddr = '0, raddr = '0;
  sample_t      wdata = '0;
  sample_t      rrow [T];

  shift_register_bank #(.N(N), .T(T)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rrow);

  sample_t model [N][T];
  int checks = 0, failures = 0, same_row = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) for (int c = 0; c < T; c++) model[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      we    = ($urandom_range(3) != 0);
      waddr = 3'($urandom_range(N - 1));
      raddr = 3'($urandom_range(N - 1));
      wdata = sample_t'($urandom);
      #1;
      if (we && waddr == raddr) same_row++;
      for (int c = 0; c < T; c++) begin
        checks++;
        if (rrow[c] != model[raddr][c]) begin
          failures++;
          if (failures < 10) $display("it %0d row %0d col %0d: got %h want %h", it, raddr, c, rrow[c], model[raddr][c]);
        end
      end
      @(posedge clk);
      if (we) begin
        for (int c = T - 1; c > 0; c--) model[waddr][c] = model[waddr][c-1];
        model[waddr][0] = wdata;
      end
    end
    checks++;
    if (same_row == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
