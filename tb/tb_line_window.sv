// tb_line_window: feeds a random pixel stream into line_window at the
// default line length (512) and checks all nine window registers every cycle.
// With pixel n entering at clock n, after clock m the window element
// k = 3*row + col must hold pixel m - (2-row)*512 - (2-col), or 0 for a
// pixel before the start of the stream.
module tb_line_window;
  import pe_pkg::*;
  localparam int L = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pix_t pix_in;
  win_t win;
  pix_t s[4 * L];

  line_window dut (.clk, .rst_n, .pix_in, .win);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    pix_t exp;
    foreach (s[i]) s[i] = pix_t'($urandom);
    pix_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4 * L; m++) begin
      pix_in = s[m];
      @(negedge clk);
      for (int k = 0; k < 9; k++) begin
        idx = m - (2 - k / 3) * L - (2 - k % 3);
        exp = (idx < 0) ? '0 : s[idx];
        checks++;
        if (win[k] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d k=%0d got %0d exp %0d", m, k, win[k], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
