// tb_prog_thresholder: all 256 pixel values against 64 thresholds, with
// the thresholder on (0/255 output, >= test) and off (pixel passes).
module tb_prog_thresholder;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  pix_t threshold, pix_in, pix_out;

  prog_thresholder dut (.clk, .rst_n, .en, .threshold, .pix_in, .pix_out);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    en = 1'b0; threshold = '0; pix_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 16384; n++) begin
      en        = n[8];
      pix_in    = pix_t'(n);
      threshold = (n % 256 == 0) ? pix_t'(n / 256 * 4) : threshold;
      exp       = en ? ((int'(pix_in) >= int'(threshold)) ? 255 : 0) : int'(pix_in);
      @(negedge clk);
      checks++;
      if (int'(pix_out) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL en=%0d p=%0d t=%0d got %0d", en, pix_in, threshold, pix_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
