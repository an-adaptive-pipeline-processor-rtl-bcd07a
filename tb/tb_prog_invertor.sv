// tb_prog_invertor: every pixel value with the invertor on (255 - p) and off.
module tb_prog_invertor;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  pix_t pix_in, pix_out;

  prog_invertor dut (.clk, .rst_n, .en, .pix_in, .pix_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    en = 1'b0; pix_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1024; n++) begin
      en     = n[8];
      pix_in = pix_t'(n);
      exp    = en ? 255 - int'(pix_in) : int'(pix_in);
      @(negedge clk);
      checks++;
      if (int'(pix_out) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL en=%0d p=%0d got %0d", en, pix_in, pix_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
