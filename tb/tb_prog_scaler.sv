// tb_prog_scaler: random values and divisors (including 0, which acts as 1),
// with negative values and values far above 255 to exercise both limits.
module tb_prog_scaler;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, n_low = 0, n_high = 0;
  always #5 clk = ~clk;

  logic [7:0] divisor;
  sum_t       x;
  pix_t       pix;

  prog_scaler dut (.clk, .rst_n, .divisor, .x, .pix);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, d, exp;
    divisor = 8'd1; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      v = (n % 3 == 0) ? longint'($urandom_range(0, 4000)) - 1000
                       : longint'($urandom_range(0, 587520)) - 293760;
      d = (n % 50 == 0) ? 0 : longint'($urandom_range(1, 255));
      x = sum_t'(v);
      divisor = 8'(d);
      if (d == 0) d = 1;
      exp = (v < 0) ? 0 : v / d;
      if (v < 0) n_low++;
      if (exp > 255) begin exp = 255; n_high++; end
      @(negedge clk);
      checks++;
      if (longint'(pix) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d d=%0d got %0d exp %0d", v, divisor, pix, exp);
      end
    end
    if (n_low == 0 || n_high == 0) failures++;
    $display("limited low %0d, high %0d", n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
