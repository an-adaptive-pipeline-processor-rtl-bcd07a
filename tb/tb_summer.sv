// tb_summer: random signed products, plus all-maximum and all-minimum sets,
// summed by the summer and compared with the integer sum one clock later.
module tb_summer;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prods_t prod;
  sum_t   sum;

  summer dut (.clk, .rst_n, .prod, .sum);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    prod = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      exp = 0;
      for (int k = 0; k < 9; k++) begin
        prod[k] = (n == 0) ? prod_t'(255 * -128) : (n == 1) ? prod_t'(255 * 127)
                : prod_t'(int'($urandom_range(0, 65280)) - 32640);
        exp += int'(prod[k]);
      end
      @(negedge clk);
      checks++;
      if (int'(sum) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
