// tb_mult_array: random windows and signed masks, including the extreme
// values 255 x -128 and 255 x 127; each registered product is compared with
// the integer product one clock later.
module tb_mult_array;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  win_t   win;
  mask_t  mask;
  prods_t prod;

  mult_array dut (.clk, .rst_n, .win, .mask, .prod);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    win  = '{default: '0};
    mask = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 9; k++) begin
        win[k]  = (n < 2) ? 8'd255 : pix_t'($urandom);
        mask[k] = (n == 0) ? -8'sd128 : (n == 1) ? 8'sd127 : coef_t'($urandom);
      end
      @(negedge clk);
      for (int k = 0; k < 9; k++) begin
        exp = int'(win[k]) * int'(mask[k]);
        checks++;
        if (int'(prod[k]) !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d %0d*%0d got %0d", k, win[k], mask[k], prod[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
