// tb_prog_operator: every operator function with random sums over the full
// range a 3x3 sum can take, compared one clock later with integer results
// computed here (the magnitude with a real square root, corrected to the
// integer floor).
module tb_prog_operator;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  op_mode_e op;
  sum_t     a, b, res;

  prog_operator dut (.clk, .rst_n, .op, .a, .b, .res);

  function automatic longint root(input longint x);
    longint r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, y, exp;
    op = OP_PASS_A; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      op = op_mode_e'(n % 8);
      x  = (n < 8) ? 293760 : longint'($urandom_range(0, 587520)) - 293760;
      y  = (n < 8) ? -293760 : (n % 5 == 0) ? longint'($urandom_range(0, 60)) - 30
                                            : longint'($urandom_range(0, 587520)) - 293760;
      a  = sum_t'(x);
      b  = sum_t'(y);
      case (op)
        OP_PASS_A: exp = x;
        OP_PASS_B: exp = y;
        OP_ADD:    exp = x + y;
        OP_SUB:    exp = x - y;
        OP_MAG:    exp = root(x * x + y * y);
        OP_MIN:    exp = (x < y) ? x : y;
        OP_MAX:    exp = (x > y) ? x : y;
        default:   exp = (x < 0) ? -x : x;
      endcase
      @(negedge clk);
      checks++;
      if (longint'(res) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d got %0d exp %0d", op, x, y, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
