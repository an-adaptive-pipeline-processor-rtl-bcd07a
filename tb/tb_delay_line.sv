// tb_delay_line: checks delay_line at its default size (509, one line-3
// delay of a 512-pixel line) and at the edge sizes 1 and 2.  Random words go
// in each cycle; a queue in the testbench predicts each output, which must be
// zero until the first word has gone all the way through.
module tb_delay_line;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [7:0] din;
  logic [7:0] d509, d1, d2;
  logic [7:0] q509[$], q1[$], q2[$];

  delay_line                       dut   (.clk, .rst_n, .din, .dout(d509));
  delay_line #(.WIDTH(8), .DEPTH(1)) dut1 (.clk, .rst_n, .din, .dout(d1));
  delay_line #(.WIDTH(8), .DEPTH(2)) dut2 (.clk, .rst_n, .din, .dout(d2));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (509) q509.push_back(8'h00);
    q1.push_back(8'h00);
    repeat (2) q2.push_back(8'h00);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      din = 8'($urandom);
      @(posedge clk);
      q509.push_back(din); q1.push_back(din); q2.push_back(din);
      void'(q509.pop_front()); void'(q1.pop_front()); void'(q2.pop_front());
      @(negedge clk);
      check(d509, q509[0], "depth 509");
      check(d1,   q1[0],   "depth 1");
      check(d2,   q2[0],   "depth 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
