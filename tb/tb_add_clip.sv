// tb_add_clip: random pixel pairs and sync bits; the output must be the sum
// limited to 255, with branch A's sync, one clock later.  Both the limited
// and the unlimited case must occur.
module tb_add_clip;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, n_clip = 0;
  always #5 clk = ~clk;

  pix_t  pix_a, pix_b, pix_out;
  sync_t sync_a, sync_out;

  add_clip dut (.clk, .rst_n, .pix_a, .pix_b, .sync_a, .pix_out, .sync_out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    pix_a = '0; pix_b = '0; sync_a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      pix_a  = pix_t'($urandom);
      pix_b  = pix_t'($urandom);
      sync_a = sync_t'($urandom);
      exp    = int'(pix_a) + int'(pix_b);
      if (exp > 255) begin exp = 255; n_clip++; end
      @(negedge clk);
      checks += 2;
      if (int'(pix_out) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d got %0d", pix_a, pix_b, pix_out);
      end
      if (sync_out !== sync_a) failures++;
    end
    if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
