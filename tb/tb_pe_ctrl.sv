// tb_pe_ctrl: serial frames to this PE (address 5), to another PE, to the
// broadcast address, and frames one bit short or long.  Only complete frames
// to 5 or 0xFF may change the configuration; the change must stay in the
// shadow registers (pending set, cfg unchanged) until frame_start, and then
// appear as a whole.  The expected configuration is kept in the testbench.
module tb_pe_ctrl;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic    ser_cs, ser_dat, frame_start, pending;
  pe_cfg_t cfg, exp_shadow, exp_active;

  pe_ctrl dut (.clk, .rst_n, .pe_addr(8'd5), .ser_cs, .ser_dat, .frame_start,
               .cfg, .pending);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [7:0] pe, input logic [7:0] rg, input logic [7:0] d,
                      input int nbits = 24);
    logic [23:0] w = {pe, rg, d};
    for (int i = 0; i < nbits; i++) begin
      ser_cs  = 1'b1;
      ser_dat = (i < 24) ? w[23 - i] : 1'b0;
      @(negedge clk);
    end
    ser_cs = 1'b0; ser_dat = 1'b0;
    @(negedge clk);
  endtask

  // Apply what a write should do to the expected shadow.
  task automatic model(input logic [7:0] rg, input logic [7:0] d);
    if (rg <= 8'h08)                    exp_shadow.mask_a[rg[3:0]] = coef_t'(d);
    else if (rg >= 8'h10 && rg <= 8'h18) exp_shadow.mask_b[rg[3:0]] = coef_t'(d);
    else if (rg == 8'h20)               exp_shadow.op = op_mode_e'(d[2:0]);
    else if (rg == 8'h21)               exp_shadow.divisor = d;
    else if (rg == 8'h22)               exp_shadow.threshold = d;
    else if (rg == 8'h23) begin
      exp_shadow.thr_en = d[0];
      exp_shadow.inv_en = d[1];
      exp_shadow.hex    = d[2];
    end
  endtask

  task automatic pulse_frame();
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    exp_active = exp_shadow;
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rg, d, pe;
    int kind;
    ser_cs = 1'b0; ser_dat = 1'b0; frame_start = 1'b0;
    exp_shadow = null_cfg();
    exp_active = null_cfg();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg == null_cfg() && !pending, "reset configuration");
    for (int round = 0; round < 60; round++) begin
      for (int w = 0; w < 6; w++) begin
        kind = $urandom_range(0, 5);
        rg   = ($urandom_range(0, 1) == 0) ? 8'($urandom_range(0, 8)) | (8'($urandom_range(0, 1)) << 4)
                                            : 8'($urandom_range(8'h20, 8'h24));
        d    = 8'($urandom);
        case (kind)
          0, 1: begin send(8'd5, rg, d);  model(rg, d); check(pending, "pending set"); end
          2:    begin send(8'hFF, rg, d); model(rg, d); check(pending, "pending set"); end
          3:    begin send(8'd6, rg, d); end
          4:    begin send(8'd5, rg, d, 23); end
          default: begin send(8'd5, rg, d, 25); end
        endcase
        check(cfg == exp_active, "active changed before frame start");
      end
      pulse_frame();
      check(cfg == exp_active, "configuration after frame start");
      check(!pending, "pending cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
