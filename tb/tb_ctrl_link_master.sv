// tb_ctrl_link_master: random register writes offered with random gaps.  A
// monitor rebuilds every frame from the bus and checks that the strobe is
// high for exactly 24 clocks, that the first bit follows the accepting clock,
// that the 24 bits are PE address, register and data MSB first, and that the
// next write is taken no sooner than 26 clocks after the one before.
module tb_ctrl_link_master;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       wr_valid, wr_ready, ser_cs, ser_dat;
  logic [7:0] wr_pe, wr_reg, wr_data;
  logic [23:0] sent[$];
  int          accept_cycle[$];
  int          cycle = 0, last_accept = -100, nframes = 0;

  ctrl_link_master dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_pe, .wr_reg,
                        .wr_data, .ser_cs, .ser_dat);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Record accepted writes.
  always @(posedge clk)
    if (rst_n && wr_valid && wr_ready) begin
      check(cycle - last_accept >= 26, "writes closer than 26 clocks");
      last_accept = cycle;
      sent.push_back({wr_pe, wr_reg, wr_data});
      accept_cycle.push_back(cycle);
    end

  // Bus monitor.
  initial begin
    logic [23:0] got;
    int          start, len;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (ser_cs) begin
        start = cycle;
        got   = '0;
        len   = 0;
        while (ser_cs) begin
          got = {got[22:0], ser_dat};
          len++;
          @(posedge clk);
        end
        check(len == 24, "strobe length");
        check(sent.size() > 0, "frame without a write");
        if (sent.size() > 0) begin
          check(got == sent[0], "frame contents");
          check(start == accept_cycle[0] + 1, "first bit timing");
          void'(sent.pop_front());
          void'(accept_cycle.pop_front());
        end
        nframes++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 1'b0; wr_pe = '0; wr_reg = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      wr_valid = 1'b1;
      wr_pe    = 8'($urandom);
      wr_reg   = 8'($urandom);
      wr_data  = 8'($urandom);
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
      @(negedge clk);
      wr_valid = 1'b0;
    end
    repeat (40) @(negedge clk);
    check(nframes == 200 && sent.size() == 0, "all writes sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
