// tb_pe: one processor element on a stream of generated frames (32-pixel
// lines, 20 lines per frame), reprogrammed over the serial link between
// frames: null operation, Gaussian filter, Sobel magnitude, Sobel with
// threshold and inversion, horizontal and vertical ridge tests, a Gaussian
// filter for hexagonally sampled video, and random programmes.  Each programme is written completely while one frame enters;
// it must take effect from the next frame, and the frame after that (whose
// neighbouring frames use the same programme) is compared pixel by pixel
// with pe_model_pkg.  The synchronisation output and the latency of
// LINE_LEN + 8 clocks are checked as well.
module tb_pe;
  import pe_pkg::*;
  import pe_model_pkg::*;
  localparam int L = 32, H = 20, FR = L * H, LAT = L + 8;
  localparam int NPH = 10, NF = 3 * NPH + 2, N = NF * FR;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  ser_cs, ser_dat, pending;
  pix_t  pix_in, pix_out;
  sync_t sync_in, sync_out;

  pe #(.LINE_LEN(L)) dut (.clk, .rst_n, .pe_addr(8'd3), .ser_cs, .ser_dat,
                         .pix_in, .sync_in, .pix_out, .sync_out, .cfg_pending(pending));

  stream_t   s, got;
  sync_t     got_sync[N];
  pe_cfg_t   ph_cfg[NPH];
  int        ph_done[NPH];
  int        cur_n = 0, in_frame_cycle = -1, lat_seen = -1;
  bit        stream_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [7:0] pe_a, input logic [7:0] rg, input logic [7:0] d);
    logic [23:0] w = {pe_a, rg, d};
    for (int i = 0; i < 24; i++) begin
      ser_cs = 1'b1; ser_dat = w[23 - i];
      @(negedge clk);
    end
    ser_cs = 1'b0; ser_dat = 1'b0;
    @(negedge clk);
  endtask

  task automatic load_cfg(input pe_cfg_t c);
    for (int k = 0; k < 9; k++) send(8'd3, 8'h00 + 8'(k), 8'(c.mask_a[k]));
    for (int k = 0; k < 9; k++) send(8'hFF, 8'h10 + 8'(k), 8'(c.mask_b[k]));
    send(8'd3, 8'h20, {5'd0, c.op});
    send(8'd3, 8'h21, c.divisor);
    send(8'd3, 8'h22, c.threshold);
    send(8'd3, 8'h23, {5'd0, c.hex, c.inv_en, c.thr_en});
  endtask

  function automatic pe_cfg_t random_cfg();
    pe_cfg_t c;
    for (int k = 0; k < 9; k++) begin
      c.mask_a[k] = coef_t'($urandom_range(0, 8)) - 8'sd4;
      c.mask_b[k] = coef_t'($urandom);
    end
    c.op        = op_mode_e'($urandom_range(0, 7));
    c.divisor   = 8'($urandom_range(0, 40));
    c.threshold = 8'($urandom);
    c.thr_en    = 1'($urandom);
    c.inv_en    = 1'($urandom);
    c.hex       = 1'($urandom);
    return c;
  endfunction

  // Frame f: textured background with a bright rectangle and a few extreme pixels.
  function automatic byte unsigned gen(input int n);
    int f = n / FR, y = (n % FR) / L, x = n % L;
    if (x >= 6 + f % 5 && x < 18 + f % 7 && y >= 4 && y < 13) return byte'(200 + $urandom_range(0, 40));
    if ($urandom_range(0, 60) == 0) return byte'($urandom_range(0, 1) ? 255 : 0);
    return byte'(30 + $urandom_range(0, 50));
  endfunction

  initial begin
    repeat (N + 20 * FR) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Video stream in, results out.
  initial begin
    s   = new[N];
    got = new[N];
    foreach (s[i]) s[i] = gen(i);
    pix_in = '0; sync_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT; n++) begin
      cur_n   = n;
      pix_in  = (n < N) ? s[n] : '0;
      sync_in = (n < N) ? sync_t'{frame: (n % FR == 0), line: (n % L == 0)} : '0;
      if (n == FR) in_frame_cycle = n;
      @(negedge clk);
      if (n - LAT + 1 >= 0 && n - LAT + 1 < N) begin
        got[n - LAT + 1]      = pix_out;
        got_sync[n - LAT + 1] = sync_out;
      end
      if (sync_out.frame && lat_seen < 0 && n > LAT) lat_seen = n + 1 - in_frame_cycle;
    end
    stream_done = 1;
  end

  // Programmes, one per phase, written at the start of frame 3p.
  initial begin
    ser_cs = 1'b0; ser_dat = 1'b0;
    ph_cfg[0] = null_cfg();
    ph_cfg[1] = cfg_gauss();
    ph_cfg[2] = cfg_sobel(4, 0, 0, 0);
    ph_cfg[3] = cfg_sobel(2, 60, 1, 1);
    ph_cfg[4] = cfg_thin(0, 1);
    ph_cfg[5] = cfg_thin(1, 1);
    ph_cfg[6] = cfg_gauss();
    ph_cfg[6].hex = 1'b1;
    for (int p = 7; p < NPH; p++) ph_cfg[p] = random_cfg();
    @(posedge rst_n);
    for (int p = 0; p < NPH; p++) begin
      while (cur_n < 3 * p * FR) @(negedge clk);
      load_cfg(ph_cfg[p]);
      ph_done[p] = cur_n;
    end
  end

  initial begin
    int f0, f1;
    byte unsigned exp;
    wait (stream_done);
    check(lat_seen == LAT, $sformatf("latency %0d, expected %0d", lat_seen, LAT));
    for (int j = 0; j < N; j++)
      check(got_sync[j] == sync_t'{frame: (j % FR == 0), line: (j % L == 0)}, "sync out");
    for (int p = 0; p < NPH; p++) begin
      f0 = (ph_done[p] + FR) / FR;                   // first frame with the programme
      f1 = (p + 1 < NPH) ? (ph_done[p + 1] + FR) / FR : NF;
      check(f0 + 1 <= f1 - 2, "phase long enough to check");
      for (int f = f0 + 1; f <= f1 - 2; f++)
        for (int j = f * FR; j < (f + 1) * FR; j++) begin
          exp = pe_ref(ph_cfg[p], s, j, L, FR);
          checks++;
          if (got[j] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL phase %0d pixel %0d got %0d exp %0d", p, j, got[j], exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
