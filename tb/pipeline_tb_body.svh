// pipeline_tb_body.svh: body shared by the pipeline testbenches.  The
// including module defines L (line length), H (lines per frame), NF (frames)
// and the DUT instance `dut`, with NUM_PE = 4 PEs per chain.
//
// The stream is NF generated frames.  Three programmes are loaded through the
// control port while video runs, one every SP frames:
//   phase 0  the published inspection application on chain A
//            (Gaussian filter, Sobel magnitude with threshold, horizontal and
//            vertical ridge test), chain B left in null operation, so mix_out
//            lays the edges over the delayed picture;
//   phase 1  an adaptive change: new Sobel threshold, inverted output of the
//            last PE, a Gaussian filter in chain B and a second one there in
//            hexagonal-sampling mode;
//   phase 2  one broadcast write per register returning every PE to the null
//            operation, so both outputs must equal the input delayed.
// A programme is in force in every PE from the first frame that starts after
// its last write until the frame in which the next programme's writes begin;
// every frame whose neighbours lie in that span is compared pixel by pixel
// with pe_model_pkg.  Sync and latency are checked, and each
// mechanism (frame-boundary switch, broadcast, each operator function,
// scaler limiting, thresholding, inversion, add & clip saturation, null
// operation, hexagonal mode) is counted; one that never happens is a failure.

  localparam int FR = L * H, N = NF * FR, PE_LAT = L + 8, LAT = 4 * PE_LAT;
  localparam int NPH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pix_t       pix_in, pix_out, mix_out;
  sync_t      sync_in, sync_out, mix_sync;
  logic       wr_valid, wr_ready;
  logic [7:0] wr_pe, wr_reg, wr_data;
  logic [7:0] cfg_pending;
  logic       ctl_cs, ctl_dat, ctl_cs_q = 1'b0;
  int         n_writes = 0, n_bus_frames = 0;

  stream_t s, got, got_mix;
  bit      sync_ok[];
  pe_cfg_t cfg_ph[NPH][8];
  int      ph_done[NPH], ph_start[NPH];
  int      cur_n = 0, lat_seen = -1, mix_lat_seen = -1, n_switch = 0, n_bcast = 0;
  bit      stream_done = 0;
  logic [7:0] pend_q = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic write_reg(input logic [7:0] pe_a, input logic [7:0] rg, input logic [7:0] d);
    wr_valid = 1'b1; wr_pe = pe_a; wr_reg = rg; wr_data = d;
    @(posedge clk);
    while (!wr_ready) @(posedge clk);
    @(negedge clk);
    wr_valid = 1'b0;
    n_writes++;
    if (pe_a == 8'hFF) n_bcast++;
  endtask

  // Writes only the registers in which `c` differs from `old`.
  task automatic load_diff(input int pe_a, input pe_cfg_t old, input pe_cfg_t c);
    for (int k = 0; k < 9; k++) if (c.mask_a[k] != old.mask_a[k]) write_reg(8'(pe_a), 8'h00 + 8'(k), 8'(c.mask_a[k]));
    for (int k = 0; k < 9; k++) if (c.mask_b[k] != old.mask_b[k]) write_reg(8'(pe_a), 8'h10 + 8'(k), 8'(c.mask_b[k]));
    if (c.op != old.op)               write_reg(8'(pe_a), 8'h20, {5'd0, c.op});
    if (c.divisor != old.divisor)     write_reg(8'(pe_a), 8'h21, c.divisor);
    if (c.threshold != old.threshold) write_reg(8'(pe_a), 8'h22, c.threshold);
    if (c.thr_en != old.thr_en || c.inv_en != old.inv_en || c.hex != old.hex)
      write_reg(8'(pe_a), 8'h23, {5'd0, c.hex, c.inv_en, c.thr_en});
  endtask

  function automatic byte unsigned gen(input int n);
    int f = n / FR, y = (n % FR) / L, x = n % L;
    int cx = L / 2 + (f % 3) - 1, cy = H / 2, r2 = (L / 4) * (L / 4);
    if ((x - cx) * (x - cx) + (y - cy) * (y - cy) < r2) return byte'(190 + $urandom_range(0, 30));
    if (x > L / 8 && x < L / 8 + 3 && y > 2 && y < H - 3) return byte'(235);   // thin bar
    if ($urandom_range(0, 200) == 0) return byte'(255);
    return byte'(40 + $urandom_range(0, 30));
  endfunction

  initial begin
    repeat (N + 4 * FR) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count configuration switches: a pending flag that clears.
  always @(posedge clk) begin
    ctl_cs_q <= ctl_cs;
    if (ctl_cs && !ctl_cs_q) n_bus_frames++;
    pend_q <= cfg_pending;
    for (int i = 0; i < 8; i++) if (pend_q[i] && !cfg_pending[i]) n_switch++;
  end

  // Video in, results out.
  initial begin
    int in_frame1 = -1;
    s = new[N]; got = new[N]; got_mix = new[N]; sync_ok = new[N];
    foreach (s[i]) s[i] = gen(i);
    pix_in = '0; sync_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT + 1; n++) begin
      cur_n   = n;
      pix_in  = (n < N) ? s[n] : '0;
      sync_in = (n < N) ? sync_t'{frame: (n % FR == 0), line: (n % L == 0)} : '0;
      if (n == FR) in_frame1 = n;
      @(negedge clk);
      if (n - LAT + 1 >= 0 && n - LAT + 1 < N) begin
        got[n - LAT + 1]     = pix_out;
        sync_ok[n - LAT + 1] = (sync_out == sync_t'{frame: ((n - LAT + 1) % FR == 0),
                                                    line: ((n - LAT + 1) % L == 0)});
      end
      if (n - LAT >= 0 && n - LAT < N) got_mix[n - LAT] = mix_out;
      if (in_frame1 >= 0 && sync_out.frame && lat_seen < 0) lat_seen = n + 1 - in_frame1;
      if (in_frame1 >= 0 && mix_sync.frame && mix_lat_seen < 0) mix_lat_seen = n + 1 - in_frame1;
    end
    stream_done = 1;
  end

  // Control computer: three programmes.
  initial begin
    pe_cfg_t c;
    wr_valid = 1'b0; wr_pe = '0; wr_reg = '0; wr_data = '0;
    for (int i = 0; i < 8; i++) cfg_ph[0][i] = null_cfg();
    cfg_ph[0][0] = cfg_gauss();
    cfg_ph[0][1] = cfg_sobel(1, 120, 1, 0);
    cfg_ph[0][2] = cfg_thin(0, 1);
    cfg_ph[0][3] = cfg_thin(1, 1);
    cfg_ph[1] = cfg_ph[0];
    cfg_ph[1][1].threshold = 8'd200;
    cfg_ph[1][3].inv_en    = 1'b1;
    cfg_ph[1][4]           = cfg_gauss();
    cfg_ph[1][5]           = cfg_gauss();
    cfg_ph[1][5].hex       = 1'b1;
    for (int i = 0; i < 8; i++) cfg_ph[2][i] = null_cfg();
    @(posedge rst_n);
    for (int p = 0; p < NPH; p++) begin
      while (cur_n < (1 + SP * p) * FR) @(negedge clk);
      ph_start[p] = cur_n;
      if (p < 2) begin
        for (int i = 0; i < 8; i++)
          load_diff(i, (p == 0) ? null_cfg() : cfg_ph[p - 1][i], cfg_ph[p][i]);
      end else begin
        c = null_cfg();
        for (int k = 0; k < 9; k++) write_reg(8'hFF, 8'h00 + 8'(k), 8'(c.mask_a[k]));
        for (int k = 0; k < 9; k++) write_reg(8'hFF, 8'h10 + 8'(k), 8'(c.mask_b[k]));
        write_reg(8'hFF, 8'h20, {5'd0, c.op});
        write_reg(8'hFF, 8'h21, c.divisor);
        write_reg(8'hFF, 8'h22, c.threshold);
        write_reg(8'hFF, 8'h23, 8'h00);
      end
      ph_done[p] = cur_n;
    end
  end

  initial begin
    int f0, f1, m;
    pe_cfg_t c;
    int n_ops[8], n_lim_lo = 0, n_lim_hi = 0, n_thr = 0, n_inv = 0, n_sat = 0, n_null = 0, n_hex = 0;
    longint v;
    stream_t a[5], b[5];
    wait (stream_done);
    check(lat_seen == LAT, $sformatf("pipeline latency %0d, expected %0d", lat_seen, LAT));
    check(mix_lat_seen == LAT + 1, $sformatf("mix latency %0d, expected %0d", mix_lat_seen, LAT + 1));
    check(LAT <= 8 * L, "latency within 8 line periods");
    foreach (sync_ok[j]) check(sync_ok[j], "sync out");
    foreach (n_ops[i]) n_ops[i] = 0;
    for (int p = 0; p < NPH; p++) begin
      f0 = (ph_done[p] + FR) / FR;
      f1 = (p + 1 < NPH) ? ph_start[p + 1] / FR : NF;
      check(f0 + 1 <= f1 - 2, $sformatf("phase %0d long enough to check", p));
      a[0] = s; b[0] = s;
      for (int i = 0; i < 4; i++) begin
        a[i + 1] = pe_stream(cfg_ph[p][i], a[i], L, FR);
        b[i + 1] = pe_stream(cfg_ph[p][4 + i], b[i], L, FR);
      end
      for (int f = f0 + 1; f <= f1 - 2; f++)
        for (int j = f * FR; j < (f + 1) * FR; j++) begin
          m = int'(a[4][j]) + int'(b[4][j]);
          check(got[j] == a[4][j], $sformatf("phase %0d chain A pixel %0d: %0d vs %0d", p, j, got[j], a[4][j]));
          check(got_mix[j] == byte'((m > 255) ? 255 : m), $sformatf("phase %0d mix pixel %0d", p, j));
          if (m > 255) n_sat++;
          for (int i = 0; i < 8; i++) begin
            c = cfg_ph[p][i];
            if (i < 4) v = op_ref(c, a[i], j, L, FR);
            else       v = op_ref(c, b[i - 4], j, L, FR);
            if (c == null_cfg()) n_null++;
            else n_ops[c.op]++;
            if (v < 0) n_lim_lo++;
            if (v / longint'(c.divisor) > 255) n_lim_hi++;
            if (c.thr_en) n_thr++;
            if (c.inv_en) n_inv++;
            if (c.hex) n_hex++;
          end
          if (p == 2) check(got[j] == s[j] && got_mix[j] == byte'((2 * int'(s[j]) > 255) ? 255 : 2 * int'(s[j])),
                            "null operation delays only");
        end
    end
    $display("switches %0d broadcasts %0d gauss/pass %0d mag %0d min %0d low-limit %0d high-limit %0d thr %0d inv %0d sat %0d null %0d hex %0d",
             n_switch, n_bcast, n_ops[OP_PASS_A], n_ops[OP_MAG], n_ops[OP_MIN], n_lim_lo, n_lim_hi, n_thr, n_inv, n_sat, n_null, n_hex);
    check(n_switch > 0, "frame-boundary switch happened");
    check(n_bus_frames == n_writes && n_writes > 0, "one bus frame per write on ctl_cs");
    check(n_bcast > 0, "broadcast write happened");
    check(n_ops[OP_PASS_A] > 0 && n_ops[OP_MAG] > 0 && n_ops[OP_MIN] > 0, "operator functions used");
    check(n_lim_lo > 0 && n_lim_hi > 0, "scaler limits reached");
    check(n_thr > 0 && n_inv > 0, "threshold and inversion used");
    check(n_sat > 0, "add & clip saturated");
    check(n_null > 0, "null operation used");
    check(n_hex > 0, "hexagonal sampling mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
