// pe: one programmable processor element of the video pipeline.
//
// The PE takes one 8-bit pixel per clock with its synchronisation and gives
// one processed pixel per clock.  Two lines of video are held in line_window,
// which presents the 3x3 neighbourhood of the current centre pixel.  The nine
// pixels go to two multiplier arrays, each with its own 3x3 mask, and each
// array's products are summed.  The programmable operator combines the two
// sums, the programmable scaler divides and limits the result to 0..255, the
// programmable thresholder can turn it into a binary image and the
// programmable invertor can turn it over.  Synchronisation is delayed by
// exactly the delay of the video path, so any number of PEs can be cascaded
// and the delay does not depend on the programmed operation.  The control
// and timing unit (pe_ctrl) receives the configuration over the serial bus
// and switches it in at the start of a frame.  For hexagonally sampled video
// (odd lines offset half a pixel) the PE counts line parity from the sync and
// moves the top and bottom mask rows one column right on odd lines, so one
// programmed mask serves both line types.
//
// Example programmes (masks row-major from the top-left pixel):
//   null / delay : A = centre 1, OP_PASS_A, divisor 1
//   Gaussian     : A = 1 2 1 / 2 4 2 / 1 2 1, OP_PASS_A, divisor 16
//   Sobel edges  : A = -1 0 1 / -2 0 2 / -1 0 1, B = its transpose, OP_MAG,
//                  divisor s, threshold T, thresholder on
//
// Timing: pix_out/sync_out at cycle t belong to the pixel that entered at
// t - LATENCY, LATENCY = LINE_LEN + 2 + PE_STAGES (520 for 512-pixel lines):
// LINE_LEN+2 cycles until the pixel is the window centre, then one register
// stage each for multiply, sum, operator, scaler, thresholder and invertor.
// Each stage uses the configuration that was active when its pixel passed the
// window centre.  The block structure follows the published architecture; the stage
// registers and widths are this design's choices.
module pe
  import pe_pkg::*;
#(
  parameter int unsigned LINE_LEN = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PE_ADDR_W-1:0] pe_addr,
  input  logic                 ser_cs,
  input  logic                 ser_dat,
  input  pix_t                 pix_in,
  input  sync_t                sync_in,
  output pix_t                 pix_out,
  output sync_t                sync_out,
  output logic                 cfg_pending
);

  win_t    win;
  prods_t  prod_a, prod_b;
  sum_t    sum_a, sum_b, op_res;
  pix_t    scaled, thresh;
  sync_t   sync_pre;                   // sync of the pixel one cycle before the centre
  sync_t   sync_pipe [PE_STAGES + 1];  // [0]: centre pixel, [k]: k stages on
  pe_cfg_t cfg;
  pe_cfg_t cfg_d [1:PE_STAGES-1];      // cfg_d[k]: configuration k cycles ago
  mask_t   mask_a, mask_b;
  logic    odd_line;                   // centre pixel lies on an odd line

  line_window #(.LINE_LEN(LINE_LEN)) u_window (
    .clk, .rst_n, .pix_in, .win
  );

  // Synchronisation path: delay to the window centre, then along the stages.
  delay_line #(.WIDTH($bits(sync_t)), .DEPTH(LINE_LEN + 1)) u_sync_delay (
    .clk, .rst_n, .din(sync_in), .dout(sync_pre)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_pipe <= '{default: '0};
    end else begin
      sync_pipe[0] <= sync_pre;
      for (int k = 1; k <= PE_STAGES; k++)
        sync_pipe[k] <= sync_pipe[k-1];
    end
  end
  assign sync_out = sync_pipe[PE_STAGES];

  // The new configuration becomes active in the cycle the frame's first pixel
  // reaches the window centre.
  pe_ctrl u_ctrl (
    .clk, .rst_n, .pe_addr, .ser_cs, .ser_dat,
    .frame_start (sync_pre.frame),
    .cfg,
    .pending     (cfg_pending)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_d <= '{default: null_cfg()};
    end else begin
      cfg_d[1] <= cfg;
      for (int k = 2; k < PE_STAGES; k++)
        cfg_d[k] <= cfg_d[k-1];
    end
  end

  // Line parity of the centre pixel, for hexagonal sampling: line 0 of a
  // frame is even.  Updated one cycle ahead from sync_pre.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              odd_line <= 1'b0;
    else if (sync_pre.frame) odd_line <= 1'b0;
    else if (sync_pre.line)  odd_line <= ~odd_line;
  end

  // Masks as programmed; in hexagonal mode rows 0 and 2 move one column
  // right on odd lines.
  always_comb begin
    for (int k = 0; k < NTAPS; k++) begin
      mask_a[k] = cfg.mask_a[k];
      mask_b[k] = cfg.mask_b[k];
    end
    if (cfg.hex && odd_line) begin
      for (int r = 0; r < 3; r += 2) begin
        mask_a[3*r]     = '0;
        mask_a[3*r + 1] = cfg.mask_a[3*r];
        mask_a[3*r + 2] = cfg.mask_a[3*r + 1];
        mask_b[3*r]     = '0;
        mask_b[3*r + 1] = cfg.mask_b[3*r];
        mask_b[3*r + 2] = cfg.mask_b[3*r + 1];
      end
    end
  end

  mult_array u_mult_a (.clk, .rst_n, .win, .mask(mask_a), .prod(prod_a));
  mult_array u_mult_b (.clk, .rst_n, .win, .mask(mask_b), .prod(prod_b));

  summer u_sum_a (.clk, .rst_n, .prod(prod_a), .sum(sum_a));
  summer u_sum_b (.clk, .rst_n, .prod(prod_b), .sum(sum_b));

  prog_operator u_operator (
    .clk, .rst_n, .op(cfg_d[2].op), .a(sum_a), .b(sum_b), .res(op_res)
  );

  prog_scaler u_scaler (
    .clk, .rst_n, .divisor(cfg_d[3].divisor), .x(op_res), .pix(scaled)
  );

  prog_thresholder u_thresholder (
    .clk, .rst_n, .en(cfg_d[4].thr_en), .threshold(cfg_d[4].threshold),
    .pix_in(scaled), .pix_out(thresh)
  );

  prog_invertor u_invertor (
    .clk, .rst_n, .en(cfg_d[5].inv_en), .pix_in(thresh), .pix_out(pix_out)
  );

endmodule
