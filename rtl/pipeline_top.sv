// pipeline_top: real-time video pipeline of identical processor elements.
//
// Digitised video (one 8-bit pixel per clock with line/frame sync, from the
// video a.d.c.) enters two chains of NUM_PE PEs each.  Chain A on its own is
// the standard cascaded pipeline: its output `pix_out`/`sync_out` goes to the
// d.a.c. and monitor or to a high-level image processor.  Chain B runs beside
// it, and an add & clip stage merges the two chains into `mix_out`, the
// multi-pipe arrangement used to overlay processed results (for example
// thinned edges) on the picture that chain B, programmed for null operation,
// delays by the same amount.  Because every PE has the same delay whatever it
// does, the two chains stay aligned.
//
// All PEs share one serial control bus driven by the pipeline control's link
// master.  The control computer writes registers through the wr_* port;
// chain A's PEs have addresses 0..NUM_PE-1, chain B's NUM_PE..2*NUM_PE-1,
// and address 0xFF reaches all.  After reset every PE performs the null
// operation.  A write takes effect at the next frame start seen by the PE.
// The bus is also brought out (ctl_cs, ctl_dat) because the pipeline control
// sets up the video a.d.c. as well; the a.d.c. protocol is not part of this
// design.
//
// Timing: pix_out lags pix_in by NUM_PE*(LINE_LEN+8) cycles and mix_out by
// one more.  NUM_PE = 4 is the sample inspection application (filter, Sobel
// edge detector, horizontal and vertical thinner); LINE_LEN = 512 is the
// 512-pixel line of the camera the architecture assumes.
module pipeline_top
  import pe_pkg::*;
#(
  parameter int unsigned NUM_PE   = 4,
  parameter int unsigned LINE_LEN = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the video a.d.c.
  input  pix_t                 pix_in,
  input  sync_t                sync_in,
  // register writes from the control computer
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [PE_ADDR_W-1:0] wr_pe,
  input  logic [7:0]           wr_reg,
  input  logic [7:0]           wr_data,
  // chain A output, to the d.a.c. or a high-level processor
  output pix_t                 pix_out,
  output sync_t                sync_out,
  // add & clip of chain A and chain B
  output pix_t                 mix_out,
  output sync_t                mix_sync,
  // configuration written but not yet switched in, per PE (A then B)
  output logic [2*NUM_PE-1:0]  cfg_pending,
  // the serial control bus, for other units on it (the video a.d.c.)
  output logic                 ctl_cs,
  output logic                 ctl_dat
);

  logic  ser_cs, ser_dat;
  pix_t  pix_a  [NUM_PE + 1];
  sync_t sync_a [NUM_PE + 1];
  pix_t  pix_b  [NUM_PE + 1];
  sync_t sync_b [NUM_PE + 1];

  ctrl_link_master u_link (
    .clk, .rst_n, .wr_valid, .wr_ready, .wr_pe, .wr_reg, .wr_data,
    .ser_cs, .ser_dat
  );

  assign pix_a[0]  = pix_in;
  assign sync_a[0] = sync_in;
  assign pix_b[0]  = pix_in;
  assign sync_b[0] = sync_in;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    pe #(.LINE_LEN(LINE_LEN)) u_pe_a (
      .clk, .rst_n, .pe_addr(PE_ADDR_W'(i)), .ser_cs, .ser_dat,
      .pix_in(pix_a[i]), .sync_in(sync_a[i]),
      .pix_out(pix_a[i+1]), .sync_out(sync_a[i+1]),
      .cfg_pending(cfg_pending[i])
    );
    pe #(.LINE_LEN(LINE_LEN)) u_pe_b (
      .clk, .rst_n, .pe_addr(PE_ADDR_W'(NUM_PE + i)), .ser_cs, .ser_dat,
      .pix_in(pix_b[i]), .sync_in(sync_b[i]),
      .pix_out(pix_b[i+1]), .sync_out(sync_b[i+1]),
      .cfg_pending(cfg_pending[NUM_PE + i])
    );
  end

  assign ctl_cs   = ser_cs;
  assign ctl_dat  = ser_dat;

  assign pix_out  = pix_a[NUM_PE];
  assign sync_out = sync_a[NUM_PE];

  add_clip u_mix (
    .clk, .rst_n, .pix_a(pix_a[NUM_PE]), .pix_b(pix_b[NUM_PE]),
    .sync_a(sync_a[NUM_PE]), .pix_out(mix_out), .sync_out(mix_sync)
  );

endmodule
