// tb_pipeline_top: end-to-end test of the pipeline at a reduced picture size
// (32-pixel lines, 24 lines per frame, 15 frames) with the default four PEs
// per chain.  The test itself is in pipeline_tb_body.svh.
module tb_pipeline_top;
  import pe_pkg::*;
  import pe_model_pkg::*;
  localparam int L = 32, H = 24, NF = 15, SP = 5;

  `include "pipeline_tb_body.svh"

  pipeline_top #(.NUM_PE(4), .LINE_LEN(L)) dut (
    .clk, .rst_n, .pix_in, .sync_in, .wr_valid, .wr_ready, .wr_pe, .wr_reg, .wr_data,
    .pix_out, .sync_out, .mix_out, .mix_sync, .cfg_pending, .ctl_cs, .ctl_dat
  );

endmodule
