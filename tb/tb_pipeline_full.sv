// tb_pipeline_full: the end-to-end pipeline test at the design's default
// size: 512-pixel lines, 512-line frames, four PEs per chain, no parameter
// overrides.  Thirteen frames (about 3.4 million clocks) carry the three
// programmes of pipeline_tb_body.svh, four frames apart.
module tb_pipeline_full;
  import pe_pkg::*;
  import pe_model_pkg::*;
  localparam int L = 512, H = 512, NF = 13, SP = 4;

  `include "pipeline_tb_body.svh"

  pipeline_top dut (
    .clk, .rst_n, .pix_in, .sync_in, .wr_valid, .wr_ready, .wr_pe, .wr_reg, .wr_data,
    .pix_out, .sync_out, .mix_out, .mix_sync, .cfg_pending, .ctl_cs, .ctl_dat
  );
endmodule
