// add_clip: the "add & clip" stage that merges two branches of a multi-pipe
// system, for example thinned edges laid over the original picture.
//
// The two 8-bit pixels are added and the sum limited to 255.  Both inputs must
// arrive aligned, which holds when both branches pass through the same number
// of PEs, since every PE has the same delay whatever it is programmed to do.
// The synchronisation of branch A is passed on with the same one-cycle delay.
//
// Timing: pix_out and sync_out are registered, one cycle after the inputs.
module add_clip
  import pe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pix_t  pix_a,
  input  pix_t  pix_b,
  input  sync_t sync_a,
  output pix_t  pix_out,
  output sync_t sync_out
);

  logic [PIX_W:0] total;

  assign total = {1'b0, pix_a} + {1'b0, pix_b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_out  <= '0;
      sync_out <= '0;
    end else begin
      pix_out  <= total[PIX_W] ? pix_t'(PIX_MAX) : total[PIX_W-1:0];
      sync_out <= sync_a;
    end
  end

endmodule
