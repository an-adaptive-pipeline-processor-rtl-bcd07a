// prog_thresholder: the programmable thresholder.
//
// When enabled, a pixel at or above the programmed threshold becomes 255 and
// any other pixel 0 (a binary image on the 8-bit port); when disabled the
// pixel passes unchanged.  The architecture gives the comparison with a
// programmed threshold and its binary output; ">=" and the 0/255 coding are
// this design's choices.
//
// Timing: pix_out is registered, valid one cycle after pix_in.
module prog_thresholder
  import pe_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t threshold,
  input  pix_t pix_in,
  output pix_t pix_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pix_out <= '0;
    else if (en) pix_out <= (pix_in >= threshold) ? pix_t'(PIX_MAX) : '0;
    else         pix_out <= pix_in;
  end

endmodule
