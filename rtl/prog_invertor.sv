// prog_invertor: the programmable invertor at the PE's video output.
//
// When enabled the pixel is replaced by 255 minus the pixel (the bitwise
// complement), which turns the thresholder's binary output over as the
// architecture describes; when disabled the pixel passes unchanged.
//
// Timing: pix_out is registered, valid one cycle after pix_in.
module prog_invertor
  import pe_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t pix_in,
  output pix_t pix_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pix_out <= '0;
    else if (en) pix_out <= ~pix_in;
    else         pix_out <= pix_in;
  end

endmodule
