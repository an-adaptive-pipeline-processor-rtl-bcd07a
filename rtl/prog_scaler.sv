// prog_scaler: the programmable scaler with output limiting.
//
// Divides the operator result by a divisor loaded over the control link
// (a divisor of 0 acts as 1) and limits the quotient to the 8-bit video
// range: negative results become 0 and results above 255 become 255, as the
// architecture requires.  Negative values are limited before the division, so
// the divider only sees non-negative numbers; an integer quotient (rounding
// towards zero) is this design's choice.
//
// Timing: pix is registered, valid one cycle after x.
module prog_scaler
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] divisor,
  input  sum_t       x,
  output pix_t       pix
);

  logic [SUM_W-1:0] mag;
  logic [SUM_W-1:0] quot;
  logic [7:0]       div_eff;
  pix_t             next;

  always_comb begin
    div_eff = (divisor == 8'd0) ? 8'd1 : divisor;
    mag     = x[SUM_W-1] ? '0 : x;
    quot    = mag / SUM_W'(div_eff);
    next    = (quot > SUM_W'(PIX_MAX)) ? pix_t'(PIX_MAX) : pix_t'(quot);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pix <= '0;
    else        pix <= next;

endmodule
