// mult_array: one of the PE's two 3x3 multiplier arrays.
//
// Each of the nine window pixels (unsigned) is multiplied by its own signed
// coefficient from the mask loaded over the control link; the nine products
// are registered.  The architecture specifies the function; parallel multipliers
// with one register stage are this design's choice.
//
// Timing: prod is valid one cycle after win and mask.
module mult_array
  import pe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  win_t  win,
  input  mask_t mask,
  output prods_t prod
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod <= '{default: '0};
    end else begin
      for (int k = 0; k < NTAPS; k++)
        prod[k] <= prod_t'($signed({1'b0, win[k]})) * prod_t'(mask[k]);
    end
  end

endmodule
