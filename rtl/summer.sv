// summer: the sigma box after each multiplier array.
//
// Adds the nine signed products into one signed sum, wide enough that no
// combination of 8-bit pixels and 8-bit coefficients overflows.  The result
// is registered.
//
// Timing: sum is valid one cycle after prod.
module summer
  import pe_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  prods_t prod,
  output sum_t   sum
);

  sum_t total;

  always_comb begin
    total = '0;
    for (int k = 0; k < NTAPS; k++)
      total += SUM_W'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sum <= '0;
    else        sum <= total;

endmodule
