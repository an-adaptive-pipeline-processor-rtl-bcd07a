// prog_operator: the programmable operator that combines the two sums.
//
// The function is chosen by `op` (pe_pkg::op_mode_e):
//   OP_PASS_A / OP_PASS_B  one sum only (filtering, null operation)
//   OP_ADD / OP_SUB        A + B, A - B
//   OP_MAG                 floor(sqrt(A*A + B*B)): the squares of the two
//                          Sobel gradients are added and an integer square
//                          root taken, as the architecture describes for edge
//                          magnitude
//   OP_MIN / OP_MAX        smaller / larger of A and B
//   OP_ABS                 |A|
// The architecture names the operator and the magnitude function; the other
// functions, and the use of OP_MIN with two "centre minus neighbour" masks as
// a ridge test for line thinning, are this design's choices.  The square root
// is a bit-serial restoring root unrolled into combinational logic.
//
// Timing: res is registered, valid one cycle after a and b.
module prog_operator
  import pe_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  op_mode_e op,
  input  sum_t     a,
  input  sum_t     b,
  output sum_t     res
);

  localparam int unsigned SQ_W = 2 * SUM_W;   // A*A + B*B fits (|A|,|B| < 2^(SUM_W-1))

  // floor(sqrt(x)) for x < 2^SQ_W.
  function automatic logic [SUM_W-1:0] isqrt(input logic [SQ_W-1:0] x);
    logic [SQ_W-1:0]  rem;
    logic [SUM_W-1:0] root;
    logic [SQ_W-1:0]  trial;
    rem  = x;
    root = '0;
    for (int i = SUM_W - 1; i >= 0; i--) begin
      trial = ({{(SQ_W-SUM_W){1'b0}}, root} << (i + 1)) + (SQ_W'(1) << (2 * i));
      if (rem >= trial) begin
        rem     = rem - trial;
        root[i] = 1'b1;
      end
    end
    return root;
  endfunction

  logic signed [SQ_W-1:0] a_x, b_x;
  logic [SQ_W-1:0]        sq_sum;
  sum_t                   next;

  always_comb begin
    a_x    = SQ_W'(a);
    b_x    = SQ_W'(b);
    sq_sum = SQ_W'(a_x * a_x) + SQ_W'(b_x * b_x);
    unique case (op)
      OP_PASS_A: next = a;
      OP_PASS_B: next = b;
      OP_ADD:    next = a + b;
      OP_SUB:    next = a - b;
      OP_MAG:    next = sum_t'(isqrt(sq_sum));
      OP_MIN:    next = (a < b) ? a : b;
      OP_MAX:    next = (a > b) ? a : b;
      OP_ABS:    next = (a < 0) ? -a : a;
      default:   next = a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) res <= '0;
    else        res <= next;

endmodule
