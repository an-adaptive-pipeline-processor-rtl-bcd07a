// line_window: two-line store and 3x3 neighbourhood of the processor element.
//
// Three rows of three pixel registers are joined by two delays of
// LINE_LEN-3 pixels, so that each row of registers holds the pixels one line
// above the row before it: the arrangement of the basic PE of the architecture.  Each
// cycle one pixel enters, the window moves one pixel on, and `win` shows the
// nine registers with index k = 3*row + col: row 0 is the oldest line,
// column 0 the oldest pixel, k = 4 the centre.
//
// Timing: win[8] (newest) is the input of the previous cycle and the centre
// win[4] the input of LINE_LEN+2 cycles before.  Lines are taken as exactly
// LINE_LEN pixels with one pixel per clock; the window is not cut at line or
// frame edges, so border pixels see neighbours from the adjacent line (the
// architecture leaves edge handling open).
module line_window
  import pe_pkg::*;
#(
  parameter int unsigned LINE_LEN = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t pix_in,
  output win_t win
);

  pix_t row [3][3];         // row[r][j]: j = 0 is the newest register of row r
  pix_t dly_out [2];        // outputs of the two line-3 delays

  // Row 2 (newest line) takes the input; rows 1 and 0 take the delay outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '{default: '0};
    end else begin
      for (int r = 0; r < 3; r++) begin
        row[r][1] <= row[r][0];
        row[r][2] <= row[r][1];
      end
      row[2][0] <= pix_in;
      row[1][0] <= dly_out[0];
      row[0][0] <= dly_out[1];
    end
  end

  delay_line #(.WIDTH(PIX_W), .DEPTH(LINE_LEN - 3)) u_line3_a (
    .clk, .rst_n, .din(row[2][2]), .dout(dly_out[0])
  );
  delay_line #(.WIDTH(PIX_W), .DEPTH(LINE_LEN - 3)) u_line3_b (
    .clk, .rst_n, .din(row[1][2]), .dout(dly_out[1])
  );

  // Column 0 (oldest pixel) is the last register of each row.
  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win[3*r + c] = row[r][2-c];

endmodule
