// delay_line: fixed delay of DEPTH clock cycles for a WIDTH-bit stream.
//
// This is the "Line - 3 Delay" of the processor element and the delay that
// carries synchronisation beside the video.  It is built as a circular buffer
// of DEPTH-1 words followed by an output register: each cycle the word
// written DEPTH-1 cycles ago is read into the output register and the new
// input takes its place.  Until the buffer has been written all the way round
// once after reset the output is zero, so no stale word (for example a false
// sync pulse) leaves the delay.  DEPTH = 1 is a single register.
//
// Timing: dout at the end of cycle t+DEPTH equals din at cycle t.  A circular
// buffer rather than a shift register is this design's choice; the architecture
// only asks for a delay.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 509
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH <= 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) dout <= '0;
      else        dout <= din;
  end else begin : g_ram
    localparam int unsigned N  = DEPTH - 1;
    localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

    logic [WIDTH-1:0] mem [N];
    logic [AW-1:0]    ptr;
    logic             primed;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr    <= '0;
        primed <= 1'b0;
        dout   <= '0;
      end else begin
        dout <= primed ? mem[ptr] : '0;
        if (ptr == AW'(N - 1)) begin
          ptr    <= '0;
          primed <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end

    always_ff @(posedge clk)
      mem[ptr] <= din;
  end

endmodule
