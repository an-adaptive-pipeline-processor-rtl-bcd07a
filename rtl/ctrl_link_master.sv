// ctrl_link_master: serial link transmitter of the pipeline control unit.
//
// Accepts one register write at a time (PE address, register address, data)
// with a valid/ready handshake and sends it on the shared control bus as one
// 24-bit frame, MSB first: ser_cs is high for exactly 24 clocks with one bit
// on ser_dat per clock, then low for at least one clock so that the PEs see
// the end of the frame.  A PE address of 0xFF reaches every PE.
//
// The control computer that decides what to write is outside this design;
// it drives the write port.  The frame format is the one pe_ctrl receives and
// is this design's choice.
//
// Timing: a write accepted in cycle t puts its first bit on the bus in cycle
// t+1; the next write can be accepted 26 cycles after t.
module ctrl_link_master
  import pe_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [PE_ADDR_W-1:0] wr_pe,
  input  logic [7:0]           wr_reg,
  input  logic [7:0]           wr_data,
  output logic                 ser_cs,
  output logic                 ser_dat
);

  logic [FRAME_BITS-1:0] shreg;
  logic [4:0]            left;    // bits still to send
  logic                  gap;     // one idle cycle after a frame

  assign wr_ready = (left == '0) && !gap && !ser_cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      left    <= '0;
      gap     <= 1'b0;
      ser_cs  <= 1'b0;
      ser_dat <= 1'b0;
    end else begin
      gap <= 1'b0;
      if (wr_valid && wr_ready) begin
        shreg   <= {wr_pe, wr_reg, wr_data} << 1;
        ser_dat <= wr_pe[PE_ADDR_W-1];
        ser_cs  <= 1'b1;
        left    <= 5'(FRAME_BITS - 1);
      end else if (left != '0) begin
        ser_dat <= shreg[FRAME_BITS-1];
        shreg   <= shreg << 1;
        left    <= left - 1'b1;
      end else if (ser_cs) begin
        ser_cs  <= 1'b0;
        ser_dat <= 1'b0;
        gap     <= 1'b1;
      end
    end
  end

  // A write that is offered must be held until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      wr_valid && !wr_ready |=> wr_valid && $stable({wr_pe, wr_reg, wr_data});
  endproperty
  a_hold: assert property (p_hold) else $error("write request dropped before accepted");

endmodule
