// pe_ctrl: control and timing unit of the processor element.
//
// Serial link: all PEs of a pipeline share one two-wire control bus, a frame
// strobe `ser_cs` and a data line `ser_dat`, sampled on the system clock.
// While ser_cs is high one bit per clock is shifted in, MSB first; a frame is
// FRAME_BITS = 24 bits: PE address [23:16], register address [15:8], data
// [7:0].  When ser_cs falls after exactly 24 bits and the PE address equals
// this PE's strapped address `pe_addr` (or is the broadcast address 0xFF), the
// register is written.  Frames of any other length are ignored.
//
// Register map (pe_pkg): 0x00-0x08 mask A, 0x10-0x18 mask B, 0x20 operator,
// 0x21 divisor, 0x22 threshold, 0x23 flags (bit 0 thresholder on, bit 1
// invertor on, bit 2 hexagonal sampling).
//
// Timing unit: writes land in shadow registers; the whole shadow set becomes
// the active configuration `cfg` on `frame_start`, the first pixel of a frame
// at the window centre, so a PE reprogrammed while video runs changes its
// operation between frames and never within one.  `pending` shows that
// shadow and active differ.  Reset loads the null operation (pe_pkg::null_cfg)
// into both.
//
// The architecture states only that PEs are programmed over a serial link by a
// separate controller and reconfigured in real time; the frame format,
// addressing and frame-boundary update are this design's choices.
module pe_ctrl
  import pe_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PE_ADDR_W-1:0] pe_addr,
  input  logic                 ser_cs,
  input  logic                 ser_dat,
  input  logic                 frame_start,
  output pe_cfg_t              cfg,
  output logic                 pending
);

  logic [FRAME_BITS-1:0] shreg;
  logic [4:0]            nbits;     // bits in the current frame, saturates
  logic                  cs_q;
  pe_cfg_t               shadow;

  logic                  frame_end;
  logic [PE_ADDR_W-1:0]  f_pe;
  logic [7:0]            f_reg, f_dat;

  assign frame_end = cs_q && !ser_cs && (nbits == 5'(FRAME_BITS));
  assign f_pe      = shreg[23:16];
  assign f_reg     = shreg[15:8];
  assign f_dat     = shreg[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      nbits <= '0;
      cs_q  <= 1'b0;
    end else begin
      cs_q <= ser_cs;
      if (ser_cs) begin
        shreg <= {shreg[FRAME_BITS-2:0], ser_dat};
        if (!cs_q)            nbits <= 5'd1;
        else if (nbits != '1) nbits <= nbits + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow  <= null_cfg();
      cfg     <= null_cfg();
      pending <= 1'b0;
    end else begin
      if (frame_end && (f_pe == pe_addr || f_pe == PE_BROADCAST)) begin
        if (f_reg[7:4] == REG_MASK_A[7:4] && f_reg[3:0] < 4'(NTAPS))
          shadow.mask_a[f_reg[3:0]] <= coef_t'(f_dat);
        else if (f_reg[7:4] == REG_MASK_B[7:4] && f_reg[3:0] < 4'(NTAPS))
          shadow.mask_b[f_reg[3:0]] <= coef_t'(f_dat);
        else if (f_reg == REG_OP)
          shadow.op <= op_mode_e'(f_dat[2:0]);
        else if (f_reg == REG_DIV)
          shadow.divisor <= f_dat;
        else if (f_reg == REG_THR)
          shadow.threshold <= f_dat;
        else if (f_reg == REG_FLAGS) begin
          shadow.thr_en <= f_dat[0];
          shadow.inv_en <= f_dat[1];
          shadow.hex    <= f_dat[2];
        end
        pending <= 1'b1;
      end else if (frame_start) begin
        cfg     <= shadow;
        pending <= 1'b0;
      end
    end
  end

endmodule
