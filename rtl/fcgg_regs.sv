// fcgg_regs: the generator's 32-bit register file.
//
// Register map (byte offsets in the board's 256-byte window):
//   0x10*n + 0x0  period_width  [19:0] period, [29:20] prompt width, [31:30] spare
//   0x10*n + 0x4  delay_reps    [19:0] delay, [31:20] number of prompt pulses
//   0x10*n + 0x8  stagger_reg   [15:0] step size, [27:16] number of steps
//   0x10*n + 0xC  echo_reg      [9:0] echo delay, [19:10] echo width
//                 (n = 0..7, one set per sequencer)
//   0x80 + 4*n    seqN_input_ctl [0] enable, [1] test fire (write only),
//                                [5:2] external input mask
//   0xA0 + 4*i    outI_mask     [7:0] prompt pulses, [15:8] echo pulses
//                 (i = 0..3)
//   0xB0          inhibit_mask_in  [7:0]/[15:8] prompt/echo pulses included,
//                                  [23:16]/[31:24] prompt/echo pulses excluded
//   0xB4          inhibit_mask_out [9:0] inhibit outputs driven
// The map and field layout are the design's. This implementation's choices:
// all registers reset to zero; bits without a field read as zero; reads and
// writes at unmapped offsets return zero and do nothing; writing 1 to the
// test-fire bit gives a one-cycle fire strobe in the cycle after the write
// (when the enable bit written with it is already in effect) and the bit
// reads back as zero.
// Interface: a synchronous bus, word address addr = byte offset[7:2]; wr is
// a one-cycle write strobe; rdata is combinational from addr.
module fcgg_regs
  import fcgg_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            wr,
  input  logic [7:2]                      addr,
  input  logic [31:0]                     wdata,
  output logic [31:0]                     rdata,
  output seq_cfg_t [NSEQ-1:0]             cfg,
  output in_ctl_t  [NSEQ-1:0]             in_ctl,
  output logic     [NSEQ-1:0]             fire,
  output logic     [NEXT_OUT-1:0][2*NSEQ-1:0] out_mask,
  output logic     [4*NSEQ-1:0]           inh_mask_in,
  output logic     [NPINH-1:0]            inh_mask_out
);

  logic [7:0] byte_addr;
  assign byte_addr = {addr, 2'b00};

  // Writes.
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg          <= '0;
      in_ctl       <= '0;
      fire         <= '0;
      out_mask     <= '0;
      inh_mask_in  <= '0;
      inh_mask_out <= '0;
    end else begin
      fire <= '0;
      if (wr) begin
        if (byte_addr < INCTL_BASE) begin
          // sequencer register sets
          unique case (byte_addr[3:0])
            OFS_PERIOD_WIDTH: begin
              cfg[byte_addr[6:4]].period <= wdata[19:0];
              cfg[byte_addr[6:4]].width  <= wdata[29:20];
              cfg[byte_addr[6:4]].spare  <= wdata[31:30];
            end
            OFS_DELAY_REPS: begin
              cfg[byte_addr[6:4]].delay  <= wdata[19:0];
              cfg[byte_addr[6:4]].nreps  <= wdata[31:20];
            end
            OFS_STAGGER: begin
              cfg[byte_addr[6:4]].step   <= wdata[15:0];
              cfg[byte_addr[6:4]].nsteps <= wdata[27:16];
            end
            OFS_ECHO: begin
              cfg[byte_addr[6:4]].echo_delay <= wdata[9:0];
              cfg[byte_addr[6:4]].echo_width <= wdata[19:10];
            end
            default: ;
          endcase
        end else if (byte_addr[7:5] == INCTL_BASE[7:5]) begin
          in_ctl[byte_addr[4:2]].enable <= wdata[0];
          in_ctl[byte_addr[4:2]].mask   <= wdata[5:2];
          fire[byte_addr[4:2]]          <= wdata[1];
        end else if (byte_addr[7:4] == OUTCTL_BASE[7:4]) begin
          out_mask[byte_addr[3:2]] <= wdata[15:0];
        end else if (byte_addr == INH_BASE) begin
          inh_mask_in <= wdata;
        end else if (byte_addr == INH_BASE + 8'h4) begin
          inh_mask_out <= wdata[NPINH-1:0];
        end
      end
    end
  end

  // Reads.
  always_comb begin
    rdata = '0;
    if (byte_addr < INCTL_BASE) begin
      unique case (byte_addr[3:0])
        OFS_PERIOD_WIDTH: rdata = {cfg[byte_addr[6:4]].spare, cfg[byte_addr[6:4]].width,
                                   cfg[byte_addr[6:4]].period};
        OFS_DELAY_REPS:   rdata = {cfg[byte_addr[6:4]].nreps, cfg[byte_addr[6:4]].delay};
        OFS_STAGGER:      rdata = {4'b0, cfg[byte_addr[6:4]].nsteps, cfg[byte_addr[6:4]].step};
        OFS_ECHO:         rdata = {12'b0, cfg[byte_addr[6:4]].echo_width,
                                   cfg[byte_addr[6:4]].echo_delay};
        default:          rdata = '0;
      endcase
    end else if (byte_addr[7:5] == INCTL_BASE[7:5]) begin
      rdata = {26'b0, in_ctl[byte_addr[4:2]].mask, 1'b0, in_ctl[byte_addr[4:2]].enable};
    end else if (byte_addr[7:4] == OUTCTL_BASE[7:4]) begin
      rdata = {16'b0, out_mask[byte_addr[3:2]]};
    end else if (byte_addr == INH_BASE) begin
      rdata = inh_mask_in;
    end else if (byte_addr == INH_BASE + 8'h4) begin
      rdata = {{(32-NPINH){1'b0}}, inh_mask_out};
    end
  end

endmodule
