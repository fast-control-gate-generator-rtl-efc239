// fcgg_vme_slave: VME bus slave that gives the host access to the registers.
//
// The board is reached with 4-byte (D32) VME memory cycles; its base address
// is set by dip switches. Beyond that the bus protocol details below are this
// implementation's choices, following common VME slave practice:
//   * A24 addressing. A cycle selects the board when the address modifier
//     is one of AM_A24_USER (0x39) or AM_A24_SUPV (0x3D), A[23:8] equals
//     dip_sw, and the cycle is D32 (LWORD* low, A1 low, DS0* and DS1* low).
//     A[7:2] select the register. Other cycles get no answer.
//   * AS*, DS0*, DS1* and WRITE* are synchronised to clk with two flip-flops;
//     address, AM and write data are sampled in the clock in which both
//     data strobes are first seen low (the master holds them stable until
//     DTACK*). Only that falling edge starts an access, so the synchronised
//     strobes of a previous cycle, or of a cycle for another board, can
//     never be taken for a new one.
//   * A write gives a one-cycle bus_wr strobe; a read samples bus_rdata. In
//     the cycle after that DTACK* is driven low (and, for a read, the data
//     bus driven through vme_d_out/vme_d_oe); both are released when either
//     data strobe goes high again.
// Latency: DTACK* falls four clocks after the data strobes fall (two of
// synchronisation, one of decode, one of access). Bidirectional lines are
// split into _in, _out and _oe; the board-level transceivers are outside.
// Assertions at the end state the handshake rules.
module fcgg_vme_slave #(
  parameter int unsigned DIP_W       = 16,
  parameter logic [5:0]  AM_A24_USER = 6'h39,
  parameter logic [5:0]  AM_A24_SUPV = 6'h3D
) (
  input  logic              clk,
  input  logic              rst,
  // VME side
  input  logic [23:1]       vme_addr,
  input  logic [5:0]        vme_am,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_lword_n,
  input  logic              vme_write_n,
  input  logic [31:0]       vme_d_in,
  output logic [31:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  input  logic [DIP_W-1:0]  dip_sw,      // board base address A[23:8]
  // register side
  output logic              bus_wr,
  output logic [7:2]        bus_addr,
  output logic [31:0]       bus_wdata,
  input  logic [31:0]       bus_rdata
);

  typedef enum logic [1:0] {V_IDLE, V_ACCESS, V_ACK} vstate_t;
  vstate_t state;

  logic [1:0] as_s, write_s;
  logic [1:0] ds0_s, ds1_s;
  logic       ds_low, ds_high, as_low, is_write, match;
  logic       ds_low_q, ds_fall;

  // Two-flip-flop synchronisers (active-low strobes reset to inactive).
  always_ff @(posedge clk) begin
    if (rst) begin
      as_s    <= 2'b11;
      ds0_s   <= 2'b11;
      ds1_s   <= 2'b11;
      write_s <= 2'b11;
      ds_low_q <= 1'b0;
    end else begin
      ds_low_q <= ds_low;
      as_s    <= {as_s[0],    vme_as_n};
      ds0_s   <= {ds0_s[0],   vme_ds_n[0]};
      ds1_s   <= {ds1_s[0],   vme_ds_n[1]};
      write_s <= {write_s[0], vme_write_n};
    end
  end

  assign as_low   = !as_s[1];
  assign ds_low   = !ds0_s[1] && !ds1_s[1];
  assign ds_high  = ds0_s[1] || ds1_s[1];
  assign ds_fall  = ds_low && !ds_low_q;  // a new cycle's strobes
  assign is_write = !write_s[1];
  assign match    = as_low && ds_fall
                 && (vme_am == AM_A24_USER || vme_am == AM_A24_SUPV)
                 && (vme_addr[23:8] == 16'(dip_sw))
                 && !vme_lword_n && !vme_addr[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= V_IDLE;
      bus_wr      <= 1'b0;
      bus_addr    <= '0;
      bus_wdata   <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
    end else begin
      bus_wr <= 1'b0;
      unique case (state)
        V_IDLE: begin
          if (match) begin
            bus_addr  <= vme_addr[7:2];
            bus_wdata <= vme_d_in;
            bus_wr    <= is_write;
            state     <= V_ACCESS;
          end
        end
        V_ACCESS: begin
          // register written this cycle, or read data valid for bus_addr
          if (!is_write) begin
            vme_d_out <= bus_rdata;
            vme_d_oe  <= 1'b1;
          end
          vme_dtack_n <= 1'b0;
          state       <= V_ACK;
        end
        V_ACK: begin
          if (ds_high) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  // Handshake rules.
  // The data bus is driven only while DTACK* is low.
  a_oe_needs_dtack: assert property (@(posedge clk) disable iff (rst)
    vme_d_oe |-> !vme_dtack_n);
  // DTACK* stays low until the master releases a data strobe.
  a_dtack_held: assert property (@(posedge clk) disable iff (rst)
    (!vme_dtack_n && !ds_high) |=> !vme_dtack_n);
  // One register write per VME cycle.
  a_wr_single: assert property (@(posedge clk) disable iff (rst)
    bus_wr |=> !bus_wr);

endmodule
