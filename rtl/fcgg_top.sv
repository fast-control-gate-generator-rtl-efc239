// fcgg_top: the fast control gate generator FPGA.
//
// The generator produces programmable sequences of pulses for a timing
// system. Eight sequencers each make a train of prompt pulses and a train of
// echo pulses, started by the external (front-panel) inputs that the
// sequencer's input mask selects, or by a test-fire register write. The
// pulse trains are ORed, under register masks, into four external outputs
// and, together with two global inhibit inputs, into ten partition inhibit
// outputs. All registers are reached over VME with D32 cycles at a base
// address set by dip switches.
//
//   ext_in --sync--> input_ctl[n] --trig--> sequencer[n] --prompt/echo--+
//                        ^ fire                 ^ cfg                    |
//   VME <--> vme_slave <--> regs ---------------+------------------------+
//                                   output_logic --> ext_out              |
//                                   inhibit_logic <-- gin --> inh_out  <--+
//
// Timing (clk is the 59.5 MHz backplane system clock): an external input
// edge reaches the sequencer trigger after two synchronising clocks; a
// trigger in cycle c0 starts prompt pulse 0 in cycle c0+1+delay+offset; the
// external outputs and the sequencer part of the inhibit outputs follow the
// pulses after one more clock; the global inhibit inputs act on the inhibit
// outputs without a clock. The block structure, counts, register map and
// combining equations are the design's; synchronisation, registering of
// outputs and the VME protocol details are this implementation's choices
// (see each block). Synchronous, active-high reset. The sequencers' busy
// flags are left unused here (lint reports them): the register map has no
// status register to show them.
module fcgg_top
  import fcgg_pkg::*;
#(
  parameter int unsigned DIP_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  // front panel
  input  logic [NEXT_IN-1:0]  ext_in,
  input  logic [NGINH-1:0]    gin,
  output logic [NEXT_OUT-1:0] ext_out,
  output logic [NPINH-1:0]    inh_out,
  // VME bus
  input  logic [23:1]         vme_addr,
  input  logic [5:0]          vme_am,
  input  logic                vme_as_n,
  input  logic [1:0]          vme_ds_n,
  input  logic                vme_lword_n,
  input  logic                vme_write_n,
  input  logic [31:0]         vme_d_in,
  output logic [31:0]         vme_d_out,
  output logic                vme_d_oe,
  output logic                vme_dtack_n,
  input  logic [DIP_W-1:0]    dip_sw
);

  logic                            bus_wr;
  logic [7:2]                      bus_addr;
  logic [31:0]                     bus_wdata, bus_rdata;
  seq_cfg_t [NSEQ-1:0]             cfg;
  in_ctl_t  [NSEQ-1:0]             in_ctl;
  logic     [NSEQ-1:0]             fire, trig, prompt, echo, busy;
  logic     [NEXT_OUT-1:0][2*NSEQ-1:0] out_mask;
  logic     [4*NSEQ-1:0]           inh_mask_in;
  logic     [NPINH-1:0]            inh_mask_out;
  logic     [NEXT_IN-1:0]          ext_in_s;

  fcgg_vme_slave #(.DIP_W(DIP_W)) u_vme (
    .clk, .rst,
    .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_lword_n, .vme_write_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n, .dip_sw,
    .bus_wr, .bus_addr, .bus_wdata, .bus_rdata
  );

  fcgg_regs u_regs (
    .clk, .rst,
    .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(bus_rdata),
    .cfg, .in_ctl, .fire, .out_mask, .inh_mask_in, .inh_mask_out
  );

  fcgg_sync #(.W(NEXT_IN)) u_sync (
    .clk, .rst, .d(ext_in), .q(ext_in_s)
  );

  for (genvar n = 0; n < NSEQ; n++) begin : g_seq
    fcgg_input_ctl u_in (
      .clk, .rst, .ctl(in_ctl[n]), .ext_in(ext_in_s), .fire(fire[n]),
      .trig(trig[n])
    );
    fcgg_sequencer u_seq (
      .clk, .rst, .cfg(cfg[n]), .trig(trig[n]),
      .prompt(prompt[n]), .echo(echo[n]), .busy(busy[n])
    );
  end

  fcgg_output_logic u_out (
    .clk, .rst, .prompt, .echo, .out_mask, .ext_out
  );

  fcgg_inhibit_logic u_inh (
    .clk, .rst, .prompt, .echo, .gin, .mask_in(inh_mask_in),
    .mask_out(inh_mask_out), .inh_out
  );

endmodule
