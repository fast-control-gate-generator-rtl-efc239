// fcgg_pkg: constants and types shared by the fast control gate generator.
//
// The generator has eight programmable sequencers, four external (front
// panel) sequencer inputs, four external outputs, two global inhibit inputs
// and ten partition inhibit outputs. Its registers are 32 bits wide and sit
// in one 256-byte window: eight sequencer register sets of 16 bytes each,
// then the input control, output control and inhibit mask registers. The
// counts, offsets and field widths below follow the register map of the
// design; the field that carries no documented function (period_width bits
// 30-31) is kept as plain read/write storage.
package fcgg_pkg;

  localparam int unsigned NSEQ     = 8;   // programmable sequencers
  localparam int unsigned NEXT_IN  = 4;   // external sequencer inputs
  localparam int unsigned NEXT_OUT = 4;   // external sequencer outputs
  localparam int unsigned NGINH    = 2;   // global inhibit inputs
  localparam int unsigned NPINH    = 10;  // partition inhibit outputs

  // Field widths of the sequencer registers.
  localparam int unsigned PERIOD_W = 20;
  localparam int unsigned PWIDTH_W = 10;
  localparam int unsigned DELAY_W  = 20;
  localparam int unsigned NREPS_W  = 12;
  localparam int unsigned STEP_W   = 16;
  localparam int unsigned NSTEPS_W = 12;
  localparam int unsigned EDELAY_W = 10;
  localparam int unsigned EWIDTH_W = 10;
  // Largest stagger offset is (2^12-1)*(2^16-1) < 2^28; delay plus offset fits 29 bits.
  localparam int unsigned STAG_W   = STEP_W + NSTEPS_W;
  localparam int unsigned DEFF_W   = STAG_W + 1;

  // Byte offsets of the register sets (address bits 7:0).
  localparam logic [7:0] SEQ_BASE   = 8'h00;  // sequencer n at 0x10*n
  localparam logic [7:0] INCTL_BASE = 8'h80;  // seqN_input_ctl at 0x80 + 4*N
  localparam logic [7:0] OUTCTL_BASE= 8'hA0;  // outN_mask at 0xA0 + 4*N
  localparam logic [7:0] INH_BASE   = 8'hB0;  // inhibit_mask_in, inhibit_mask_out

  // Offsets inside one sequencer register set.
  localparam logic [3:0] OFS_PERIOD_WIDTH = 4'h0;
  localparam logic [3:0] OFS_DELAY_REPS   = 4'h4;
  localparam logic [3:0] OFS_STAGGER      = 4'h8;
  localparam logic [3:0] OFS_ECHO         = 4'hC;

  // Configuration of one sequencer, decoded from its four registers.
  typedef struct packed {
    logic [1:0]          spare;       // period_width[31:30], no function
    logic [PWIDTH_W-1:0] width;       // prompt pulse width, sysclk counts
    logic [PERIOD_W-1:0] period;      // prompt pulse period, sysclk counts
    logic [NREPS_W-1:0]  nreps;       // number of prompt pulses
    logic [DELAY_W-1:0]  delay;       // delay to first prompt pulse
    logic [NSTEPS_W-1:0] nsteps;      // number of stagger steps
    logic [STEP_W-1:0]   step;        // stagger step size
    logic [EWIDTH_W-1:0] echo_width;  // echo pulse width
    logic [EDELAY_W-1:0] echo_delay;  // prompt-to-echo delay
  } seq_cfg_t;

  // Input control of one sequencer (bits 0 and 2-5 of seqN_input_ctl).
  typedef struct packed {
    logic [NEXT_IN-1:0] mask;    // external inputs OR'd into the trigger
    logic               enable;  // sequencer responds to inputs / test fire
  } in_ctl_t;

endpackage
