// tb_fcgg_regs: self-checking test of the register file.
//
// Writes random data to every word offset of the 256-byte window (mapped or
// not), in random order, and keeps a model of what each offset should read
// back: the written bits under the offset's field mask (zero for unmapped
// offsets and for the write-only test-fire bit). After each round it reads
// every offset back and checks the decoded outputs (sequencer fields, input
// controls, output and inhibit masks) against the model. It also checks
// that writing the test-fire bit gives exactly one fire strobe, one clock
// after the write, on the addressed sequencer only.
module tb_fcgg_regs;
  import fcgg_pkg::*;

  logic                            clk = 1'b0;
  logic                            rst;
  logic                            wr;
  logic [7:2]                      addr;
  logic [31:0]                     wdata, rdata;
  seq_cfg_t [NSEQ-1:0]             cfg;
  in_ctl_t  [NSEQ-1:0]             in_ctl;
  logic     [NSEQ-1:0]             fire;
  logic     [NEXT_OUT-1:0][2*NSEQ-1:0] out_mask;
  logic     [4*NSEQ-1:0]           inh_mask_in;
  logic     [NPINH-1:0]            inh_mask_out;

  int checks = 0, failures = 0;
  logic [31:0] model [64];

  fcgg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read-back mask of a byte offset, from the register map
  function automatic logic [31:0] field_mask(int ofs);
    if (ofs < 'h80) begin
      case (ofs % 16)
        0:  return 32'hFFFF_FFFF;
        4:  return 32'hFFFF_FFFF;
        8:  return 32'h0FFF_FFFF;
        default: return 32'h000F_FFFF;
      endcase
    end
    if (ofs < 'hA0) return 32'h0000_003D;
    if (ofs < 'hB0) return 32'h0000_FFFF;
    if (ofs == 'hB0) return 32'hFFFF_FFFF;
    if (ofs == 'hB4) return 32'h0000_03FF;
    return 32'h0;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(int ofs, logic [31:0] d);
    addr = 6'(ofs >> 2); wdata = d; wr = 1'b1;
    @(posedge clk); #1;
    wr = 1'b0;
  endtask

  initial begin
    int order[64];
    logic [31:0] d, m;
    wr = 1'b0; addr = '0; wdata = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    foreach (model[i]) model[i] = '0;

    // after reset every register reads zero
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a); #1;
      check("reset value", rdata, 32'h0);
    end

    for (int round = 0; round < 20; round++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        d = $urandom;
        write(order[i] * 4, d);
        model[order[i]] = d & field_mask(order[i] * 4);
        // fire strobe: one clock, addressed sequencer, only for bit 1
        if (order[i] * 4 >= 'h80 && order[i] * 4 < 'hA0)
          check("fire strobe", 32'(fire), 32'(d[1]) << ((order[i] * 4 - 'h80) / 4));
        else
          check("no fire strobe", 32'(fire), 32'h0);
      end
      @(posedge clk); #1;
      check("fire clears", 32'(fire), 32'h0);
      for (int a = 0; a < 64; a++) begin
        addr = 6'(a); #1;
        check($sformatf("read 0x%02h", a * 4), rdata, model[a]);
      end
      // decoded outputs
      for (int n = 0; n < NSEQ; n++) begin
        m = model[n * 4];
        check("period", 32'(cfg[n].period), m & 32'hFFFFF);
        check("width",  32'(cfg[n].width),  (m >> 20) & 32'h3FF);
        m = model[n * 4 + 1];
        check("delay",  32'(cfg[n].delay),  m & 32'hFFFFF);
        check("nreps",  32'(cfg[n].nreps),  m >> 20);
        m = model[n * 4 + 2];
        check("step",   32'(cfg[n].step),   m & 32'hFFFF);
        check("nsteps", 32'(cfg[n].nsteps), (m >> 16) & 32'hFFF);
        m = model[n * 4 + 3];
        check("echo delay", 32'(cfg[n].echo_delay), m & 32'h3FF);
        check("echo width", 32'(cfg[n].echo_width), (m >> 10) & 32'h3FF);
        m = model['h80 / 4 + n];
        check("enable", 32'(in_ctl[n].enable), m & 1);
        check("mask",   32'(in_ctl[n].mask),   (m >> 2) & 32'hF);
      end
      for (int o = 0; o < NEXT_OUT; o++)
        check("out mask", 32'(out_mask[o]), model['hA0 / 4 + o]);
      check("inhibit in",  inh_mask_in,         model['hB0 / 4]);
      check("inhibit out", 32'(inh_mask_out),   model['hB4 / 4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
