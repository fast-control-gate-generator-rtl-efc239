// tb_fcgg_vme_slave: self-checking test of the VME slave.
//
// A bus-functional VME master performs A24/D32 write and read cycles. The
// register side is a 64-word array in the testbench. Checks: writes reach
// the addressed word with the right data and exactly one bus_wr strobe;
// reads return the word on vme_d_out with vme_d_oe set; DTACK* falls four
// clocks after the data strobes when they fall just after a clock edge, and
// rises after they are released; cycles to another board address, with a
// foreign address modifier, or that are not D32 get no DTACK* and change
// nothing.
module tb_fcgg_vme_slave;

  localparam logic [15:0] BOARD = 16'hC3_5A;

  logic        clk = 1'b0;
  logic        rst;
  logic [23:1] vme_addr;
  logic [5:0]  vme_am;
  logic        vme_as_n;
  logic [1:0]  vme_ds_n;
  logic        vme_lword_n;
  logic        vme_write_n;
  logic [31:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [15:0] dip_sw;
  logic        bus_wr;
  logic [7:2]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  int checks = 0, failures = 0;
  int n_wr_strobes = 0;
  logic [31:0] mem [64];
  logic [31:0] model [64];

  fcgg_vme_slave dut (.*);

  always #5 clk = ~clk;

  assign bus_rdata = mem[bus_addr];
  always @(posedge clk) begin
    if (bus_wr && !rst) begin
      mem[bus_addr] <= bus_wdata;
      n_wr_strobes++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // One VME cycle. Returns 1 if DTACK* came, with the latency in clocks.
  task automatic vme_cycle(input logic [23:0] a, input logic [5:0] am, input bit write,
                           input bit d32, input logic [31:0] d,
                           output bit acked, output logic [31:0] q, output int lat);
    @(posedge clk); #1;
    vme_addr    = a[23:1];
    vme_am      = am;
    vme_lword_n = !d32;
    vme_write_n = !write;
    vme_d_in    = d;
    @(posedge clk); #1;
    vme_as_n = 1'b0;
    @(posedge clk); #1;
    vme_ds_n = 2'b00;
    lat = 0;
    acked = 1'b0;
    q = '0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1;
      lat++;
      if (!vme_dtack_n) begin
        acked = 1'b1;
        break;
      end
    end
    if (acked && !write) begin
      checks++;
      if (!vme_d_oe) failures++;
      q = vme_d_out;
    end
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    for (int i = 0; i < 10 && !vme_dtack_n; i++) @(posedge clk);
    #1;
    check("DTACK* released", 32'(vme_dtack_n), 32'h1);
    check("data bus released", 32'(vme_d_oe), 32'h0);
  endtask

  initial begin
    bit acked;
    logic [31:0] q, d;
    int lat, w, strobes;
    vme_addr = '0; vme_am = '0; vme_as_n = 1'b1; vme_ds_n = 2'b11;
    vme_lword_n = 1'b1; vme_write_n = 1'b1; vme_d_in = '0;
    dip_sw = BOARD;
    foreach (mem[i]) begin
      mem[i] = '0;
      model[i] = '0;
    end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int i = 0; i < 300; i++) begin
      w = $urandom_range(0, 63);
      d = $urandom;
      strobes = n_wr_strobes;
      case ($urandom_range(0, 5))
        0, 1: begin  // write to this board
          vme_cycle({BOARD, 6'(w), 2'b00}, ($urandom_range(0, 1) != 0) ? 6'h39 : 6'h3D,
                    1'b1, 1'b1, d, acked, q, lat);
          model[w] = d;
          check("write acked", 32'(acked), 32'h1);
          check("DTACK latency", 32'(lat), 32'd4);
          check("one write strobe", 32'(n_wr_strobes - strobes), 32'd1);
        end
        2, 3: begin  // read from this board
          vme_cycle({BOARD, 6'(w), 2'b00}, 6'h39, 1'b0, 1'b1, d, acked, q, lat);
          check("read acked", 32'(acked), 32'h1);
          check("DTACK latency", 32'(lat), 32'd4);
          check("read data", q, model[w]);
          check("no write strobe", 32'(n_wr_strobes - strobes), 32'd0);
        end
        4: begin  // another board
          vme_cycle({BOARD ^ 16'(1 << $urandom_range(0, 15)), 6'(w), 2'b00}, 6'h39,
                    1'b1, 1'b1, d, acked, q, lat);
          check("other board ignored", 32'(acked), 32'h0);
          check("no write strobe", 32'(n_wr_strobes - strobes), 32'd0);
        end
        default: begin  // wrong AM or not D32
          if ($urandom_range(0, 1) != 0)
            vme_cycle({BOARD, 6'(w), 2'b00}, 6'h09, 1'b1, 1'b1, d, acked, q, lat);
          else
            vme_cycle({BOARD, 6'(w), 2'b00}, 6'h39, 1'b1, 1'b0, d, acked, q, lat);
          check("foreign cycle ignored", 32'(acked), 32'h0);
          check("no write strobe", 32'(n_wr_strobes - strobes), 32'd0);
        end
      endcase
    end
    foreach (model[i]) check("final contents", mem[i], model[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
