// tb_ctrl_regs: checks the AXI4-Lite metadata registers: every register
// written and read back, the configuration record seen by the kernel,
// the one-cycle START pulse, START ignored while busy, and DONE / irq
// sticky until CTRL is read.
module tb_ctrl_regs;
  import cfar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic [7:0]  awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic        arvalid = 0, arready, rvalid, rready = 1;
  cfar_cfg_t   cfg;
  logic        start, busy = 0, done = 0, irq;
  int checks = 0, failures = 0, starts = 0;

  ctrl_regs u_dut (.*);

  always @(posedge clk) if (rst_n && start) starts++;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awvalid = 1; awaddr = a;
    if ($urandom_range(1)) begin @(negedge clk); end  // W may lag AW
    wvalid = 1; wdata = d;
    do @(posedge clk); while (!wready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); arvalid = 1; araddr = a;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    logic [7:0]  addrs [11] = '{8'h10, 8'h14, 8'h18, 8'h1C, 8'h20, 8'h24, 8'h28, 8'h30, 8'h34, 8'h38, 8'h3C};
    logic [31:0] vals  [11];
    logic [31:0] masks [11] = '{32'hFFFF, 32'hFFFF, 32'h1FF, 32'h1FF, 32'h1FF, 32'h1FF, 32'hFFFF,
                                32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF, 32'hFFFFFFFF};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      vals[i] = $urandom & masks[i];
      wr(addrs[i], vals[i]);
    end
    foreach (vals[i]) begin
      rd(addrs[i], v);
      check("readback", v, vals[i]);
    end
    check("width",  cfg.width,  vals[0]);
    check("height", cfg.height, vals[1]);
    check("win_hw", cfg.win_hw, vals[2]);
    check("win_hh", cfg.win_hh, vals[3]);
    check("grd_hw", cfg.grd_hw, vals[4]);
    check("grd_hh", cfg.grd_hh, vals[5]);
    check("k",      cfg.k_q88,  vals[6]);
    check("img_base",  cfg.img_base,  {vals[8], vals[7]});
    check("mask_base", cfg.mask_base, {vals[10], vals[9]});
    wr(8'h00, 1);
    check("one start pulse", starts, 1);
    busy = 1;
    wr(8'h00, 1);
    check("start ignored while busy", starts, 1);
    rd(8'h00, v);
    check("busy bit", v[2:0], 3'b001);
    @(negedge clk); done = 1; @(negedge clk); done = 0; busy = 0;
    repeat (3) @(negedge clk);
    check("irq", irq, 1);
    rd(8'h00, v);
    check("done bit", v[2:0], 3'b110);
    rd(8'h00, v);
    check("done cleared", v[2:0], 3'b100);
    check("irq cleared", irq, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
