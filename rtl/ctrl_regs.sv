// ctrl_regs: AXI4-Lite slave holding the kernel's metadata registers.
//
// The host writes the image size, the window and guard dimensions, the CFAR
// constant and the buffer addresses, then sets START.  The kernel raises
// done when the result mask is in memory; this sets the sticky DONE bit and
// the irq output, both cleared by reading CTRL.
//
// Register map (32-bit registers, byte offsets):
//   0x00 CTRL      W: bit0 START.  R: bit0 BUSY, bit1 DONE, bit2 IDLE
//   0x10 WIDTH     image width in pixels         (16 bit)
//   0x14 HEIGHT    image height in rows          (16 bit)
//   0x18 WIN_HW    background window half width  (window = 2*WIN_HW+1)
//   0x1C WIN_HH    background window half height
//   0x20 GRD_HW    guard area half width         (guard  = 2*GRD_HW+1)
//   0x24 GRD_HH    guard area half height
//   0x28 K         CFAR constant, unsigned 8.8 fixed point
//   0x30/0x34      image offset in each read channel, low / high word
//   0x38/0x3C      result mask address, low / high word
// That such registers exist and that the kernel signals completion is the
// document's; the map, encodings and bus are this design's choice.
//
// Timing: a write completes when both AW and W have been seen (B one cycle
// later); a read answers one cycle after AR.  Responses are always OKAY.
module ctrl_regs
  import cfar_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             awvalid,
  output logic             awready,
  input  logic [7:0]       awaddr,
  input  logic             wvalid,
  output logic             wready,
  input  logic [31:0]      wdata,
  output logic             bvalid,
  input  logic             bready,
  input  logic             arvalid,
  output logic             arready,
  input  logic [7:0]       araddr,
  output logic             rvalid,
  input  logic             rready,
  output logic [31:0]      rdata,
  // kernel side
  output cfar_cfg_t        cfg,
  output logic             start,
  input  logic             busy,
  input  logic             done,
  output logic             irq
);

  logic       aw_got, w_got;
  logic [7:0] aw_q;
  logic [31:0] w_q;
  logic       done_st;

  assign awready = !aw_got && !bvalid;
  assign wready  = !w_got && !bvalid;
  assign arready = !rvalid;
  assign irq     = done_st;

  wire [7:0]  wa  = aw_got ? aw_q : awaddr;
  wire [31:0] wd  = w_got  ? w_q  : wdata;
  wire have_aw = aw_got || (awvalid && awready);
  wire have_w  = w_got  || (wvalid && wready);
  wire do_wr   = have_aw && have_w && !bvalid;
  wire do_rd   = arvalid && arready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_got  <= 1'b0;
      w_got   <= 1'b0;
      aw_q    <= '0;
      w_q     <= '0;
      bvalid  <= 1'b0;
      rvalid  <= 1'b0;
      rdata   <= '0;
      cfg     <= '0;
      start   <= 1'b0;
      done_st <= 1'b0;
    end else begin
      start <= 1'b0;
      if (awvalid && awready) begin aw_got <= 1'b1; aw_q <= awaddr; end
      if (wvalid && wready)   begin w_got  <= 1'b1; w_q  <= wdata;  end
      if (bvalid && bready) bvalid <= 1'b0;
      if (done) done_st <= 1'b1;

      if (do_wr) begin
        aw_got <= 1'b0;
        w_got  <= 1'b0;
        bvalid <= 1'b1;
        unique case (wa)
          8'h00: start <= wd[0] && !busy;
          8'h10: cfg.width          <= wd[DIM_W-1:0];
          8'h14: cfg.height         <= wd[DIM_W-1:0];
          8'h18: cfg.win_hw         <= wd[HALF_W-1:0];
          8'h1C: cfg.win_hh         <= wd[HALF_W-1:0];
          8'h20: cfg.grd_hw         <= wd[HALF_W-1:0];
          8'h24: cfg.grd_hh         <= wd[HALF_W-1:0];
          8'h28: cfg.k_q88          <= wd[K_W-1:0];
          8'h30: cfg.img_base[31:0]   <= wd;
          8'h34: cfg.img_base[63:32]  <= wd;
          8'h38: cfg.mask_base[31:0]  <= wd;
          8'h3C: cfg.mask_base[63:32] <= wd;
          default: ;
        endcase
        if (wa == 8'h00 && wd[0] && !busy) done_st <= 1'b0;
      end

      if (rvalid && rready) rvalid <= 1'b0;
      if (do_rd) begin
        rvalid <= 1'b1;
        unique case (araddr)
          8'h00: begin
            rdata   <= {29'd0, !busy, done_st, busy};
            done_st <= done;
          end
          8'h10: rdata <= 32'(cfg.width);
          8'h14: rdata <= 32'(cfg.height);
          8'h18: rdata <= 32'(cfg.win_hw);
          8'h1C: rdata <= 32'(cfg.win_hh);
          8'h20: rdata <= 32'(cfg.grd_hw);
          8'h24: rdata <= 32'(cfg.grd_hh);
          8'h28: rdata <= 32'(cfg.k_q88);
          8'h30: rdata <= cfg.img_base[31:0];
          8'h34: rdata <= cfg.img_base[63:32];
          8'h38: rdata <= cfg.mask_base[31:0];
          8'h3C: rdata <= cfg.mask_base[63:32];
          default: rdata <= '0;
        endcase
      end
    end
  end

endmodule
