// tb_cfar_kernel: end-to-end test of the CFAR kernel at reduced size
// (12 queues, 4 read channels, 256-pixel queues) so that every mechanism
// shows up on small images.
//
// The host side is modelled by AXI4-Lite register writes; each read channel
// and the result channel are behavioural HBM models.  For each image the
// testbench programs the registers, starts the kernel, waits for the
// interrupt, and compares every bit of the result mask with the brute-force
// reference model.  It also checks the per-pixel read schedule (window-width
// reads at a row start, five reads per further pixel), the five-cycle pixel
// interval, and counts that each mechanism happened: zero rows and border
// pixels, full accumulation and running updates, waits for cache data, queue
// wrap-around, room-limited read bursts, the window wrapping around the
// queue array, write back-pressure stalls, an invalid configuration, and
// both detected and clear pixels.
module tb_cfar_kernel;
  import cfar_pkg::*;

  localparam int unsigned NQ = 12, NCH = 4, DEPTH = 256, QDEPTH = DEPTH / 16;
  localparam longint IMG_BASE = 64'h1000, MASK_BASE = 64'h40_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // control bus
  logic        s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 1;
  logic [7:0]  s_awaddr = 0, s_araddr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 1, irq;

  logic              rd_arvalid [NCH], rd_arready [NCH], rd_rvalid [NCH], rd_rready [NCH], rd_rlast [NCH];
  logic [63:0]       rd_araddr  [NCH];
  logic [7:0]        rd_arlen   [NCH];
  logic [255:0]      rd_rdata   [NCH];
  logic              wr_awvalid, wr_awready, wr_wvalid, wr_wready, wr_wlast, wr_bvalid, wr_bready;
  logic [63:0]       wr_awaddr;
  logic [255:0]      wr_wdata;

  cfar_kernel #(.NQ(NQ), .NCH(NCH), .DEPTH_PIX(DEPTH), .BURST(4), .MAX_OUT(4)) u_dut (.*);

  int unsigned seed, width, height, pitch;
  int          rd_err [NCH], rd_bursts [NCH];
  int          wr_writes, wr_err;
  logic        stall_long = 1'b0;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_m
    hbm_rd_model #(.NCH(NCH), .CH(ch), .MAX_LAT(12)) u_m (
      .clk, .seed, .base(IMG_BASE), .pitch, .width, .height,
      .arvalid(rd_arvalid[ch]), .arready(rd_arready[ch]), .araddr(rd_araddr[ch]),
      .arlen(rd_arlen[ch]), .rvalid(rd_rvalid[ch]), .rready(rd_rready[ch]),
      .rdata(rd_rdata[ch]), .rlast(rd_rlast[ch]), .errors(rd_err[ch]), .bursts(rd_bursts[ch])
    );
  end

  hbm_wr_model u_wm (
    .clk, .stall_long, .awvalid(wr_awvalid), .awready(wr_awready), .awaddr(wr_awaddr),
    .wvalid(wr_wvalid), .wready(wr_wready), .wdata(wr_wdata), .wlast(wr_wlast),
    .bvalid(wr_bvalid), .bready(wr_bready), .writes(wr_writes), .errors(wr_err)
  );

  // ---------------------------------------------------------------- events
  int n_zero_row, n_border, n_init, n_upd, n_tgt, n_cache_wait, n_wr_stall;
  int n_qwrap, n_room, n_arr_wrap, n_invalid, n_det, n_clear;
  int n_int5, n_intlong, last_tgt;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (u_dut.issue) begin
        case (u_dut.st)
          S_ZROW:           n_zero_row++;
          S_LEFT, S_RIGHT: n_border++;
          S_INIT:           n_init++;
          S_UPD:            n_upd++;
          S_TGT: begin
            n_tgt++;
            if (u_dut.c != DIM_W'(u_dut.cfg.win_hw)) begin
              if (int'(cyc) - last_tgt == 5) n_int5++;
              else n_intlong++;
            end
            last_tgt = int'(cyc);
          end
          default: ;
        endcase
      end
      if (u_dut.emit && u_dut.need_read && !u_dut.col_ready && u_dut.en) n_cache_wait++;
      if (!u_dut.en) n_wr_stall++;
      for (int q = 0; q < NQ; q++) if (u_dut.q_act[q] && u_dut.q_rx[q] > QDEPTH) begin n_qwrap++; break; end
      for (int j = 0; j < NQ / NCH; j++)
        if (u_dut.g_ch[0].u_rd.q_active[j] && u_dut.g_ch[0].u_rd.issued[j] < u_dut.row_beats &&
            !u_dut.g_ch[0].u_rd.elig[j] && !u_dut.row_go) begin n_room++; break; end
      if (u_dut.row_go && 32'(u_dut.top_q) + 32'(u_dut.win_h) > NQ) n_arr_wrap++;
      if (u_dut.st == S_ROW && !u_dut.cfg_ok) n_invalid++;
    end
  end

  // ---------------------------------------------------------------- bus tasks
  task automatic reg_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic reg_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  task automatic run_image(input int unsigned sd, input int w, input int h, input int hw,
                           input int hh, input int gw, input int gh, input int k);
    logic [31:0] v;
    int mpitch, bad, expected_tgt, valid_rows, tgt_before, upd_before, init_before;
    seed   = sd;
    width  = w;
    height = h;
    pitch  = ((w + 255) / 256) * 512;
    mpitch = ((w + 255) / 256) * 32;
    tgt_before = n_tgt; upd_before = n_upd; init_before = n_init;
    reg_wr(8'h10, w);  reg_wr(8'h14, h);
    reg_wr(8'h18, hw); reg_wr(8'h1C, hh);
    reg_wr(8'h20, gw); reg_wr(8'h24, gh);
    reg_wr(8'h28, k);
    reg_wr(8'h30, IMG_BASE[31:0]);  reg_wr(8'h34, IMG_BASE[63:32]);
    reg_wr(8'h38, MASK_BASE[31:0]); reg_wr(8'h3C, MASK_BASE[63:32]);
    reg_rd(8'h18, v);
    checks++; if (v != 32'(hw)) begin failures++; $display("FAIL reg readback %0d", v); end
    reg_wr(8'h00, 1);
    while (!irq) @(posedge clk);
    reg_rd(8'h00, v);
    checks++; if (v[1] != 1'b1) begin failures++; $display("FAIL done bit not set"); end
    reg_rd(8'h00, v);
    checks++; if (v[1] != 1'b0 || v[2] != 1'b1) begin failures++; $display("FAIL done not cleared / not idle"); end
    bad = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        logic [255:0] b;
        bit exp;
        b   = u_wm.read_beat(MASK_BASE + longint'(y * mpitch + (x / 256) * 32));
        exp = cfar_tb_pkg::ref_det(sd, w, h, hw, hh, gw, gh, k, y, x);
        checks++;
        if (b[x % 256] != exp) begin
          failures++;
          if (bad++ < 10) $display("FAIL pixel y=%0d x=%0d got %0b exp %0b", y, x, b[x % 256], exp);
        end
        if (exp) n_det++; else n_clear++;
      end
    // read schedule
    if (gw < hw && gh < hh && 2 * hh + 1 <= NQ && w >= 2 * hw + 1) begin
      valid_rows   = h - 2 * hh;
      expected_tgt = valid_rows * (w - 2 * hw);
      checks++;
      if (n_tgt - tgt_before != expected_tgt || n_upd - upd_before != 4 * valid_rows * (w - 2 * hw - 1) ||
          n_init - init_before != valid_rows * (2 * hw + 1)) begin
        failures++;
        $display("FAIL read schedule tgt %0d upd %0d init %0d", n_tgt - tgt_before,
                 n_upd - upd_before, n_init - init_before);
      end
    end
    $display("image %0dx%0d win %0dx%0d guard %0dx%0d k=%0d: done at cycle %0d", w, h,
             2*hw+1, 2*hh+1, 2*gw+1, 2*gh+1, k, cyc);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    stall_long = 1'b1;
    run_image(11, 300, 24, 6, 5, 2, 1, 32'h0300);   // queue wrap, room limits
    stall_long = 1'b0;
    run_image(22, 40, 30, 3, 3, 1, 1, 32'h0F00);    // window wraps around the array
    run_image(33, 37, 16, 4, 2, 1, 1, 32'h0180);
    run_image(44, 20, 10, 2, 2, 2, 1, 32'h0100);    // guard as wide as window: invalid
    for (int ch = 0; ch < NCH; ch++) begin
      checks++; if (rd_err[ch] != 0) begin failures++; $display("FAIL read channel %0d protocol", ch); end
    end
    checks++; if (wr_err != 0) begin failures++; $display("FAIL write channel protocol"); end
    $display("events: zero_row=%0d border=%0d init=%0d upd=%0d tgt=%0d cache_wait=%0d wr_stall=%0d",
             n_zero_row, n_border, n_init, n_upd, n_tgt, n_cache_wait, n_wr_stall);
    $display("events: qwrap=%0d room=%0d arr_wrap=%0d invalid=%0d det=%0d clear=%0d int5=%0d intlong=%0d",
             n_qwrap, n_room, n_arr_wrap, n_invalid, n_det, n_clear, n_int5, n_intlong);
    begin
      int ev [12];
      ev = '{n_zero_row, n_border, n_init, n_upd, n_tgt, n_cache_wait, n_wr_stall,
             n_qwrap, n_room, n_arr_wrap, n_invalid, n_det};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    checks++; if (n_clear == 0) failures++;
    // once running, a pixel costs five cycles
    checks++;
    if (n_int5 <= n_intlong) begin failures++; $display("FAIL five-cycle pixel rate not dominant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
