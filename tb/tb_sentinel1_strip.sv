// tb_sentinel1_strip: the Sentinel-1 IW workload on the kernel at its default
// parameters (300 queues, 30 read channels).  A full scene is 25927 x 16709
// pixels; that is too long to simulate, so the testbench runs strips of the
// full scene width, tall enough for a few rows with a complete window, and
// measures the cost of one image row in clock cycles.  Every result bit is
// compared with the brute-force reference model (for the largest window only
// a sample of the pixels in the valid row, to keep the run short).
//
// From the row period it projects the latency of a whole scene
// (16709 rows) at 150 MHz and at 275 MHz, the clock rates reported for the
// 300-queue and the 90-queue builds; the 90-queue build has the same
// sequencer, so its cycles per row are the same.  Two window sizes of the
// published latency table are run: 75 x 75, which also fits the 90-queue
// build, and 151 x 151, which needs the 300-queue build.  It checks that a
// valid row costs about five cycles per pixel, that the row period hardly
// depends on the window size, and that the projected scene latency stays
// under 15 s at 150 MHz (and, for the 75 x 75 window, under 8 s at 275 MHz),
// as measured on the original hardware.
// The register and AXI traffic is modelled as in the other end-to-end tests.
module tb_sentinel1_strip;
  import cfar_pkg::*;

  localparam int unsigned NQ = 300, NCH = 30, DEPTH = 8192, QDEPTH = DEPTH / 16;
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

  cfar_kernel u_dut (.*);

  int unsigned seed, width, height, pitch;
  int          rd_err [NCH], rd_bursts [NCH];
  int          wr_writes, wr_err;
  logic        stall_long = 1'b0;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_m
    hbm_rd_model #(.NCH(NCH), .CH(ch), .MAX_LAT(30)) u_m (
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

  // ---------------------------------------------------------------- row period
  // cycle of the first target of each valid row
  longint cyc = 0, first_tgt_prev, period_sum;
  int     n_periods;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && u_dut.issue && u_dut.st == S_TGT && u_dut.c == DIM_W'(u_dut.cfg.win_hw)) begin
      if (first_tgt_prev != 0) begin
        period_sum += cyc - first_tgt_prev;
        n_periods++;
      end
      first_tgt_prev = cyc;
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

  localparam int unsigned S1_W = 25927, S1_H = 16709;

  // sample: check every pixel when 1, else only every 97th pixel of valid rows
  task automatic run_image(input int unsigned sd, input int w, input int h, input int hw,
                           input int hh, input int gw, input int gh, input int k,
                           input bit full_check, output real row_cycles);
    logic [31:0] v;
    int mpitch, bad, nchk;
    seed   = sd;
    width  = w;
    height = h;
    pitch  = ((w + 255) / 256) * 512;
    mpitch = ((w + 255) / 256) * 32;
    first_tgt_prev = 0; period_sum = 0; n_periods = 0;
    reg_wr(8'h10, w);  reg_wr(8'h14, h);
    reg_wr(8'h18, hw); reg_wr(8'h1C, hh);
    reg_wr(8'h20, gw); reg_wr(8'h24, gh);
    reg_wr(8'h28, k);
    reg_wr(8'h30, IMG_BASE[31:0]);  reg_wr(8'h34, IMG_BASE[63:32]);
    reg_wr(8'h38, MASK_BASE[31:0]); reg_wr(8'h3C, MASK_BASE[63:32]);
    reg_wr(8'h00, 1);
    while (!irq) @(posedge clk);
    reg_rd(8'h00, v);
    checks++; if (v[1] != 1'b1) begin failures++; $display("FAIL done bit not set"); end
    bad = 0; nchk = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        logic [255:0] b;
        bit exp, valid;
        valid = y >= hh && y + hh < h && x >= hw && x + hw < w;
        if (!full_check && valid && (x % 97) != 0) continue;
        b   = u_wm.read_beat(MASK_BASE + longint'(y * mpitch + (x / 256) * 32));
        exp = valid ? cfar_tb_pkg::ref_det(sd, w, h, hw, hh, gw, gh, k, y, x) : 1'b0;
        checks++; nchk++;
        if (b[x % 256] != exp) begin
          failures++;
          if (bad++ < 10) $display("FAIL pixel y=%0d x=%0d got %0b exp %0b", y, x, b[x % 256], exp);
        end
      end
    checks++;
    if (n_periods == 0) begin
      failures++;
      $display("FAIL no row period measured");
      row_cycles = 0.0;
    end else begin
      row_cycles = real'(period_sum) / real'(n_periods);
    end
    $display("image %0dx%0d win %0dx%0d guard %0dx%0d: %0d bits checked, %.1f cycles per row = %.3f per pixel",
             w, h, 2*hw+1, 2*hh+1, 2*gw+1, 2*gh+1, nchk, row_cycles, row_cycles / real'(w));
  endtask

  // fits90: the window also fits the 90-queue build, so the 275 MHz bound applies
  task automatic judge(input string name, input real row_cycles, input bit fits90);
    real t150, t275, per_pix;
    per_pix = row_cycles / real'(S1_W);
    t150 = row_cycles * real'(S1_H) / 150.0e6;
    t275 = row_cycles * real'(S1_H) / 275.0e6;
    $display("%s: projected scene latency %.2f s at 150 MHz, %.2f s at 275 MHz", name, t150, t275);
    checks++;
    if (per_pix < 4.9 || per_pix > 5.1) begin failures++; $display("FAIL %s: %.3f cycles per pixel", name, per_pix); end
    checks++;
    if (t150 >= 15.0) begin failures++; $display("FAIL %s: over 15 s at 150 MHz", name); end
    if (fits90) checks++;
    if (fits90 && t275 >= 8.0) begin failures++; $display("FAIL %s: over 8 s at 275 MHz", name); end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r75, r_big;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // typical Sentinel-1 window: 75 x 75 background, 7 x 7 guard, k = 15
    run_image(101, S1_W, 77, 37, 37, 3, 3, 32'h0F00, 1'b1, r75);
    judge("75x75 window", r75, 1'b1);
    // a window for the 300-queue build only: 151 x 151 background, 11 x 11 guard
    run_image(102, S1_W, 153, 75, 75, 5, 5, 32'h0F00, 1'b0, r_big);
    judge("151x151 window", r_big, 1'b0);
    checks++;
    if (r_big > 1.01 * r75) begin failures++; $display("FAIL row period grows with the window"); end
    for (int ch = 0; ch < NCH; ch++) begin
      checks++; if (rd_err[ch] != 0) begin failures++; $display("FAIL read channel %0d protocol", ch); end
    end
    checks++; if (wr_err != 0) begin failures++; $display("FAIL write channel protocol"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
