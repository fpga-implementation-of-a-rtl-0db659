// cfar_kernel: cell-averaging CFAR ship detector for SAR images in HBM.
//
// For every pixel x of the image the kernel estimates mean and standard
// deviation of the pixels in a rectangular background window around it,
// leaving out a guard area around the pixel, and marks the pixel as detected
// when x > mu + k*sigma.  The image (16-bit pixels) is spread row by row over
// NCH HBM read channels (row y in channel y mod NCH); the one-bit-per-pixel
// result mask goes out on one AXI write channel.
//
// Structure:
//   ctrl_regs         AXI4-Lite metadata registers, START / DONE
//   hbm_read_channel  one per read channel: AXI read bursts into the cache
//   hbm_bram_router   channel ch reaches only queues ch, ch+NCH, ...
//   pixel_cache       NQ row queues (image row y in queue y mod NQ) plus the
//                     zeroing multiplexers that select the window's rows
//   cfar_pipeline     running sums, threshold and decision
//   mask_writer       bit packing and AXI write of the result mask
// and, in this module, the window sequencer.  It walks the image in raster
// order.  Rows closer than the window half height to the top or bottom, and
// columns closer than the half width to the left or right edge, have no full
// window and are emitted as "not detected".  For every other row it waits
// until the read channels are idle, moves the window down one row (row_go),
// and then, per pixel:
//   first pixel of the row: one cache read per window column (full
//     accumulation; columns crossing the guard area without its rows),
//   every further pixel:   four column reads that update the sums (leaving
//     full column -, column leaving the guard area +guard rows, column
//     entering the guard area -guard rows, entering full column +),
//   and one read of the pixel under test.
// So a pixel costs five cycles once the row is running.  A read waits until
// the column has arrived in every queue of the window; the whole pipeline
// freezes while the result writer is full.
//
// Window arithmetic, cache organisation, channel partitioning and the queue
// counts follow the document; the sequencing details (five reads per pixel,
// border handling, per-row restart of the queues, register map) are this
// design's own.  Configurations that cannot work (window taller than NQ
// rows, guard not smaller than the window) produce an all-zero mask.
module cfar_kernel
  import cfar_pkg::*;
#(
  parameter int unsigned NQ        = 300,   // pixel-cache queues = max window height
  parameter int unsigned NCH       = 30,    // HBM read channels
  parameter int unsigned DEPTH_PIX = 8192,  // pixels per queue
  parameter int unsigned BURST     = 16,    // beats per AXI read burst
  parameter int unsigned MAX_OUT   = 8,     // outstanding bursts per channel
  localparam int unsigned QPC      = NQ / NCH,
  localparam int unsigned QDEPTH   = DEPTH_PIX / PIX_PER_BEAT,
  localparam int unsigned SEL_W    = (QPC > 1) ? $clog2(QPC) : 1,
  localparam int unsigned MOD_W    = (NCH > 1) ? $clog2(NCH) : 1,
  localparam int unsigned WA_W     = $clog2(QDEPTH),
  localparam int unsigned QI_W     = $clog2(NQ)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite control slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [7:0]        s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [31:0]       s_wdata,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [7:0]        s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [31:0]       s_rdata,
  output logic              irq,
  // HBM read channels (AXI4, INCR bursts of 32-byte beats, single ID)
  output logic              rd_arvalid [NCH],
  input  logic              rd_arready [NCH],
  output logic [AXI_AW-1:0] rd_araddr  [NCH],
  output logic [7:0]        rd_arlen   [NCH],
  input  logic              rd_rvalid  [NCH],
  output logic              rd_rready  [NCH],
  input  logic [BEAT_W-1:0] rd_rdata   [NCH],
  input  logic              rd_rlast   [NCH],
  // HBM result write channel (AXI4, single-beat bursts, all strobes set)
  output logic              wr_awvalid,
  input  logic              wr_awready,
  output logic [AXI_AW-1:0] wr_awaddr,
  output logic              wr_wvalid,
  input  logic              wr_wready,
  output logic [BEAT_W-1:0] wr_wdata,
  output logic              wr_wlast,
  input  logic              wr_bvalid,
  output logic              wr_bready
);

  initial assert (NQ % NCH == 0) else $error("NQ must be a multiple of NCH");

  // ------------------------------------------------------------------
  // control registers and configuration latched at start
  cfar_cfg_t cfg_host, cfg;
  logic      start, kdone, kbusy;

  ctrl_regs u_regs (
    .clk, .rst_n,
    .awvalid(s_awvalid), .awready(s_awready), .awaddr(s_awaddr),
    .wvalid (s_wvalid),  .wready (s_wready),  .wdata (s_wdata),
    .bvalid (s_bvalid),  .bready (s_bready),
    .arvalid(s_arvalid), .arready(s_arready), .araddr(s_araddr),
    .rvalid (s_rvalid),  .rready (s_rready),  .rdata (s_rdata),
    .cfg(cfg_host), .start, .busy(kbusy), .done(kdone), .irq
  );

  logic [HALF_W:0]    win_w, win_h;
  logic [NBG_W-1:0]   n_bg;
  logic [2*K_W-1:0]   k2;
  logic [DIM_W-1:0]   row_beats;
  logic [31:0]        img_pitch, mask_pitch;
  logic               cfg_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '0; win_w <= '0; win_h <= '0; n_bg <= '0; k2 <= '0;
      row_beats <= '0; img_pitch <= '0; mask_pitch <= '0; cfg_ok <= 1'b0;
    end else if (start) begin
      logic [HALF_W:0] ww, wh, gw, gh;
      ww = {cfg_host.win_hw, 1'b1};
      wh = {cfg_host.win_hh, 1'b1};
      gw = {cfg_host.grd_hw, 1'b1};
      gh = {cfg_host.grd_hh, 1'b1};
      cfg        <= cfg_host;
      win_w      <= ww;
      win_h      <= wh;
      n_bg       <= NBG_W'(32'(ww) * 32'(wh) - 32'(gw) * 32'(gh));
      k2         <= 32'(cfg_host.k_q88) * 32'(cfg_host.k_q88);
      row_beats  <= DIM_W'((32'(cfg_host.width) + PIX_PER_BEAT - 1) >> PPB_LOG2);
      img_pitch  <= ((32'(cfg_host.width) + 255) >> 8) << 9;
      mask_pitch <= ((32'(cfg_host.width) + 255) >> 8) << 5;
      cfg_ok     <= (32'(wh) <= NQ) && (cfg_host.grd_hw < cfg_host.win_hw) &&
                    (cfg_host.grd_hh < cfg_host.win_hh);
    end
  end

  // ------------------------------------------------------------------
  // window sequencer state
  seq_state_e        st;
  logic [DIM_W-1:0]  r, c, zc;
  logic [HALF_W:0]   j;
  logic [1:0]        ph;
  logic [DIM_W-1:0]  r0, r0_div;
  logic [MOD_W-1:0]  r0_mod;
  logic [SEL_W-1:0]  r0_divq;
  logic [QI_W-1:0]   top_q;
  logic              en;            // pipeline advances (result writer ready)
  logic              ch_busy_any;
  logic              row_go;
  logic              wr_done;

  assign kbusy  = (st != S_IDLE);
  assign row_go = (st == S_GO);

  // row of the current target has a full window
  wire row_valid = cfg_ok && (32'(cfg.width) >= 32'(win_w)) &&
                   (r >= DIM_W'(cfg.win_hh)) &&
                   (32'(r) + 32'(cfg.win_hh) < 32'(cfg.height));
  wire last_row  = (r == cfg.height - 1'b1);
  wire last_col_z = (zc == cfg.width - 1'b1);

  // what the sequencer would emit this cycle
  logic             emit, need_read;
  logic [DIM_W-1:0] rd_col;
  mask_mode_e       rd_mode;
  pipe_meta_t       meta;

  always_comb begin
    emit      = 1'b0;
    need_read = 1'b0;
    rd_col    = '0;
    rd_mode   = MASK_FULL;
    meta      = '0;
    unique case (st)
      S_ZROW, S_LEFT, S_RIGHT: begin
        emit     = (st != S_LEFT) || (zc < DIM_W'(cfg.win_hw));
        meta.op  = OP_ZERO;
        meta.eol = (st != S_LEFT) && last_col_z;
        meta.eof = meta.eol && last_row;
      end
      S_INIT: begin
        emit      = 1'b1;
        need_read = 1'b1;
        rd_col    = DIM_W'(j);
        rd_mode   = ((j + HALF_W'(cfg.grd_hw) >= (HALF_W+1)'(cfg.win_hw)) &&
                     (j <= (HALF_W+1)'(cfg.win_hw) + (HALF_W+1)'(cfg.grd_hw)))
                    ? MASK_FRAME : MASK_FULL;
        meta.op    = OP_ADD;
        meta.clear = (j == '0);
      end
      S_TGT: begin
        emit      = 1'b1;
        need_read = 1'b1;
        rd_col    = c;
        rd_mode   = MASK_TARGET;
        meta.op   = OP_TARGET;
        meta.eol  = (c == cfg.width - 1'b1);
        meta.eof  = meta.eol && last_row;
      end
      S_UPD: begin
        emit      = 1'b1;
        need_read = 1'b1;
        unique case (ph)
          2'd0: begin rd_col = c - DIM_W'(cfg.win_hw);       rd_mode = MASK_FULL; meta.op = OP_SUB; end
          2'd1: begin rd_col = c - DIM_W'(cfg.grd_hw);       rd_mode = MASK_BAND; meta.op = OP_ADD; end
          2'd2: begin rd_col = c + DIM_W'(cfg.grd_hw) + 1'b1; rd_mode = MASK_BAND; meta.op = OP_SUB; end
          default: begin rd_col = c + DIM_W'(cfg.win_hw) + 1'b1; rd_mode = MASK_FULL; meta.op = OP_ADD; end
        endcase
      end
      default: ;
    endcase
    meta.valid = emit;
  end

  // column rd_col present in every queue of the window?
  logic [DIM_W-1:0] q_rx     [NQ];
  logic             q_act    [NQ];
  logic             col_ready;
  always_comb begin
    col_ready = 1'b1;
    for (int q = 0; q < NQ; q++)
      if (q_act[q] && (q_rx[q] <= (rd_col >> PPB_LOG2))) col_ready = 1'b0;
  end

  wire issue   = en && emit && (!need_read || col_ready);
  wire rd_en   = issue && need_read;

  // oldest pixel group still to be read (queue room for the read channels)
  wire [DIM_W-1:0] lo_beat = (st == S_TGT || st == S_UPD)
                             ? DIM_W'((c - DIM_W'(cfg.win_hw)) >> PPB_LOG2) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE; r <= '0; c <= '0; zc <= '0; j <= '0; ph <= '0;
      r0 <= '0; r0_div <= '0; r0_mod <= '0; r0_divq <= '0; top_q <= '0;
      kdone <= 1'b0;
    end else begin
      kdone <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin r <= '0; st <= S_ROW; end
        S_ROW: begin
          zc <= '0;
          if (row_valid) begin
            if (r == DIM_W'(cfg.win_hh)) begin
              r0 <= '0; r0_div <= '0; r0_mod <= '0; r0_divq <= '0; top_q <= '0;
            end else begin
              r0    <= r0 + 1'b1;
              top_q <= (32'(top_q) == NQ - 1) ? '0 : top_q + 1'b1;
              if (32'(r0_mod) == NCH - 1) begin
                r0_mod  <= '0;
                r0_div  <= r0_div + 1'b1;
                r0_divq <= (32'(r0_divq) == QPC - 1) ? '0 : r0_divq + 1'b1;
              end else begin
                r0_mod <= r0_mod + 1'b1;
              end
            end
            st <= S_WAIT;
          end else begin
            st <= S_ZROW;
          end
        end
        S_WAIT: if (!ch_busy_any) st <= S_GO;
        S_GO:   st <= S_LEFT;
        S_LEFT: begin
          if (zc >= DIM_W'(cfg.win_hw)) begin
            j  <= '0;
            st <= S_INIT;
          end else if (issue) zc <= zc + 1'b1;
        end
        S_INIT: if (issue) begin
          j <= j + 1'b1;
          if (j == win_w - 1'b1) begin
            c  <= DIM_W'(cfg.win_hw);
            st <= S_TGT;
          end
        end
        S_TGT: if (issue) begin
          if (32'(c) + 32'(cfg.win_hw) + 1 < 32'(cfg.width)) begin
            ph <= '0;
            st <= S_UPD;
          end else if (c == cfg.width - 1'b1) begin
            st <= last_row ? S_FLUSH : S_ROW;
            r  <= r + 1'b1;
          end else begin
            zc <= c + 1'b1;
            st <= S_RIGHT;
          end
        end
        S_UPD: if (issue) begin
          ph <= ph + 1'b1;
          if (ph == 2'd3) begin
            c  <= c + 1'b1;
            st <= S_TGT;
          end
        end
        S_RIGHT, S_ZROW: if (issue) begin
          zc <= zc + 1'b1;
          if (last_col_z) begin
            st <= last_row ? S_FLUSH : S_ROW;
            r  <= r + 1'b1;
          end
        end
        S_FLUSH: if (wr_done) begin
          kdone <= 1'b1;
          st    <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // HBM read channels and their sparse connection to the queues
  logic              ch_we    [NCH];
  logic [SEL_W-1:0]  ch_sel   [NCH];
  logic [WA_W-1:0]   ch_waddr [NCH];
  logic [BEAT_W-1:0] ch_wdata [NCH];
  logic              ch_busy  [NCH];

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    logic [DIM_W-1:0] rx  [QPC];
    logic             act [QPC];
    hbm_read_channel #(
      .NQ(NQ), .NCH(NCH), .CH(ch), .BURST(BURST), .MAX_OUT(MAX_OUT), .QDEPTH(QDEPTH)
    ) u_rd (
      .clk, .rst_n,
      .row_go, .r0, .r0_div, .r0_mod, .r0_divq,
      .win_h, .height(cfg.height), .row_beats, .pitch(img_pitch),
      .img_base(cfg.img_base), .lo_beat,
      .arvalid(rd_arvalid[ch]), .arready(rd_arready[ch]),
      .araddr (rd_araddr[ch]),  .arlen  (rd_arlen[ch]),
      .rvalid (rd_rvalid[ch]),  .rready (rd_rready[ch]),
      .rdata  (rd_rdata[ch]),   .rlast  (rd_rlast[ch]),
      .wr_en(ch_we[ch]), .wr_sel(ch_sel[ch]), .wr_addr(ch_waddr[ch]),
      .wr_data(ch_wdata[ch]),
      .rx_beats(rx), .q_active(act), .busy(ch_busy[ch])
    );
    for (genvar jj = 0; jj < QPC; jj++) begin : g_q
      assign q_rx[ch + NCH * jj]  = rx[jj];
      assign q_act[ch + NCH * jj] = act[jj];
    end
  end

  always_comb begin
    ch_busy_any = 1'b0;
    for (int ch = 0; ch < NCH; ch++) ch_busy_any |= ch_busy[ch];
  end

  logic              q_we    [NQ];
  logic [WA_W-1:0]   q_waddr [NQ];
  logic [BEAT_W-1:0] q_wdata [NQ];

  hbm_bram_router #(.NQ(NQ), .NCH(NCH), .WA_W(WA_W), .DATA_W(BEAT_W)) u_router (
    .ch_we, .ch_sel, .ch_waddr, .ch_wdata, .q_we, .q_waddr, .q_wdata
  );

  // ------------------------------------------------------------------
  // pixel cache and threshold pipeline
  logic [PIX_W-1:0] col_pix [NQ];
  pipe_meta_t       meta_c;

  pixel_cache #(.NQ(NQ), .DEPTH_PIX(DEPTH_PIX)) u_cache (
    .clk,
    .q_we, .q_waddr, .q_wdata,
    .rd_en, .rd_col, .rd_mode, .top_q, .win_h,
    .hh(cfg.win_hh), .gh(cfg.grd_hh),
    .col_pix
  );

  // metadata travels beside the cache read (one cycle)
  always_ff @(posedge clk) begin
    if (!rst_n)  meta_c <= '0;
    else if (en) meta_c <= issue ? meta : '0;
  end

  pipe_meta_t p_meta;
  logic       p_det;

  cfar_pipeline #(.NQ(NQ), .GROUP(NCH)) u_pipe (
    .clk, .rst_n, .en,
    .in_meta(meta_c), .in_pix(col_pix), .n_bg, .k2,
    .out_meta(p_meta), .out_det(p_det)
  );

  // ------------------------------------------------------------------
  // result mask writer
  wire res_valid = p_meta.valid && (p_meta.op == OP_TARGET || p_meta.op == OP_ZERO);

  // the writer restarts one cycle after START, once the configuration is latched
  logic start_d;
  always_ff @(posedge clk) start_d <= rst_n && start;

  mask_writer u_wr (
    .clk, .rst_n, .start(start_d),
    .mask_base(cfg.mask_base), .mask_pitch(mask_pitch),
    .in_valid(res_valid), .in_det(p_det), .in_eol(p_meta.eol), .in_eof(p_meta.eof),
    .in_ready(en),
    .awvalid(wr_awvalid), .awready(wr_awready), .awaddr(wr_awaddr),
    .wvalid (wr_wvalid),  .wready (wr_wready),  .wdata (wr_wdata), .wlast(wr_wlast),
    .bvalid (wr_bvalid),  .bready (wr_bready),
    .done(wr_done)
  );

endmodule
