// pixel_cache: the on-chip window cache in front of the CFAR pipeline.
//
// NQ indexed queues (pixel_queue, 300 by default) each hold part of one
// image row; image row y is always kept in queue y mod NQ, because the HBM
// channel that stores the row can only reach those queues.  A read names one
// image column; every queue returns its pixel of that column at once, so one
// read yields a whole column of the window.  Behind each queue a 2:1
// multiplexer passes the pixel or a zero.  The select is worked out from the
// queue's row position relative to the window, which starts at queue top_q
// and wraps around the end of the array, and from the read's mask mode:
//   MASK_FULL   rows 0 .. win_h-1 of the window
//   MASK_FRAME  those rows without the guard rows hh-gh .. hh+gh
//   MASK_BAND   only the guard rows
//   MASK_TARGET only row hh, the row of the pixel under test
// The queues, their widths and depth, the row-to-queue mapping, the wrap
// and the zeroing multiplexers follow the document; the four mask modes are
// this design's way of expressing which pixels one read contributes.
//
// Timing: one read per clock when rd_en=1; col_pix is valid the next cycle
// and holds while rd_en=0.  Writes come from hbm_bram_router, one beat per
// queue per clock.
module pixel_cache
  import cfar_pkg::*;
#(
  parameter int unsigned NQ        = 300,
  parameter int unsigned DEPTH_PIX = 8192,
  localparam int unsigned WA_W     = $clog2(DEPTH_PIX / PIX_PER_BEAT),
  localparam int unsigned RA_W     = $clog2(DEPTH_PIX),
  localparam int unsigned QI_W     = $clog2(NQ)
) (
  input  logic               clk,
  // write side, one port per queue
  input  logic               q_we    [NQ],
  input  logic [WA_W-1:0]    q_waddr [NQ],
  input  logic [BEAT_W-1:0]  q_wdata [NQ],
  // read side
  input  logic               rd_en,
  input  logic [DIM_W-1:0]   rd_col,
  input  mask_mode_e         rd_mode,
  input  logic [QI_W-1:0]    top_q,    // queue holding the window's top row
  input  logic [HALF_W:0]    win_h,    // window height in rows
  input  logic [HALF_W-1:0]  hh,       // window half height
  input  logic [HALF_W-1:0]  gh,       // guard half height
  output logic [PIX_W-1:0]   col_pix [NQ]
);

  logic [PIX_W-1:0] q_rdata [NQ];
  logic             keep_r  [NQ];

  for (genvar q = 0; q < NQ; q++) begin : g_q
    pixel_queue #(.DEPTH_PIX(DEPTH_PIX), .PIX_W(PIX_W), .WR_PIX(PIX_PER_BEAT)) u_queue (
      .clk   (clk),
      .we    (q_we[q]),
      .waddr (q_waddr[q]),
      .wdata (q_wdata[q]),
      .re    (rd_en),
      .raddr (rd_col[RA_W-1:0]),
      .rdata (q_rdata[q])
    );

    // row of the window that queue q holds for the current window position
    logic [QI_W:0] rel;
    logic          in_win, in_guard, keep;
    always_comb begin
      if (QI_W'(q) >= top_q) rel = (QI_W+1)'(q) - (QI_W+1)'(top_q);
      else                   rel = (QI_W+1)'(q) + (QI_W+1)'(NQ) - (QI_W+1)'(top_q);
      in_win   = (32'(rel) < 32'(win_h));
      in_guard = (32'(rel) + 32'(gh) >= 32'(hh)) && (32'(rel) <= 32'(hh) + 32'(gh));
      unique case (rd_mode)
        MASK_FULL:   keep = in_win;
        MASK_FRAME:  keep = in_win && !in_guard;
        MASK_BAND:   keep = in_guard;
        MASK_TARGET: keep = (32'(rel) == 32'(hh));
        default:     keep = 1'b0;
      endcase
    end

    always_ff @(posedge clk) begin
      if (rd_en) keep_r[q] <= keep;
    end

    assign col_pix[q] = keep_r[q] ? q_rdata[q] : '0;
  end

endmodule
