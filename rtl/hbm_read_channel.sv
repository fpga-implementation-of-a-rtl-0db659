// hbm_read_channel: AXI4 read master of one HBM pseudo-channel; keeps the
// pixel-cache queues it is wired to filled with their image rows.
//
// Image rows are spread over the NCH read channels: row y lives in channel
// y mod NCH as that channel's local row m = y div NCH, at byte address
// img_base + m*pitch (rows padded by the host to a multiple of 512 bytes).
// Channel CH can write only queues CH + NCH*j, j = 0..QPC-1, and row y
// always goes to queue y mod NQ, so queue j of this channel holds local row
// m with m mod QPC = j.
//
// On row_go (a new window position; the window's top row is r0, given as
// r0_div = r0 div NCH, r0_mod = r0 mod NCH and r0_divq = r0_div mod QPC) the
// channel works out which row each of its queues must hold, which of them
// lie inside the window (queue "active"), and restarts them all at column 0.
// It then issues INCR bursts of up to BURST 256-bit beats, round robin over
// the active queues that still have beats to fetch and room for them.  A
// queue holds QDEPTH beats as a circular buffer; a burst never reaches
// lo_beat + QDEPTH, so it cannot overwrite lo_beat, the oldest 16-pixel beat
// the CFAR sequencer may still read.  Bursts are cut short at the room left
// and at BURST-beat boundaries counted from the row start.  Rows start on
// 512-byte boundaries when IMG_BASE does, so with the default BURST = 16
// (512 bytes) no burst crosses a 4 KiB boundary; a larger BURST needs
// IMG_BASE and the row pitch aligned to BURST*32 bytes.  Read data is
// always accepted (rready=1) and written straight to the queue, in the order
// the bursts were issued (a tag FIFO of at most MAX_OUT outstanding bursts,
// single AXI ID).  rx_beats tells the sequencer how many beats of each
// queue's row have arrived.
//
// The partitioning of rows over channels and queues is the document's; the
// burst scheduling, flow control and address layout are this design's own.
module hbm_read_channel
  import cfar_pkg::*;
#(
  parameter int unsigned NQ      = 300,
  parameter int unsigned NCH     = 30,
  parameter int unsigned CH      = 0,
  parameter int unsigned BURST   = 16,
  parameter int unsigned MAX_OUT = 8,
  parameter int unsigned QDEPTH  = 256,  // beats per queue
  localparam int unsigned QPC    = NQ / NCH,
  localparam int unsigned SEL_W  = (QPC > 1) ? $clog2(QPC) : 1,
  localparam int unsigned MOD_W  = (NCH > 1) ? $clog2(NCH) : 1,
  localparam int unsigned WA_W   = $clog2(QDEPTH),
  localparam int unsigned TAG_W  = $clog2(MAX_OUT)
) (
  input  logic              clk,
  input  logic              rst_n,
  // window position and geometry
  input  logic              row_go,
  input  logic [DIM_W-1:0]  r0,
  input  logic [DIM_W-1:0]  r0_div,
  input  logic [MOD_W-1:0]  r0_mod,
  input  logic [SEL_W-1:0]  r0_divq,
  input  logic [HALF_W:0]   win_h,
  input  logic [DIM_W-1:0]  height,
  input  logic [DIM_W-1:0]  row_beats,  // beats per image row
  input  logic [31:0]       pitch,      // bytes between local rows
  input  logic [AXI_AW-1:0] img_base,
  input  logic [DIM_W-1:0]  lo_beat,
  // AXI4 read address / data
  output logic              arvalid,
  input  logic              arready,
  output logic [AXI_AW-1:0] araddr,
  output logic [7:0]        arlen,
  input  logic              rvalid,
  output logic              rready,
  input  logic [BEAT_W-1:0] rdata,
  input  logic              rlast,
  // to hbm_bram_router
  output logic              wr_en,
  output logic [SEL_W-1:0]  wr_sel,
  output logic [WA_W-1:0]   wr_addr,
  output logic [BEAT_W-1:0] wr_data,
  // status
  output logic [DIM_W-1:0]  rx_beats [QPC],
  output logic              q_active [QPC],
  output logic              busy
);

  initial assert (BURST <= QDEPTH && BURST <= 128 && (BURST & (BURST - 1)) == 0)
    else $error("BURST must be a power of two, at most 128 and QDEPTH");
  initial assert ((MAX_OUT & (MAX_OUT - 1)) == 0) else $error("MAX_OUT must be a power of two");

  logic [DIM_W-1:0]  m_row  [QPC];
  // geometry latched at row_go, so that a new image's configuration cannot
  // restart queues still marked active from the last row of the previous one
  logic [DIM_W-1:0]  rb_q;
  logic [31:0]       pitch_q;
  logic [AXI_AW-1:0] base_q;
  logic [DIM_W-1:0] issued [QPC];
  logic [SEL_W-1:0] rr;
  logic [SEL_W-1:0] tag_fifo [MAX_OUT];
  logic [TAG_W:0]   n_out;
  logic [TAG_W-1:0] wp, rp;

  // ---- eligibility of each queue for the next burst
  logic             elig [QPC];
  logic [DIM_W-1:0] blen [QPC];
  always_comb begin
    for (int j = 0; j < QPC; j++) begin
      logic [31:0] left, room, to_bnd, len;
      left    = 32'(rb_q) - 32'(issued[j]);
      room    = 32'(lo_beat) + QDEPTH - 32'(issued[j]);
      to_bnd  = BURST - (32'(issued[j]) % BURST);   // stay inside a BURST-aligned block
      len     = (left < to_bnd) ? left : to_bnd;
      len     = (room < len) ? room : len;
      blen[j] = DIM_W'(len);
      elig[j] = q_active[j] && (issued[j] < rb_q) &&
                (32'(issued[j]) < 32'(lo_beat) + QDEPTH);
    end
  end

  logic             pick_ok;
  logic [SEL_W-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 0; k < QPC; k++) begin
      int unsigned idx;
      idx = (32'(rr) + k) % QPC;
      if (!pick_ok && elig[idx]) begin
        pick_ok = 1'b1;
        pick    = SEL_W'(idx);
      end
    end
  end

  wire can_issue = !row_go && (!arvalid || arready) && pick_ok &&
                   (32'(n_out) < MAX_OUT);
  wire r_hs    = rvalid && rready;
  wire r_done  = r_hs && rlast;

  assign rready  = 1'b1;
  assign busy    = (n_out != '0) || arvalid;
  assign wr_en   = r_hs;
  assign wr_sel  = tag_fifo[rp];
  assign wr_addr = rx_beats[tag_fifo[rp]][WA_W-1:0];
  assign wr_data = rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      arvalid <= 1'b0;
      araddr  <= '0;
      arlen   <= '0;
      rr      <= '0;
      n_out   <= '0;
      wp      <= '0;
      rp      <= '0;
      rb_q    <= '0;
      pitch_q <= '0;
      base_q  <= '0;
      for (int j = 0; j < QPC; j++) begin
        m_row[j]    <= '0;
        issued[j]   <= '0;
        rx_beats[j] <= '0;
        q_active[j] <= 1'b0;
      end
      for (int t = 0; t < MAX_OUT; t++) tag_fifo[t] <= '0;
    end else begin
      if (arvalid && arready) arvalid <= 1'b0;

      if (row_go) begin
        // first local row of this channel inside [r0, r0 + NQ)
        logic [DIM_W-1:0] m_first;
        logic [SEL_W-1:0] m_fq;
        logic             carry;
        carry   = (MOD_W'(CH) < r0_mod);
        m_first = r0_div + DIM_W'(carry);
        m_fq    = (carry && (32'(r0_divq) == QPC - 1)) ? '0 : r0_divq + SEL_W'(carry);
        rb_q    <= row_beats;
        pitch_q <= pitch;
        base_q  <= img_base;
        for (int j = 0; j < QPC; j++) begin
          int unsigned dj;
          logic [31:0] y;
          dj = (j + QPC - 32'(m_fq)) % QPC;
          y  = (32'(m_first) + dj) * NCH + CH;
          m_row[j]    <= m_first + DIM_W'(dj);
          q_active[j] <= (y - 32'(r0) < 32'(win_h)) && (y < 32'(height));
          issued[j]   <= '0;
          rx_beats[j] <= '0;
        end
      end else begin
        if (can_issue) begin
          arvalid      <= 1'b1;
          araddr       <= base_q + AXI_AW'(m_row[pick]) * AXI_AW'(pitch_q) +
                          (AXI_AW'(issued[pick]) << 5);
          arlen        <= 8'(blen[pick] - 1'b1);
          issued[pick] <= issued[pick] + blen[pick];
          tag_fifo[wp] <= pick;
          wp           <= wp + 1'b1;
          rr           <= (32'(pick) == QPC - 1) ? '0 : pick + 1'b1;
        end
        if (r_hs) rx_beats[tag_fifo[rp]] <= rx_beats[tag_fifo[rp]] + 1'b1;
      end
      if (r_done) rp <= rp + 1'b1;
      n_out <= n_out + (TAG_W+1)'(can_issue) - (TAG_W+1)'(r_done);
    end
  end

  // AXI rule: the address channel holds its values until accepted.
  property p_ar_stable;
    @(posedge clk) disable iff (!rst_n)
      arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen);
  endproperty
  a_ar_stable: assert property (p_ar_stable);

  // No read data may arrive without an outstanding burst.
  a_r_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                 rvalid |-> n_out != '0);

endmodule
