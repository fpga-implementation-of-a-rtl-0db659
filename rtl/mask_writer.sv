// mask_writer: packs the per-pixel detection results into 256-bit beats and
// writes them to HBM over the one AXI4 write channel reserved for results.
//
// Results arrive in raster order, one bit per pixel (1 = detected), with an
// end-of-row and an end-of-image flag.  256 consecutive bits of a row form
// one beat (bit i of the beat is pixel 256*b + i of the row); a row's last
// beat is zero-padded.  Row r is written at mask_base + r*mask_pitch,
// mask_pitch = ceil(width/256)*32 bytes.  Each beat is a single-beat AXI
// burst; finished beats queue in a FIFO of FIFO_DEPTH entries, and
// in_ready drops while it is full, which stalls the whole CFAR pipeline.
// done rises once the end-of-image beat has been written and every write
// response has come back, and stays high until start.
//
// That the result is one bit per pixel on a dedicated write channel is the
// document's; bit order, row layout and burst shape are this design's own.
module mask_writer
  import cfar_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,        // new image: reset position
  input  logic [AXI_AW-1:0] mask_base,
  input  logic [31:0]       mask_pitch,   // bytes per result row
  // result stream
  input  logic              in_valid,
  input  logic              in_det,
  input  logic              in_eol,
  input  logic              in_eof,
  output logic              in_ready,
  // AXI4 write address / data / response
  output logic              awvalid,
  input  logic              awready,
  output logic [AXI_AW-1:0] awaddr,
  output logic              wvalid,
  input  logic              wready,
  output logic [BEAT_W-1:0] wdata,
  output logic              wlast,
  input  logic              bvalid,
  output logic              bready,
  output logic              done
);

  localparam int unsigned PW = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic [AXI_AW-1:0] addr;
    logic [BEAT_W-1:0] data;
  } beat_t;

  beat_t             fifo [FIFO_DEPTH];
  logic [PW:0]       cnt;
  logic [PW-1:0]     wp, rp;
  logic [BEAT_W-1:0] pack;
  logic [7:0]        bitpos;
  logic [AXI_AW-1:0] row_addr, beat_addr;
  logic              aw_sent, w_sent, eof_seen;
  logic [15:0]       b_pend;

  assign in_ready = (32'(cnt) < FIFO_DEPTH);
  wire in_hs = in_valid && in_ready;
  wire push  = in_hs && (bitpos == 8'hFF || in_eol);

  wire aw_hs = awvalid && awready;
  wire w_hs  = wvalid && wready;
  wire pop   = (cnt != '0) && (aw_sent || aw_hs) && (w_sent || w_hs);

  assign awvalid = (cnt != '0) && !aw_sent;
  assign wvalid  = (cnt != '0) && !w_sent;
  assign awaddr  = fifo[rp].addr;
  assign wdata   = fifo[rp].data;
  assign wlast   = 1'b1;
  assign bready  = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      cnt       <= '0;
      wp        <= '0;
      rp        <= '0;
      pack      <= '0;
      bitpos    <= '0;
      row_addr  <= mask_base;
      beat_addr <= mask_base;
      aw_sent   <= 1'b0;
      w_sent    <= 1'b0;
      eof_seen  <= 1'b0;
      b_pend    <= '0;
      done      <= 1'b0;
    end else begin
      if (in_hs) begin
        logic [BEAT_W-1:0] nxt;
        nxt         = pack;
        nxt[bitpos] = in_det;
        if (push) begin
          fifo[wp] <= '{addr: beat_addr, data: nxt};
          wp       <= wp + 1'b1;
          pack     <= '0;
          bitpos   <= '0;
          if (in_eol) begin
            row_addr  <= row_addr + AXI_AW'(mask_pitch);
            beat_addr <= row_addr + AXI_AW'(mask_pitch);
          end else begin
            beat_addr <= beat_addr + AXI_AW'(BEAT_W / 8);
          end
        end else begin
          pack   <= nxt;
          bitpos <= bitpos + 1'b1;
        end
        if (in_eof) eof_seen <= 1'b1;
      end

      if (pop) begin
        rp      <= rp + 1'b1;
        aw_sent <= 1'b0;
        w_sent  <= 1'b0;
      end else begin
        if (aw_hs) aw_sent <= 1'b1;
        if (w_hs)  w_sent  <= 1'b1;
      end
      cnt    <= cnt + (PW+1)'(push) - (PW+1)'(pop);
      b_pend <= b_pend + 16'(pop) - 16'(bvalid && bready);
      if (eof_seen && cnt == '0 && b_pend == '0 && !in_hs) done <= 1'b1;
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                wvalid && !wready |=> wvalid && $stable(wdata));

endmodule
