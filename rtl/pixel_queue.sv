// pixel_queue: one indexed queue of the pixel cache, a dual-port block RAM
// with asymmetric port widths.
//
// The write port takes a whole 256-bit HBM beat (16 pixels) per clock, the
// read port returns one 16-bit pixel per clock.  The queue holds DEPTH_PIX
// pixels (8192, i.e. 16 KiB, as in the document) of one image row and is used
// as a circular buffer: pixel column x of the row lives at index
// x mod DEPTH_PIX, so the read address is simply the low bits of the column.
// Keeping the circular write pointer and the fill level is the job of the
// channel that feeds the queue.
//
// Timing: write at the clock edge when we=1; read data is registered and
// appears one cycle after re=1, and holds while re=0 (block RAM output
// register).  The memory has no reset; its contents are defined once written.
module pixel_queue #(
  parameter int unsigned DEPTH_PIX = 8192,
  parameter int unsigned PIX_W     = 16,
  parameter int unsigned WR_PIX    = 16,
  localparam int unsigned NWORDS   = DEPTH_PIX / WR_PIX,
  localparam int unsigned WA_W     = $clog2(NWORDS),
  localparam int unsigned RA_W     = $clog2(DEPTH_PIX)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [WA_W-1:0]         waddr,
  input  logic [WR_PIX*PIX_W-1:0] wdata,
  input  logic                    re,
  input  logic [RA_W-1:0]         raddr,
  output logic [PIX_W-1:0]        rdata
);

  logic [WR_PIX-1:0][PIX_W-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr[RA_W-1:RA_W-WA_W]][raddr[RA_W-WA_W-1:0]];
  end

endmodule
