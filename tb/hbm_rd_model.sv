// hbm_rd_model: behavioural model of one HBM pseudo-channel seen through its
// AXI4 read port (the memory controller and DRAM are not modelled).
//
// The channel holds local rows m of the partitioned image: byte
// base + m*pitch + 2*x is pixel x of image row y = m*NCH + CH, generated by
// cfar_tb_pkg::pix (zero beyond the row width).  Address requests are
// accepted with random back-pressure, answered in order after a random
// latency of up to MAX_LAT cycles, with random gaps between data beats.
// It counts protocol errors: bursts crossing a 4 KiB boundary and addresses
// outside the image.
module hbm_rd_model #(
  parameter int unsigned NCH     = 30,
  parameter int unsigned CH      = 0,
  parameter int unsigned MAX_LAT = 20
) (
  input  logic         clk,
  input  int unsigned  seed,
  input  longint       base,
  input  int unsigned  pitch,
  input  int unsigned  width,
  input  int unsigned  height,
  input  logic         arvalid,
  output logic         arready,
  input  logic [63:0]  araddr,
  input  logic [7:0]   arlen,
  output logic         rvalid,
  input  logic         rready,
  output logic [255:0] rdata,
  output logic         rlast,
  output int           errors,
  output int           bursts
);

  typedef struct { longint addr; int len; longint due; } req_t;
  req_t   q[$];
  longint cyc;
  int     beat;

  function automatic logic [255:0] beat_data(longint addr);
    logic [255:0] d;
    longint off;
    int unsigned m, x0, y;
    off = addr - base;
    m   = int'(off / pitch);
    x0  = int'((off % pitch) / 2);
    y   = m * NCH + CH;
    for (int i = 0; i < 16; i++)
      d[16*i +: 16] = (x0 + i < width) ? cfar_tb_pkg::pix(seed, y, x0 + i) : 16'd0;
    return d;
  endfunction

  initial begin
    cyc = 0; beat = 0; errors = 0; bursts = 0;
    arready = 1'b0; rvalid = 1'b0; rdata = '0; rlast = 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (arvalid && arready) begin
      req_t t;
      t.addr = longint'(araddr);
      t.len  = int'(arlen) + 1;
      t.due  = cyc + 2 + longint'($urandom_range(MAX_LAT));
      if ((t.addr & 4095) + 32 * t.len > 4096) begin
        errors <= errors + 1;
        $display("hbm_rd_model %0d: burst at %h, %0d beats, crosses 4 KiB", CH, t.addr, t.len);
      end
      if (t.addr < base || (t.addr - base) / pitch * NCH + CH >= height) begin
        errors <= errors + 1;
        $display("hbm_rd_model %0d: address %h outside the image", CH, t.addr);
      end
      q.push_back(t);
      bursts <= bursts + 1;
    end
    arready <= ($urandom_range(3) != 0);
    if (rvalid && rready) begin
      if (rlast) begin
        void'(q.pop_front());
        beat = 0;
      end else beat = beat + 1;
    end
    if (!rvalid || rready) begin
      if (q.size() != 0 && q[0].due <= cyc && $urandom_range(4) != 0) begin
        rvalid <= 1'b1;
        rdata  <= beat_data(q[0].addr + 32 * beat);
        rlast  <= (beat == q[0].len - 1);
      end else begin
        rvalid <= 1'b0;
      end
    end
  end

endmodule
