// hbm_bram_router: sparse connection of the HBM read channels to the write
// ports of the pixel-cache queues.
//
// Instead of a full crossbar from every read channel to every queue, read
// channel ch is wired only to queues ch, ch+NCH, ch+2*NCH, ... (with the
// document's sizes: channel 0 to BRAMs 0, 30, ..., 270).  Each channel
// presents one write per clock together with the local index j of the queue
// it targets; queue q = ch + NCH*j takes the beat when its channel writes and
// names it.  Data and address fan out unchanged; only the enables are decoded.
// Purely combinational.  The wiring rule is the document's; the
// (enable, local index) encoding of a channel's write is this design's own.
module hbm_bram_router #(
  parameter int unsigned NQ     = 300,
  parameter int unsigned NCH    = 30,
  parameter int unsigned WA_W   = 8,
  parameter int unsigned DATA_W = 256,
  localparam int unsigned QPC   = NQ / NCH,
  localparam int unsigned SEL_W = (QPC > 1) ? $clog2(QPC) : 1
) (
  input  logic              ch_we    [NCH],
  input  logic [SEL_W-1:0]  ch_sel   [NCH],
  input  logic [WA_W-1:0]   ch_waddr [NCH],
  input  logic [DATA_W-1:0] ch_wdata [NCH],
  output logic              q_we     [NQ],
  output logic [WA_W-1:0]   q_waddr  [NQ],
  output logic [DATA_W-1:0] q_wdata  [NQ]
);

  initial assert (NQ % NCH == 0) else $error("NQ must be a multiple of NCH");

  for (genvar q = 0; q < NQ; q++) begin : g_q
    localparam int unsigned CH = q % NCH;
    localparam int unsigned J  = q / NCH;
    assign q_we[q]    = ch_we[CH] && (ch_sel[CH] == SEL_W'(J));
    assign q_waddr[q] = ch_waddr[CH];
    assign q_wdata[q] = ch_wdata[CH];
  end

endmodule
