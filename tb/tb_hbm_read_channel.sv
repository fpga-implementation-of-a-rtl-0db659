// tb_hbm_read_channel: checks one read channel (channel 1 of 4, 12 queues,
// 4-beat bursts, 8-beat queues) against the behavioural HBM model.
// For a series of window positions it computes independently which image
// row each of the channel's three queues must hold and whether that row lies
// in the window, then lets the channel run while the testbench advances the
// oldest needed beat (lo_beat) in random steps.  Every beat written to a
// queue must carry the right pixels, go to the right circular address, and
// never overwrite a beat at or after lo_beat; inactive queues get nothing;
// all beats of active rows arrive; the channel goes idle.
module tb_hbm_read_channel;
  import cfar_pkg::*;
  localparam int NQ = 12, NCH = 4, CH = 1, QPC = NQ / NCH, QD = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        row_go = 0;
  logic [15:0] r0 = 0, r0_div = 0, height, row_beats, lo_beat = 0;
  logic [1:0]  r0_mod = 0, r0_divq = 0;
  logic [9:0]  win_h = 0;
  logic [31:0] pitch;
  logic [63:0] img_base = 64'h2000;
  logic        arvalid, arready, rvalid, rready, rlast;
  logic [63:0] araddr;
  logic [7:0]  arlen;
  logic [255:0] rdata;
  logic        wr_en;
  logic [1:0]  wr_sel;
  logic [2:0]  wr_addr;
  logic [255:0] wr_data;
  logic [15:0] rx_beats [QPC];
  logic        q_active [QPC];
  logic        busy;

  int unsigned seed = 5, width = 200;
  int          m_err, m_bursts;
  int checks = 0, failures = 0, n_room_wait = 0;

  assign height    = 16'd64;
  assign row_beats = 16'((width + 15) / 16);
  assign pitch     = 512;

  hbm_read_channel #(.NQ(NQ), .NCH(NCH), .CH(CH), .BURST(4), .MAX_OUT(4), .QDEPTH(QD)) u_dut (.*);

  hbm_rd_model #(.NCH(NCH), .CH(CH), .MAX_LAT(6)) u_mem (
    .clk, .seed, .base(longint'(img_base)), .pitch(pitch), .width, .height(int'(height)),
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast,
    .errors(m_err), .bursts(m_bursts)
  );

  int exp_row [QPC];
  bit exp_act [QPC];
  int got [QPC];

  always @(posedge clk) if (rst_n && wr_en) begin
    int j, b, y;
    logic [255:0] e;
    j = int'(wr_sel);
    b = got[j];
    y = exp_row[j];
    for (int i = 0; i < 16; i++)
      e[16*i +: 16] = (16 * b + i < width) ? cfar_tb_pkg::pix(seed, y, 16 * b + i) : 16'd0;
    checks++;
    if (!exp_act[j] || wr_data != e || int'(wr_addr) != b % QD || b >= int'(lo_beat) + QD) begin
      failures++;
      if (failures < 10) $display("FAIL j=%0d beat %0d row %0d act %0b addr %0d lo %0d", j, b, y, exp_act[j], wr_addr, lo_beat);
    end
    got[j] = got[j] + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pos = 0; pos < 30; pos++) begin
      int r, h;
      r = pos;
      h = (pos % 3 == 0) ? 11 : ((pos % 3 == 1) ? 7 : 3);
      // expected row for each queue of this channel
      for (int j = 0; j < QPC; j++) begin
        exp_act[j] = 0;
        got[j] = 0;
        for (int y = r; y < r + NQ; y++)
          if (y % NCH == CH && y % NQ == CH + NCH * j) begin
            exp_row[j] = y;
            exp_act[j] = (y - r < h) && (y < 64);
          end
      end
      @(negedge clk);
      r0 = 16'(r); r0_div = 16'(r / NCH); r0_mod = 2'(r % NCH); r0_divq = 2'((r / NCH) % QPC);
      win_h = 10'(h); lo_beat = 0; row_go = 1;
      @(negedge clk);
      row_go = 0;
      // advance the consumer pointer while data comes in
      while (lo_beat < row_beats) begin
        bit all_in;
        repeat ($urandom_range(12, 1)) @(negedge clk);
        all_in = 1;
        for (int j = 0; j < QPC; j++)
          if (exp_act[j] && got[j] < int'(row_beats) && got[j] < int'(lo_beat) + QD) all_in = 0;
        if (all_in) lo_beat = lo_beat + 16'($urandom_range(2, 1));
        else n_room_wait++;
      end
      while (busy) @(negedge clk);
      for (int j = 0; j < QPC; j++) begin
        checks++;
        if (got[j] != (exp_act[j] ? int'(row_beats) : 0) || int'(rx_beats[j]) != got[j] ||
            q_active[j] != exp_act[j]) begin
          failures++;
          $display("FAIL pos %0d queue %0d got %0d beats act %0b", pos, j, got[j], q_active[j]);
        end
      end
    end
    checks++;
    if (m_err != 0 || n_room_wait == 0) begin failures++; $display("FAIL model errors %0d", m_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
