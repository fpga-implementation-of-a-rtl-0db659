// tb_mask_writer: checks the result writer.  Random detection bits for
// several images (widths below, at and above one 256-pixel beat) are fed in
// raster order with random gaps; the AXI write model applies random and long
// back-pressure.  The memory must then hold every bit at
// base + row*ceil(width/256)*32 + (x/256)*32, bit x mod 256, with padding
// bits zero; done must rise only after the last write response; in_ready
// must have dropped at least once.
module tb_mask_writer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0;
  logic [63:0] mask_base = 64'h8000;
  logic [31:0] mask_pitch;
  logic        in_valid = 0, in_det = 0, in_eol = 0, in_eof = 0, in_ready;
  logic        awvalid, awready, wvalid, wready, wlast, bvalid, bready, done;
  logic [63:0] awaddr;
  logic [255:0] wdata;
  logic        stall_long = 1;
  int          writes, werr;
  int checks = 0, failures = 0, n_notready = 0;

  mask_writer u_dut (.*);
  hbm_wr_model u_mem (.clk, .stall_long, .awvalid, .awready, .awaddr, .wvalid, .wready,
                      .wdata, .wlast, .bvalid, .bready, .writes, .errors(werr));

  always @(posedge clk) if (in_valid && !in_ready) n_notready++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths [3] = '{100, 256, 600};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (widths[t]) begin
      int w, h;
      bit bits [];
      w = widths[t];
      h = 7;
      bits = new[w * h];
      foreach (bits[i]) bits[i] = ($urandom_range(3) == 0);
      mask_base  = 64'h8000 + 64'(t) * 64'h10000;
      mask_pitch = 32'((w + 255) / 256 * 32);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < w * h; i++) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid = 1; in_det = bits[i]; in_eol = (i % w == w - 1); in_eof = (i == w * h - 1);
        do @(posedge clk); while (!in_ready);
        @(negedge clk);
        in_valid = 0;
        if (i < w * h - 1) begin
          checks++;
          if (done) failures++;
        end
      end
      while (!done) @(negedge clk);
      for (int y = 0; y < h; y++)
        for (int x = 0; x < (w + 255) / 256 * 256; x++) begin
          logic [255:0] b;
          bit exp;
          b = u_mem.read_beat(longint'(mask_base) + longint'(y * int'(mask_pitch) + (x / 256) * 32));
          exp = (x < w) ? bits[y * w + x] : 1'b0;
          checks++;
          if (b[x % 256] != exp) begin
            failures++;
            if (failures < 10) $display("FAIL w=%0d y=%0d x=%0d", w, y, x);
          end
        end
    end
    checks++;
    if (n_notready == 0 || werr != 0) begin failures++; $display("FAIL notready %0d werr %0d", n_notready, werr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
