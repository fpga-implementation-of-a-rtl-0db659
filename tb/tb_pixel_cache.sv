// tb_pixel_cache: checks the window cache with 12 queues of 256 pixels.
// Queue q is filled with a known pattern through its write port; random
// column reads with random window position (including windows that wrap
// around the end of the queue array), window and guard heights and mask
// modes are compared, one cycle later, against the rows the mode should let
// through, computed here from the window geometry.
module tb_pixel_cache;
  import cfar_pkg::*;
  localparam int NQ = 12, DEPTH = 256, NW = DEPTH / 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic           q_we [NQ];
  logic [3:0]     q_waddr [NQ];
  logic [255:0]   q_wdata [NQ];
  logic           rd_en = 0;
  logic [15:0]    rd_col = 0;
  mask_mode_e     rd_mode = MASK_FULL;
  logic [3:0]     top_q = 0;
  logic [9:0]     win_h = 0;
  logic [8:0]     hh = 0, gh = 0;
  logic [15:0]    col_pix [NQ];
  int checks = 0, failures = 0, n_wrap = 0;
  int mode_seen [4];

  pixel_cache #(.NQ(NQ), .DEPTH_PIX(DEPTH)) u_dut (.*);

  function automatic logic [15:0] patt(int q, int x);
    return 16'(q * 1000 + x + 1);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (q_we[q]) q_we[q] = 0;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      for (int q = 0; q < NQ; q++) begin
        q_we[q] = 1;
        q_waddr[q] = 4'(w);
        for (int i = 0; i < 16; i++) q_wdata[q][16*i +: 16] = patt(q, 16 * w + i);
      end
    end
    @(negedge clk);
    foreach (q_we[q]) q_we[q] = 0;
    for (int n = 0; n < 1500; n++) begin
      int t, h, g, x, m;
      h = $urandom_range(NQ / 2 - 1, 1);       // half height, window <= NQ-1 rows
      g = $urandom_range(h - 1, 0);
      t = $urandom_range(NQ - 1);
      x = $urandom_range(DEPTH - 1);
      m = $urandom_range(3);
      rd_en = 1; rd_col = 16'(x); top_q = 4'(t); hh = 9'(h); gh = 9'(g);
      win_h = 10'(2 * h + 1); rd_mode = mask_mode_e'(m);
      if (t + 2 * h + 1 > NQ) n_wrap++;
      mode_seen[m]++;
      @(negedge clk);
      rd_en = 0;
      for (int q = 0; q < NQ; q++) begin
        int rel;
        bit keep;
        rel = (q - t + NQ) % NQ;
        case (m)
          0: keep = rel <= 2 * h;
          1: keep = rel <= 2 * h && (rel < h - g || rel > h + g);
          2: keep = rel >= h - g && rel <= h + g;
          default: keep = rel == h;
        endcase
        checks++;
        if (col_pix[q] != (keep ? patt(q, x) : 16'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d mode=%0d top=%0d h=%0d g=%0d got %0d", q, m, t, h, g, col_pix[q]);
        end
      end
    end
    checks++;
    if (n_wrap == 0 || mode_seen[0] == 0 || mode_seen[1] == 0 || mode_seen[2] == 0 || mode_seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
