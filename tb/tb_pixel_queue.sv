// tb_pixel_queue: checks the asymmetric block-RAM queue at its default size
// (8192 pixels, 256-bit writes, 16-bit reads).  Fills every word with random
// beats, reads random pixels and compares them, one cycle after the read,
// with a copy kept in the testbench; checks that the output holds while no
// read is requested and that a rewritten word returns the new data.
module tb_pixel_queue;
  localparam int DEPTH = 8192, WR = 16, NW = DEPTH / WR;
  logic clk = 0;
  always #5 clk = ~clk;
  logic           we = 0, re = 0;
  logic [8:0]     waddr = 0;
  logic [255:0]   wdata = 0;
  logic [12:0]    raddr = 0;
  logic [15:0]    rdata;
  logic [255:0]   model [NW];
  int checks = 0, failures = 0;

  pixel_queue u_dut (.*);

  function automatic logic [15:0] ref_pix(int a);
    return model[a / WR][16 * (a % WR) +: 16];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      logic [255:0] d;
      for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
      model[w] = d;
      @(negedge clk); we = 1; waddr = 9'(w); wdata = d;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); re = 1; raddr = 13'(a);
      // simultaneous write to another word
      we = ($urandom_range(3) == 0);
      if (we) begin
        int w;
        w = $urandom_range(NW - 1);
        if (w == a / WR) w = (w + 1) % NW;
        waddr = 9'(w);
        for (int i = 0; i < 8; i++) wdata[32*i +: 32] = $urandom;
        model[w] = wdata;
      end
      @(negedge clk); re = 0; we = 0;
      checks++;
      if (rdata !== ref_pix(a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, ref_pix(a));
      end
      // output holds without a read
      raddr = 13'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== ref_pix(a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
