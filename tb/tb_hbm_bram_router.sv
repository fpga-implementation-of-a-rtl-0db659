// tb_hbm_bram_router: checks the sparse channel-to-queue wiring at the
// default size (30 channels, 300 queues).  Random writes on random channels
// must reach exactly queue ch + 30*j with the channel's address and data;
// every other queue must see no write.
module tb_hbm_bram_router;
  localparam int NQ = 300, NCH = 30, QPC = NQ / NCH;
  logic         ch_we [NCH];
  logic [3:0]   ch_sel [NCH];
  logic [8:0]   ch_waddr [NCH];
  logic [255:0] ch_wdata [NCH];
  logic         q_we [NQ];
  logic [8:0]   q_waddr [NQ];
  logic [255:0] q_wdata [NQ];
  int checks = 0, failures = 0;

  hbm_bram_router #(.NQ(NQ), .NCH(NCH), .WA_W(9), .DATA_W(256)) u_dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int c = 0; c < NCH; c++) begin
        ch_we[c]    = ($urandom_range(1) == 1);
        ch_sel[c]   = 4'($urandom_range(QPC - 1));
        ch_waddr[c] = 9'($urandom);
        for (int i = 0; i < 8; i++) ch_wdata[c][32*i +: 32] = $urandom;
      end
      #1;
      for (int q = 0; q < NQ; q++) begin
        int c, j;
        bit exp;
        c = q % NCH;
        j = q / NCH;
        exp = ch_we[c] && (int'(ch_sel[c]) == j);
        checks++;
        if (q_we[q] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d we=%0b exp %0b", q, q_we[q], exp);
        end
        if (exp) begin
          checks++;
          if (q_waddr[q] != ch_waddr[c] || q_wdata[q] != ch_wdata[c]) failures++;
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
