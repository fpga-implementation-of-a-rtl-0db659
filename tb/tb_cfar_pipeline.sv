// tb_cfar_pipeline: checks the threshold pipeline with 12 pixels per column.
// Random columns are added to and subtracted from the running sums (never
// below zero), cleared, and followed by pixels under test; border pixels
// are mixed in.  The testbench keeps its own sums and decides each pixel
// with 128-bit arithmetic from x > mean + k*std written as
// d > 0 and d^2 * 2^16 > k^2 (N*Q - S^2), d = N*x - S.  Outputs must come in
// order, exactly six enabled cycles after their input, also with random
// stalls (en=0).
module tb_cfar_pipeline;
  import cfar_pkg::*;
  localparam int NQ = 12;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  pipe_meta_t       in_meta = '0, out_meta;
  logic [15:0]      in_pix [NQ];
  logic [19:0]      n_bg = 0;
  logic [31:0]      k2 = 0;
  logic             out_det;
  int checks = 0, failures = 0, n_det = 0, n_clear = 0, n_stall = 0;

  cfar_pipeline #(.NQ(NQ), .GROUP(5)) u_dut (.*);

  typedef struct { bit is_target; bit det; int tag; } exp_t;
  exp_t   expq[$];
  longint in_cnt [$];
  longint en_cycles = 0;
  logic [127:0] S, Q;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: count enabled cycles between input and output
  always @(posedge clk) if (rst_n && en) begin
    en_cycles <= en_cycles + 1;
    if (out_meta.valid && (out_meta.op == OP_TARGET || out_meta.op == OP_ZERO)) begin
      exp_t e;
      longint t0;
      e  = expq.pop_front();
      t0 = in_cnt.pop_front();
      checks++;
      if (out_det != e.det || en_cycles - t0 != 6) begin
        failures++;
        if (failures < 10) $display("FAIL tag %0d det %0b exp %0b latency %0d", e.tag, out_det, e.det, en_cycles - t0);
      end
      if (e.det) n_det++; else n_clear++;
    end
  end

  // pixel under test: far above, far below, or within a few counts of the
  // threshold mean + k*std of the current sums
  function automatic logic [15:0] target_value();
    real mu, var_, t;
    int  v;
    case ($urandom_range(3))
      0: return 16'($urandom_range(65535));
      1: return 16'($urandom_range(400, 50));
      default: begin
        mu   = real'(S) / real'(n_bg);
        var_ = real'(Q) / real'(n_bg) - mu * mu;
        if (var_ < 0.0) var_ = 0.0;
        t    = mu + $sqrt(real'(k2)) / 256.0 * $sqrt(var_);
        v    = int'(t) + $urandom_range(6) - 3;
        if (v < 0) v = 0;
        if (v > 65535) v = 65535;
        return 16'(v);
      end
    endcase
  endfunction

  task automatic push(input pipe_op_e op, input bit clear, input int target_q);
    logic [127:0] cs, cq;
    @(negedge clk);
    while ($urandom_range(5) == 0) begin en = 0; n_stall++; @(negedge clk); end
    en = 1;
    cs = 0; cq = 0;
    for (int i = 0; i < NQ; i++) begin
      if (op == OP_TARGET) in_pix[i] = (i == target_q) ? target_value() : 16'd0;
      else if (op == OP_SUB) in_pix[i] = 16'($urandom_range(int'(S < 128'(NQ * 200) ? 0 : 150)));
      else in_pix[i] = 16'(($urandom_range(20) == 0) ? $urandom_range(9000) : $urandom_range(300, 50));
      cs += 128'(in_pix[i]);
      cq += 128'(in_pix[i]) * 128'(in_pix[i]);
    end
    if (op == OP_SUB) begin
      // keep the running sums non-negative: subtract only what was added
      if (cs > S || cq > Q) begin
        foreach (in_pix[i]) in_pix[i] = 0;
        cs = 0; cq = 0;
      end
    end
    in_meta = '{valid: 1'b1, op: op, clear: clear, eol: 1'b0, eof: 1'b0};
    if (clear) begin S = 0; Q = 0; end
    case (op)
      OP_ADD: begin S += cs; Q += cq; end
      OP_SUB: begin S -= cs; Q -= cq; end
      OP_TARGET: begin
        exp_t e;
        logic [127:0] x, d, lhs, rhs;
        x = cs;
        e.is_target = 1;
        if (128'(n_bg) * x > S) begin
          d = 128'(n_bg) * x - S;
          lhs = (d * d) << 16;
          // N*Q < S^2 cannot happen for a real window; the synthetic sums
          // here may produce it, and a negative variance counts as zero
          rhs = (128'(n_bg) * Q > S * S) ? 128'(k2) * (128'(n_bg) * Q - S * S) : 128'd0;
          e.det = lhs > rhs;
        end else e.det = 0;
        e.tag = expq.size();
        expq.push_back(e);
        in_cnt.push_back(en_cycles);
      end
      default: begin
        exp_t e;
        e.is_target = 0; e.det = 0; e.tag = -1;
        expq.push_back(e);
        in_cnt.push_back(en_cycles);
      end
    endcase
    @(negedge clk);
    in_meta = '0;
  endtask

  initial begin
    foreach (in_pix[i]) in_pix[i] = 0;
    S = 0; Q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      int ncol;
      // N and k are constant during an image: drain before changing them
      @(negedge clk); en = 1; in_meta = '0;
      repeat (8) @(negedge clk);
      n_bg = 20'(NQ * $urandom_range(8, 2));
      k2   = 32'($urandom_range(16'h0400, 16'h0080)) ** 2;
      ncol = n_bg / NQ;
      for (int c = 0; c < ncol; c++) push(OP_ADD, c == 0, 0);
      for (int p = 0; p < 20; p++) begin
        push(OP_TARGET, 0, $urandom_range(NQ - 1));
        if ($urandom_range(4) == 0) push(OP_ZERO, 0, 0);
        push(OP_SUB, 0, 0);
        push(OP_ADD, 0, 0);
      end
    end
    @(negedge clk); en = 1; in_meta = '0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_det == 0 || n_clear == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL left %0d det %0d clear %0d stall %0d", expq.size(), n_det, n_clear, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
