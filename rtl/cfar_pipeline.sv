// cfar_pipeline: CA-CFAR threshold calculation and decision.
//
// Each input is one masked column of the window from the pixel cache (NQ
// pixels, zero where the cache masked the queue) together with an operation:
//   OP_ADD / OP_SUB  add / subtract the column's sum and sum of squares to
//                    the running window sums S and Q (clear=1 first zeroes
//                    them, which starts the full accumulation at a row start),
//   OP_TARGET        the column holds only the pixel under test x: decide it,
//   OP_ZERO          border pixel: emit "not detected".
// Updating S and Q by whole columns implements the running-sum optimisation:
// after the first pixel of a row, each next pixel needs only the columns that
// leave and enter the background frame.
//
// The decision is x > T with T = mu + k*sigma, mu = S/N, sigma^2 = Q/N - mu^2,
// N the number of background pixels.  It is evaluated without division or
// square root, exactly in integers:
//   d = N*x - S,  e = N*Q - S^2  (= N^2 sigma^2 >= 0)
//   detected  <=>  d > 0  and  d^2 * 2^16 > k^2 * e
// with k given as unsigned 8.8 fixed point and k2 = k^2 (16.16).  Equation
// and the running sums are the document's; this integer form, the fixed point
// format of k and the stage split are this design's choices.
//
// Timing: fully pipelined, one input per clock, LAT = 6 cycles from input to
// output.  en=0 freezes every stage (global stall from the result writer).
module cfar_pipeline
  import cfar_pkg::*;
#(
  parameter int unsigned NQ    = 300,
  parameter int unsigned GROUP = 30,   // pixels per first-level adder group
  localparam int unsigned NGRP = (NQ + GROUP - 1) / GROUP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  pipe_meta_t        in_meta,
  input  logic [PIX_W-1:0]  in_pix [NQ],
  input  logic [NBG_W-1:0]  n_bg,     // number of background pixels N
  input  logic [2*K_W-1:0]  k2,       // k^2, 16.16 fixed point
  output pipe_meta_t        out_meta,
  output logic              out_det
);

  localparam int unsigned D_W   = SUM_W + 2;        // signed N*x - S
  localparam int unsigned E_W   = SQS_W + NBG_W + 1; // N*Q and S^2
  localparam int unsigned CMP_W = 2 * K_W + E_W + 1;

  // stage 1: squares and group partial sums
  pipe_meta_t       m1;
  logic [SUM_W-1:0] gs1 [NGRP];
  logic [SQS_W-1:0] gq1 [NGRP];

  always_ff @(posedge clk) begin
    if (!rst_n) m1 <= '0;
    else if (en) begin
      m1 <= in_meta;
      for (int g = 0; g < NGRP; g++) begin
        logic [SUM_W-1:0] s;
        logic [SQS_W-1:0] qq;
        s  = '0;
        qq = '0;
        for (int i = g * GROUP; i < (g + 1) * GROUP && i < NQ; i++) begin
          s  = s + SUM_W'(in_pix[i]);
          qq = qq + SQS_W'(32'(in_pix[i]) * 32'(in_pix[i]));
        end
        gs1[g] <= s;
        gq1[g] <= qq;
      end
    end
  end

  // stage 2: column sums
  pipe_meta_t       m2;
  logic [SUM_W-1:0] cs2;
  logic [SQS_W-1:0] cq2;

  always_ff @(posedge clk) begin
    if (!rst_n) m2 <= '0;
    else if (en) begin
      logic [SUM_W-1:0] s;
      logic [SQS_W-1:0] qq;
      s  = '0;
      qq = '0;
      for (int g = 0; g < NGRP; g++) begin
        s  = s + gs1[g];
        qq = qq + gq1[g];
      end
      m2  <= m1;
      cs2 <= s;
      cq2 <= qq;
    end
  end

  // stage 3: running window sums; capture them with the pixel under test
  logic [SUM_W-1:0] acc_s;
  logic [SQS_W-1:0] acc_q;
  pipe_meta_t       m3;
  logic [PIX_W-1:0] x3;
  logic [SUM_W-1:0] s3;
  logic [SQS_W-1:0] q3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m3    <= '0;
      acc_s <= '0;
      acc_q <= '0;
      x3    <= '0;
      s3    <= '0;
      q3    <= '0;
    end else if (en) begin
      m3 <= m2;
      if (m2.valid) begin
        logic [SUM_W-1:0] bs;
        logic [SQS_W-1:0] bq;
        bs = m2.clear ? '0 : acc_s;
        bq = m2.clear ? '0 : acc_q;
        unique case (m2.op)
          OP_ADD: begin acc_s <= bs + cs2; acc_q <= bq + cq2; end
          OP_SUB: begin acc_s <= bs - cs2; acc_q <= bq - cq2; end
          OP_TARGET: begin
            x3 <= cs2[PIX_W-1:0];
            s3 <= acc_s;
            q3 <= acc_q;
          end
          default: ;
        endcase
      end
    end
  end

  // stage 4: products
  pipe_meta_t            m4;
  logic signed [D_W-1:0] d4;
  logic [E_W-1:0]        nq4, ss4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m4 <= '0; d4 <= '0; nq4 <= '0; ss4 <= '0;
    end else if (en) begin
      m4  <= m3;
      d4  <= $signed(D_W'(E_W'(n_bg) * E_W'(x3))) - $signed(D_W'(s3));
      nq4 <= E_W'(n_bg) * E_W'(q3);
      ss4 <= E_W'(s3) * E_W'(s3);
    end
  end

  // stage 5: squared deviation and N^2 * variance
  pipe_meta_t       m5;
  logic             pos5;
  logic [CMP_W-1:0] lhs5;
  logic [E_W-1:0]   e5;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m5 <= '0; pos5 <= 1'b0; lhs5 <= '0; e5 <= '0;
    end else if (en) begin
      logic [D_W-1:0] mag;
      mag  = d4[D_W-1] ? D_W'(-d4) : D_W'(d4);
      m5   <= m4;
      pos5 <= !d4[D_W-1] && (d4 != '0);
      lhs5 <= (CMP_W'(mag) * CMP_W'(mag)) << 16;
      e5   <= (nq4 >= ss4) ? nq4 - ss4 : '0;
    end
  end

  // stage 6: compare against the scaled threshold
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_meta <= '0;
      out_det  <= 1'b0;
    end else if (en) begin
      out_meta <= m5;
      out_det  <= m5.valid && (m5.op == OP_TARGET) && pos5 &&
                  (lhs5 > CMP_W'(k2) * CMP_W'(e5));
    end
  end

endmodule
