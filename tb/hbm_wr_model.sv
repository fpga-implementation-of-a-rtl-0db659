// hbm_wr_model: behavioural model of the HBM pseudo-channel that receives
// the result mask, seen through its AXI4 write port.  Beats are stored by
// address in a sparse memory.  Address and data channels accept
// independently with random back-pressure; with stall_long set, it also
// refuses all writes for long random stretches so that the writer's FIFO
// fills.  One write response per accepted beat.
module hbm_wr_model (
  input  logic         clk,
  input  logic         stall_long,
  input  logic         awvalid,
  output logic         awready,
  input  logic [63:0]  awaddr,
  input  logic         wvalid,
  output logic         wready,
  input  logic [255:0] wdata,
  input  logic         wlast,
  output logic         bvalid,
  input  logic         bready,
  output int           writes,
  output int           errors
);

  logic [255:0] mem [longint];
  longint       aq[$];
  logic [255:0] dq[$];
  int           nb, hold;

  initial begin
    awready = 1'b0; wready = 1'b0; bvalid = 1'b0;
    writes = 0; errors = 0; nb = 0; hold = 0;
  end

  always @(posedge clk) begin
    if (awvalid && awready) aq.push_back(longint'(awaddr));
    if (wvalid && wready) begin
      dq.push_back(wdata);
      if (!wlast) errors <= errors + 1;
    end
    if (aq.size() != 0 && dq.size() != 0) begin
      longint a;
      a = aq.pop_front();
      if (a % 32 != 0) errors <= errors + 1;
      mem[a] = dq.pop_front();
      writes <= writes + 1;
      nb = nb + 1;
    end
    if (bvalid && bready) begin
      bvalid <= 1'b0;
      nb = nb - 1;
    end else if (nb > 0 && !bvalid) begin
      bvalid <= 1'b1;
    end
    if (hold > 0) hold = hold - 1;
    else if (stall_long && $urandom_range(1500) == 0) hold = 3000;
    awready <= (hold == 0) && ($urandom_range(2) != 0);
    wready  <= (hold == 0) && ($urandom_range(2) != 0);
  end

  function automatic logic [255:0] read_beat(longint a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

endmodule
