// rr_arbiter: the access race of the Multi-Access Controller.
//
// Among the cores that request in a cycle, exactly one winner is elected in that same
// cycle (combinationally). Cores that do not request are masked out and cannot win.
// The highest priority rotates: after each election it moves to the core following the
// winner, so a core that keeps requesting waits for at most N-1 other grants. The
// paper describes the race as a dynamic priority that "continuously cycles the
// highest priority among all available cores"; moving the priority on each grant
// (rather than every clock) is this design's choice, because it gives the bound on the
// waiting time the paper asks for.
//
// Interface: req is a request vector, en allows an election this cycle (the caller
// clears it while the contested resource is busy). gnt is one-hot or zero, gnt_idx its
// index, gnt_valid set when gnt is not zero. The priority pointer is updated on the
// clock edge that ends a cycle with a grant. Reset (synchronous, active low) puts the highest priority on core 0.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req,
  input  logic                        en,
  output logic [N-1:0]                gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic                        gnt_valid
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] prio;  // core holding the highest priority

  always_comb begin
    logic [IW:0] idx;
    idx       = '0;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    if (en) begin
      for (int unsigned k = 0; k < N; k++) begin
        idx = {1'b0, prio} + (IW+1)'(k);
        if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
        if (!gnt_valid && req[idx[IW-1:0]]) begin
          gnt_valid               = 1'b1;
          gnt_idx                 = idx[IW-1:0];
          gnt[idx[IW-1:0]]        = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio <= '0;
    end else if (gnt_valid) begin
      prio <= (gnt_idx == IW'(N-1)) ? '0 : gnt_idx + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_only_requesters: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
