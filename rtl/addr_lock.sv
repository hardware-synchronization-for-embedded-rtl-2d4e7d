// addr_lock: address-sensitive locking of blocks of the shared memory.
//
// Each core owns a lower and an upper address register. Writing the lower register
// only loads it (a held block keeps its bounds); writing the upper register loads it and starts a lock attempt for the
// block [lower, upper] (both inclusive). A core that already holds a block gives it up
// when it starts a new attempt, which is how a block is relocated. An attempt succeeds
// when the block overlaps no block held by another core and the global lock is free;
// among the cores whose attempt could succeed, one per cycle is chosen by a rotating
// priority race (rr_arbiter), so two overlapping attempts are never granted together.
// A held block stays locked until the core releases it.
//
// Interface: lo_we/hi_we/rel are one-cycle strobes per core, wdata the address written.
// held[i], lo[i], hi[i] describe core i's block and feed the memory race, which lets
// the owner into its block without contention and keeps every other core out.
// pending[i] is high while core i's attempt waits. A grant appears on held one cycle
// after the election. Which core wins when several attempts are possible, and the
// inclusive bounds, are this design's choices.
module addr_lock #(
  parameter int unsigned N  = 2,
  parameter int unsigned AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         lo_we,
  input  logic [N-1:0]         hi_we,
  input  logic [N-1:0]         rel,
  input  logic [N-1:0][AW-1:0] wdata,
  input  logic                 global_held,
  output logic [N-1:0]         held,
  output logic [N-1:0]         pending,
  output logic [N-1:0][AW-1:0] lo,
  output logic [N-1:0][AW-1:0] hi,
  output logic                 any_held
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0][AW-1:0] lo_next;  // lower register, copied into lo when an attempt starts
  logic [N-1:0]  can_lock;
  logic [N-1:0]  gnt;
  logic [IW-1:0] gnt_idx;
  logic          gnt_valid;

  // An attempt can succeed when its block overlaps no block held by another core.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      can_lock[i] = pending[i];
      for (int unsigned j = 0; j < N; j++) begin
        if (j != i && held[j] && lo[i] <= hi[j] && lo[j] <= hi[i]) can_lock[i] = 1'b0;
      end
    end
  end

  rr_arbiter #(.N(N)) u_race (
    .clk, .rst_n,
    .req      (can_lock),
    .en       (!global_held),
    .gnt      (gnt),
    .gnt_idx  (gnt_idx),
    .gnt_valid(gnt_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held    <= '0;
      pending <= '0;
      lo      <= '0;
      hi      <= '0;
      lo_next <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (lo_we[i]) lo_next[i] <= wdata[i];
        if (hi_we[i]) begin
          lo[i]      <= lo_we[i] ? wdata[i] : lo_next[i];
          hi[i]      <= wdata[i];
          pending[i] <= 1'b1;
          held[i]    <= 1'b0;
        end else if (rel[i]) begin
          pending[i] <= 1'b0;
          held[i]    <= 1'b0;
        end else if (gnt[i]) begin
          pending[i] <= 1'b0;
          held[i]    <= 1'b1;
        end
      end
    end
  end

  assign any_held = |held;

  // Two held blocks never overlap.
  function automatic logic blocks_overlap(logic [N-1:0] h, logic [N-1:0][AW-1:0] l,
                                          logic [N-1:0][AW-1:0] u);
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = i + 1; j < N; j++)
        if (h[i] && h[j] && l[i] <= u[j] && l[j] <= u[i]) return 1'b1;
    return 1'b0;
  endfunction

  a_disjoint: assert property (@(posedge clk) disable iff (!rst_n) !blocks_overlap(held, lo, hi));

endmodule
