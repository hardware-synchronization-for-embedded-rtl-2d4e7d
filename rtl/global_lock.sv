// global_lock: the global locking bit shared by all cores.
//
// A core that wants to make several shared-memory accesses atomic acquires the global
// lock; while it holds it, the access race admits no other core. Requests are resolved
// by a race of their own (a second rr_arbiter, the "variation of the algorithm" the
// paper mentions), so concurrent requesters are served in rotating order and none
// waits indefinitely. Global and address-sensitive locking are mutually exclusive, as
// the paper requires: the lock is granted only while no memory block is locked.
//
// Interface: req[i] is held high by core i while it waits to acquire; rel[i] is a
// one-cycle release pulse, honoured only from the holder. held/holder describe the lock;
// the grant becomes visible one cycle after the election (registered). A core that
// already holds the lock and requests again is not re-elected; its core-side logic
// sees held/holder and continues at once.
module global_lock #(
  parameter int unsigned N = 2,
  localparam int unsigned IW = $clog2(N > 1 ? N : 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  rel,
  input  logic          any_block_locked,
  output logic          held,
  output logic [IW-1:0] holder
);
  logic [N-1:0]  gnt;
  logic [IW-1:0] gnt_idx;
  logic          gnt_valid;

  rr_arbiter #(.N(N)) u_race (
    .clk, .rst_n,
    .req      (req),
    .en       (!held && !any_block_locked),
    .gnt      (gnt),
    .gnt_idx  (gnt_idx),
    .gnt_valid(gnt_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held   <= 1'b0;
      holder <= '0;
    end else if (held) begin
      if (rel[holder]) held <= 1'b0;
    end else if (gnt_valid) begin
      held   <= 1'b1;
      holder <= gnt_idx;
    end
  end

  // The global lock is never granted while a memory block is locked.
  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> !any_block_locked);

endmodule
