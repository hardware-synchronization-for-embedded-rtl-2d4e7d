// mem_race: the inter-core logic that decides which cores may access the shared
// memory in a cycle.
//
// Implicit locking: every shared-memory access of a core is made atomic by the race.
// Among the cores that request and are allowed to compete, the rr_arbiter elects one
// winner within a cycle, and the winner keeps the memory until its core-side logic
// reports the access done (3 cycles after the grant); competitors stay blocked
// meanwhile and the next election happens when the memory is free again. The paper
// names one winner per cycle as the ideal; holding the memory for the whole access
// follows its measured best/worst access times of 4 and 7 cycles. Because the memory has a port
// per core, accesses that cannot conflict go ahead together:
//  - when the memory is free and every competitor only reads, all of them are granted
//    (concurrent reads);
//  - a core accessing inside the block it has locked (address-sensitive locking)
//    bypasses the race and is granted at once, while other cores work elsewhere.
// A core may not compete while another core holds the global lock, nor for an address
// inside a block locked by another core. The holder of the global lock still uses the
// race (it is then the only competitor) so that it never overlaps an access that was
// granted before it acquired the lock.
//
// Interface: req/we/addr per core, sampled combinationally; done[i] is high in the
// last cycle of core i's granted access. grant is combinational in the request cycle.
// The choices of which accesses may share the memory are this design's own; the
// paper names concurrent reads and concurrent accesses to locked regions as goals.
module mem_race #(
  parameter int unsigned N  = 2,
  parameter int unsigned AW = 11,
  localparam int unsigned IW = $clog2(N > 1 ? N : 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         we,
  input  logic [N-1:0][AW-1:0] addr,
  input  logic [N-1:0]         done,
  input  logic [N-1:0]         blk_held,
  input  logic [N-1:0][AW-1:0] blk_lo,
  input  logic [N-1:0][AW-1:0] blk_hi,
  input  logic                 glk_held,
  input  logic [IW-1:0]        glk_holder,
  output logic [N-1:0]         grant,
  output logic [N-1:0]         bypass,
  output logic                 concurrent_reads,
  output logic                 busy
);
  logic [N-1:0]  owner;     // cores holding the memory through the race
  logic [N-1:0]  own_blk;   // request falls inside the core's own locked block
  logic [N-1:0]  eligible;  // may compete in the race this cycle
  logic [N-1:0]  arb_gnt;
  logic [IW-1:0] arb_idx;
  logic          arb_valid;
  logic          all_reads;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      own_blk[i]  = blk_held[i] && addr[i] >= blk_lo[i] && addr[i] <= blk_hi[i];
      eligible[i] = req[i] && !own_blk[i] && !(glk_held && glk_holder != IW'(i));
      for (int unsigned j = 0; j < N; j++) begin
        if (j != i && blk_held[j] && addr[i] >= blk_lo[j] && addr[i] <= blk_hi[j])
          eligible[i] = 1'b0;
      end
    end
  end

  assign bypass    = req & own_blk;
  assign busy      = |owner;
  assign all_reads = (eligible & we) == '0;
  assign concurrent_reads = !busy && all_reads && ((eligible & (eligible - 1'b1)) != '0);

  rr_arbiter #(.N(N)) u_race (
    .clk, .rst_n,
    .req      (eligible),
    .en       (!busy && !all_reads),
    .gnt      (arb_gnt),
    .gnt_idx  (arb_idx),
    .gnt_valid(arb_valid)
  );

  always_comb begin
    grant = bypass;
    if (!busy) grant |= all_reads ? eligible : arb_gnt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) owner <= '0;
    else        owner <= (owner & ~done) | (grant & ~bypass);
  end

  // A written word is never accessed by two race winners at once.
  a_single_writer: assert property (@(posedge clk) disable iff (!rst_n)
    ((grant & ~bypass & we) != '0) |-> $onehot(grant & ~bypass));

endmodule
