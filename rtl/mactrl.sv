// mactrl: Multi-Access Controller with its shared memory - the top of the design.
//
// N processor cores share one on-chip memory. Every core reaches it through a bus port
// of its own, served by a core-side FSM (core_fsm). The inter-core logic between the
// FSMs provides the synchronization in hardware:
//  - mem_race:     implicit locking - each shared-memory access is atomic; concurrent
//                  requests are resolved by a rotating-priority race, one winner per
//                  cycle, blocked cores wait without spinning on the bus;
//  - global_lock:  explicit locking - one global lock bit makes a series of accesses
//                  atomic;
//  - addr_lock:    address-sensitive locking - cores lock disjoint blocks of the memory
//                  and work in them concurrently; mutually exclusive with global_lock;
//  - barrier_unit: simple, extended simple and complex barriers.
// The memory (shared_mem) has one port per core; for the default dual-core system it
// is a dual-ported block RAM.
//
// Ports: clk, synchronous active-low rst_n, and per core i a request/acknowledge word
// bus (core_req[i], core_we[i], core_addr[i], core_wdata[i], core_rdata[i],
// core_ack[i]; see core_fsm for the protocol, the timing and the register map). The
// word address has MAW+1 bits: the top bit selects the controller registers.
// Defaults: 2 cores, 32-bit words (the dual-core system the paper builds), and
// 2048 words of memory (a size the paper does not give).
module mactrl
  import mactrl_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned DW     = 32,
  parameter int unsigned WORDS  = 2048,
  localparam int unsigned MAW   = $clog2(WORDS),
  localparam int unsigned AW    = MAW + 1,
  localparam int unsigned IW    = $clog2(N > 1 ? N : 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         core_req,
  input  logic [N-1:0]         core_we,
  input  logic [N-1:0][AW-1:0] core_addr,
  input  logic [N-1:0][DW-1:0] core_wdata,
  output logic [N-1:0][DW-1:0] core_rdata,
  output logic [N-1:0]         core_ack
);
  // Core-side to inter-core signals
  logic [N-1:0]           race_req, race_we, race_grant, race_done;
  logic [N-1:0][MAW-1:0]  race_addr;
  logic [N-1:0]           mem_en, mem_we;
  logic [N-1:0][MAW-1:0]  mem_addr;
  logic [N-1:0][DW-1:0]   mem_wdata, mem_rdata;
  logic [N-1:0]           glk_req, glk_rel, glk_mine;
  logic [N-1:0]           blk_lo_we, blk_hi_we, blk_rel, blk_held, blk_pending;
  logic [N-1:0][MAW-1:0]  blk_addr, blk_lo, blk_hi;
  logic [N-1:0]           bar_arrive, bar_waiting, bar_release;
  bar_kind_e [N-1:0]      bar_kind;
  logic [N-1:0][DW-1:0]   bar_arg;
  logic                   glk_held;
  logic [IW-1:0]          glk_holder;
  logic                   any_blk_held;
  logic [N-1:0]           race_bypass;
  logic                   race_concurrent_reads, race_busy;

  for (genvar i = 0; i < N; i++) begin : g_core
    core_fsm #(.N(N), .CORE_ID(i), .DW(DW), .MAW(MAW)) u_fsm (
      .clk, .rst_n,
      .bus_req    (core_req[i]),
      .bus_we     (core_we[i]),
      .bus_addr   (core_addr[i]),
      .bus_wdata  (core_wdata[i]),
      .bus_rdata  (core_rdata[i]),
      .bus_ack    (core_ack[i]),
      .race_req   (race_req[i]),
      .race_we    (race_we[i]),
      .race_addr  (race_addr[i]),
      .race_grant (race_grant[i]),
      .race_done  (race_done[i]),
      .mem_en     (mem_en[i]),
      .mem_we     (mem_we[i]),
      .mem_addr   (mem_addr[i]),
      .mem_wdata  (mem_wdata[i]),
      .mem_rdata  (mem_rdata[i]),
      .glk_req    (glk_req[i]),
      .glk_rel    (glk_rel[i]),
      .glk_mine   (glk_mine[i]),
      .blk_lo_we  (blk_lo_we[i]),
      .blk_hi_we  (blk_hi_we[i]),
      .blk_rel    (blk_rel[i]),
      .blk_addr   (blk_addr[i]),
      .blk_mine   (blk_held[i]),
      .bar_arrive (bar_arrive[i]),
      .bar_kind   (bar_kind[i]),
      .bar_arg    (bar_arg[i]),
      .bar_release(bar_release[i])
    );
    assign glk_mine[i] = glk_held && (glk_holder == IW'(i));
  end

  mem_race #(.N(N), .AW(MAW)) u_race (
    .clk, .rst_n,
    .req             (race_req),
    .we              (race_we),
    .addr            (race_addr),
    .done            (race_done),
    .blk_held        (blk_held),
    .blk_lo          (blk_lo),
    .blk_hi          (blk_hi),
    .glk_held        (glk_held),
    .glk_holder      (glk_holder),
    .grant           (race_grant),
    .bypass          (race_bypass),
    .concurrent_reads(race_concurrent_reads),
    .busy            (race_busy)
  );

  global_lock #(.N(N)) u_glock (
    .clk, .rst_n,
    .req             (glk_req),
    .rel             (glk_rel),
    .any_block_locked(any_blk_held),
    .held            (glk_held),
    .holder          (glk_holder)
  );

  addr_lock #(.N(N), .AW(MAW)) u_alock (
    .clk, .rst_n,
    .lo_we      (blk_lo_we),
    .hi_we      (blk_hi_we),
    .rel        (blk_rel),
    .wdata      (blk_addr),
    .global_held(glk_held),
    .held       (blk_held),
    .pending    (blk_pending),
    .lo         (blk_lo),
    .hi         (blk_hi),
    .any_held   (any_blk_held)
  );

  barrier_unit #(.N(N), .DW(DW)) u_bar (
    .clk, .rst_n,
    .arrive   (bar_arrive),
    .kind     (bar_kind),
    .arg      (bar_arg),
    .waiting  (bar_waiting),
    .release_o(bar_release)
  );

  shared_mem #(.NPORTS(N), .WORDS(WORDS), .DW(DW)) u_mem (
    .clk,
    .en   (mem_en),
    .we   (mem_we),
    .addr (mem_addr),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

endmodule
