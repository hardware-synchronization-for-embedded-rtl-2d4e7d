// tb_core_fsm: self-checking test of the core-side FSM on its own.
//
// The testbench plays the core (bus requests) and the inter-core logic (race grant
// after a chosen delay, a one-cycle-latency memory, lock and barrier answers). It
// checks the 4-cycle uncontended access, the extra cycles of a delayed grant, read
// data and writes reaching the memory port, every register command strobe, the
// blocking of the core in the waiting states and the status word.
module tb_core_fsm;
  import mactrl_pkg::*;
  localparam int unsigned N = 2, DW = 32, MAW = 6, AW = MAW + 1;
  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, bus_ack;
  logic [AW-1:0] bus_addr;
  logic [DW-1:0] bus_wdata, bus_rdata;
  logic race_req, race_we, race_grant, race_done;
  logic [MAW-1:0] race_addr;
  logic mem_en, mem_we;
  logic [MAW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic glk_req, glk_rel, glk_mine;
  logic blk_lo_we, blk_hi_we, blk_rel, blk_mine;
  logic [MAW-1:0] blk_addr;
  logic bar_arrive, bar_release;
  bar_kind_e bar_kind;
  logic [DW-1:0] bar_arg;
  int checks = 0, failures = 0;
  int grant_delay = 0;
  int strobes_lo = 0, strobes_hi = 0, strobes_rel = 0, strobes_grel = 0, strobes_bar = 0;
  bar_kind_e last_kind;
  logic [MAW-1:0] last_blk;
  logic [DW-1:0] mem [2**MAW];

  core_fsm #(.N(N), .CORE_ID(1), .DW(DW), .MAW(MAW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // race model: grant after grant_delay cycles of race_req
  int arb_cnt = 0;
  always_ff @(posedge clk) arb_cnt <= race_req ? arb_cnt + 1 : 0;
  assign race_grant = race_req && (arb_cnt >= grant_delay);

  // memory model
  always_ff @(posedge clk) if (mem_en) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  always_ff @(posedge clk) begin
    if (blk_lo_we) begin strobes_lo++; last_blk <= blk_addr; end
    if (blk_hi_we) begin strobes_hi++; last_blk <= blk_addr; end
    if (blk_rel) strobes_rel++;
    if (glk_rel) strobes_grel++;
    if (bar_arrive) begin strobes_bar++; last_kind <= bar_kind; end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one bus access; returns cycles from request to acknowledge, inclusive
  task automatic access(input bit w, input logic [AW-1:0] a, input logic [DW-1:0] d,
                        output logic [DW-1:0] rd, output int cycles);
    @(negedge clk);
    bus_req = 1; bus_we = w; bus_addr = a; bus_wdata = d;
    cycles = 1;
    @(posedge clk);
    while (!bus_ack) begin cycles++; @(posedge clk); end
    rd = bus_rdata;
    #1 bus_req = 0;
  endtask

  function automatic logic [AW-1:0] reg_addr(reg_e r);
    return {1'b1, {(MAW - REG_IDX_W){1'b0}}, r};
  endfunction

  initial begin
    logic [DW-1:0] rd;
    int cyc_n;
    bus_req = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0;
    glk_mine = 0; blk_mine = 0; bar_release = 0;
    for (int i = 0; i < 2**MAW; i++) mem[i] = DW'(i * 3);
    repeat (2) @(posedge clk); rst_n = 1;
    // uncontended write and read: 4 cycles each
    access(1, 7'd5, 32'hcafe0001, rd, cyc_n);
    check(cyc_n == 4, $sformatf("uncontended write takes 4 cycles (%0d)", cyc_n));
    check(mem[5] == 32'hcafe0001, "write reached memory");
    access(0, 7'd5, 0, rd, cyc_n);
    check(cyc_n == 4 && rd == 32'hcafe0001, $sformatf("uncontended read 4 cycles, data (%0d, %h)", cyc_n, rd));
    access(0, 7'd9, 0, rd, cyc_n);
    check(rd == 32'd27, "read of initial contents");
    // delayed grant: 3 extra cycles (worst case of a dual-core race)
    grant_delay = 3;
    access(1, 7'd6, 32'h12345678, rd, cyc_n);
    check(cyc_n == 7, $sformatf("access waiting 3 cycles for the race takes 7 (%0d)", cyc_n));
    grant_delay = 0;
    // register writes with immediate completion
    access(1, reg_addr(REG_ALOCK_LO), 32'd10, rd, cyc_n);
    check(strobes_lo == 1 && last_blk == 6'd10, "lower address strobe");
    access(1, reg_addr(REG_ALOCK_REL), 0, rd, cyc_n);
    check(strobes_rel == 1, "block release strobe");
    access(1, reg_addr(REG_GLOCK_REL), 0, rd, cyc_n);
    check(strobes_grel == 1, "global release strobe");
    check(cyc_n == 3, $sformatf("plain register write takes 3 cycles (%0d)", cyc_n));
    // blocking register writes
    fork
      access(1, reg_addr(REG_GLOCK_ACQ), 0, rd, cyc_n);
      begin
        repeat (6) @(posedge clk);
        #1 check(glk_req && !bus_ack, "core blocked while requesting the global lock");
        glk_mine = 1;
      end
    join
    check(cyc_n >= 8, "global lock acquire blocked until granted");
    access(0, reg_addr(REG_STATUS), 0, rd, cyc_n);
    check(rd == {16'd1, 8'd2, 8'b10}, $sformatf("status word %h", rd));
    glk_mine = 0;
    fork
      access(1, reg_addr(REG_ALOCK_HI), 32'd20, rd, cyc_n);
      begin
        repeat (5) @(posedge clk);
        #1 check(!bus_ack && strobes_hi == 1 && last_blk == 6'd20, "blocked after upper address write");
        blk_mine = 1;
      end
    join
    check(cyc_n >= 6, "block lock blocks until locked");
    blk_mine = 0;
    fork
      access(1, reg_addr(REG_BAR_CPLX), 32'h0502, rd, cyc_n);
      begin
        repeat (5) @(posedge clk);
        #1 check(!bus_ack && strobes_bar == 1 && last_kind == BAR_COMPLEX && bar_arg == 32'h0502,
                 "blocked in complex barrier");
        bar_release = 1; @(posedge clk); #1 bar_release = 0;
      end
    join
    check(cyc_n >= 6, "barrier blocks until released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
