// tb_mactrl: end-to-end test of the Multi-Access Controller at its default size
// (two cores, 32-bit words, 2048-word shared memory).
//
// Two bus-master processes play the cores and run, in turn:
//  1. single accesses: an uncontended access takes 4 cycles, two colliding writes take
//     4 and 7 cycles (best and worst case of the dual-core race), two reads proceed
//     concurrently;
//  2. paired accesses: both cores increment one shared word PAIRS times with a
//     read/write pair under the global lock (explicit locking), and then PAIRS times
//     more with unprotected read/write pairs guarded only by implicit locking of the
//     single accesses (which keeps every access atomic but not the pair);
//  3. block accesses: each core locks a block, increments every word of it and
//     relocates the block by an offset, the cores moving in opposite directions so
//     their blocks collide; the final memory is compared with the expected counts;
//  4. mutual exclusion of the global lock and a block lock;
//  5. the simple, extended simple and complex barriers.
// Each mechanism (race stall, concurrent reads, block bypass, global lock wait, block
// lock wait, barrier waits of the three kinds) is counted and must occur.
module tb_mactrl;
  import mactrl_pkg::*;
  localparam int unsigned N = 2, DW = 32, WORDS = 2048, MAW = 11, AW = 12;
  localparam int PAIRS = 200, ROUNDS = 12, BLK = 16, STEP = 5;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] core_req, core_we, core_ack;
  logic [N-1:0][AW-1:0] core_addr;
  logic [N-1:0][DW-1:0] core_wdata, core_rdata;
  int checks = 0, failures = 0;

  mactrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed inside the controller
  int n_stall = 0, n_concurrent = 0, n_bypass = 0, n_glk_wait = 0, n_blk_wait = 0;
  int n_bar_simple = 0, n_bar_ext = 0, n_bar_cplx = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall      += $countones(dut.race_req & ~dut.race_grant);
    n_concurrent += int'(dut.race_concurrent_reads);
    n_bypass     += $countones(dut.race_bypass);
    n_glk_wait   += $countones(dut.glk_req & ~dut.glk_mine);
    n_blk_wait   += $countones(dut.blk_pending);
    for (int i = 0; i < N; i++) if (dut.bar_waiting[i]) begin
      if (dut.u_bar.kind_r[i] == BAR_SIMPLE) n_bar_simple++;
      if (dut.u_bar.kind_r[i] == BAR_EXT)    n_bar_ext++;
      if (dut.u_bar.kind_r[i] == BAR_COMPLEX) n_bar_cplx++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One bus access of core c; returns read data and cycles from request to ack.
  task automatic bus(int c, bit w, logic [AW-1:0] a, logic [DW-1:0] d,
                     output logic [DW-1:0] rd, output int cycles);
    @(negedge clk);
    core_req[c] = 1; core_we[c] = w; core_addr[c] = a; core_wdata[c] = d;
    cycles = 1;
    @(posedge clk);
    while (!core_ack[c]) begin cycles++; @(posedge clk); end
    rd = core_rdata[c];
    #1 core_req[c] = 0;
  endtask

  task automatic wr(int c, int a, logic [DW-1:0] d);
    logic [DW-1:0] rd; int n;
    bus(c, 1, AW'(a), d, rd, n);
  endtask

  task automatic rdw(int c, int a, output logic [DW-1:0] rd);
    int n;
    bus(c, 0, AW'(a), 0, rd, n);
  endtask

  task automatic regw(int c, reg_e r, logic [DW-1:0] d);
    logic [DW-1:0] rd; int n;
    bus(c, 1, {1'b1, 7'd0, r}, d, rd, n);
  endtask

  function automatic int wrapw(int a);
    return ((a % WORDS) + WORDS) % WORDS;
  endfunction

  localparam int CNT_A = 100, CNT_B = 101, BLK_BASE = 512;
  int expect_cnt [WORDS];
  int t_arrive0, t_leave0, t_arrive1;

  initial begin
    logic [DW-1:0] rd, rd0, rd1;
    int n0, n1;
    core_req = 0; core_we = 0; core_addr = 0; core_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. single accesses ----
    bus(0, 1, 12'd7, 32'h11, rd, n0);
    check(n0 == 4, $sformatf("uncontended access: 4 cycles (%0d)", n0));
    fork
      bus(0, 1, 12'd8, 32'hA0, rd0, n0);
      bus(1, 1, 12'd8, 32'hB1, rd1, n1);
    join
    check((n0 == 4 && n1 == 7) || (n0 == 7 && n1 == 4),
          $sformatf("colliding writes: best 4 and worst 7 cycles (%0d, %0d)", n0, n1));
    rdw(0, 8, rd);
    check(rd == (n0 == 4 ? 32'hB1 : 32'hA0), "later write of the collision wins");
    fork
      bus(0, 0, 12'd7, 0, rd0, n0);
      bus(1, 0, 12'd7, 0, rd1, n1);
    join
    check(n0 == 4 && n1 == 4 && rd0 == 32'h11 && rd1 == 32'h11, "concurrent reads take 4 cycles each");

    // ---- 2. paired accesses ----
    wr(0, CNT_A, 0);
    wr(0, CNT_B, 0);
    fork
      for (int i = 0; i < PAIRS; i++) begin
        logic [DW-1:0] v;
        regw(0, REG_GLOCK_ACQ, 0); rdw(0, CNT_A, v); wr(0, CNT_A, v + 1); regw(0, REG_GLOCK_REL, 0);
      end
      for (int i = 0; i < PAIRS; i++) begin
        logic [DW-1:0] v;
        regw(1, REG_GLOCK_ACQ, 0); rdw(1, CNT_A, v); wr(1, CNT_A, v + 1); regw(1, REG_GLOCK_REL, 0);
      end
    join
    rdw(0, CNT_A, rd);
    check(rd == 2 * PAIRS, $sformatf("explicit locking: counter %0d, expected %0d", rd, 2 * PAIRS));
    fork
      for (int i = 0; i < PAIRS; i++) begin
        logic [DW-1:0] v; rdw(0, CNT_B, v); wr(0, CNT_B, v + 1);
      end
      for (int i = 0; i < PAIRS; i++) begin
        logic [DW-1:0] v; rdw(1, CNT_B, v); wr(1, CNT_B, v + 1);
      end
    join
    rdw(0, CNT_B, rd);
    check(rd >= PAIRS && rd <= 2 * PAIRS, $sformatf("implicit locking keeps single accesses atomic (%0d)", rd));

    // ---- 3. block accesses with relocation in opposite directions ----
    for (int w = 0; w < WORDS; w++) expect_cnt[w] = 0;
    for (int w = BLK_BASE - 128; w < BLK_BASE + 256; w++) wr(0, w, 0);
    for (int r = 0; r < ROUNDS; r++) begin
      for (int k = 0; k < BLK; k++) begin
        expect_cnt[BLK_BASE + r * STEP + k]++;
        expect_cnt[BLK_BASE + 100 - r * STEP + k]++;
      end
    end
    fork
      for (int r = 0; r < ROUNDS; r++) begin
        automatic int lo = BLK_BASE + r * STEP;
        regw(0, REG_ALOCK_LO, lo); regw(0, REG_ALOCK_HI, lo + BLK - 1);
        for (int k = 0; k < BLK; k++) begin
          logic [DW-1:0] v; rdw(0, lo + k, v); wr(0, lo + k, v + 1);
        end
        if (r == ROUNDS - 1) regw(0, REG_ALOCK_REL, 0);
      end
      for (int r = 0; r < ROUNDS; r++) begin
        automatic int lo = BLK_BASE + 100 - r * STEP;
        regw(1, REG_ALOCK_LO, lo); regw(1, REG_ALOCK_HI, lo + BLK - 1);
        for (int k = 0; k < BLK; k++) begin
          logic [DW-1:0] v; rdw(1, lo + k, v); wr(1, lo + k, v + 1);
        end
        if (r == ROUNDS - 1) regw(1, REG_ALOCK_REL, 0);
      end
    join
    begin
      int bad = 0;
      for (int w = BLK_BASE - 128; w < BLK_BASE + 256; w++) begin
        rdw(0, w, rd);
        if (rd != DW'(expect_cnt[w])) begin bad++; if (bad < 8) $display("w=%0d got %0d exp %0d", w, rd, expect_cnt[w]); end
      end
      check(bad == 0, $sformatf("block accesses: %0d words differ from expected counts", bad));
    end

    // ---- 4. global lock and block lock exclude each other ----
    regw(0, REG_ALOCK_LO, 0); regw(0, REG_ALOCK_HI, 3);
    fork
      begin regw(1, REG_GLOCK_ACQ, 0); t_leave0 = $time; end
      begin repeat (20) @(posedge clk); t_arrive0 = $time; regw(0, REG_ALOCK_REL, 0); end
    join
    check(t_leave0 > t_arrive0, "global lock waits for the block lock to be released");
    bus(1, 0, {1'b1, 7'd0, REG_STATUS}, 0, rd, n1);
    check(rd == {16'd1, 8'd2, 8'b10}, $sformatf("status of core 1 %h", rd));
    regw(1, REG_GLOCK_REL, 0);

    // ---- 5. barriers ----
    fork
      begin regw(0, REG_BAR_SIMPLE, 32'h55); t_leave0 = $time; end
      begin repeat (30) @(posedge clk); t_arrive1 = $time; regw(1, REG_BAR_SIMPLE, 0); end
    join
    check(t_leave0 > t_arrive1, "simple barrier holds core 0 until core 1 arrives");
    fork
      begin regw(1, REG_BAR_EXT, 32'b01); t_leave0 = $time; end
      begin repeat (25) @(posedge clk); t_arrive0 = $time; regw(0, REG_BAR_EXT, 32'b10); end
    join
    check(t_leave0 > t_arrive0, "extended barrier holds core 1 until core 0 arrives");
    fork
      begin regw(0, REG_BAR_CPLX, {16'd0, 8'd3, 8'd1}); t_leave0 = $time; end
      begin repeat (25) @(posedge clk); t_arrive1 = $time; regw(1, REG_BAR_CPLX, {16'd0, 8'd3, 8'd1}); end
    join
    check(t_leave0 > t_arrive1, "complex barrier holds core 0 until one other core arrives");

    // ---- mechanisms seen ----
    $display("mechanisms: race stalls %0d, concurrent reads %0d, block bypasses %0d, global lock waits %0d, block lock waits %0d, barrier waits simple %0d extended %0d complex %0d",
             n_stall, n_concurrent, n_bypass, n_glk_wait, n_blk_wait, n_bar_simple, n_bar_ext, n_bar_cplx);
    check(n_stall > 0, "race stall happened");
    check(n_concurrent > 0, "concurrent reads happened");
    check(n_bypass > 0, "block bypass happened");
    check(n_glk_wait > 0, "global lock wait happened");
    check(n_blk_wait > ROUNDS, "block lock conflicts happened");
    check(n_bar_simple > 0 && n_bar_ext > 0 && n_bar_cplx > 0, "all barrier kinds waited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
