// mactrl_env: reusable multi-core test environment for the Multi-Access Controller.
//
// Instantiates one controller with NC cores (512-word memory) and its own clock, runs
// the scenario below once, then raises done with its check and failure counts. Used by
// tb_mactrl_multi for four and eight cores.
//  1. All cores write one word in the same cycle: the race serves them one after
//     another, so the acknowledges come after 4, 7, 10, ... 4+3(NC-1) cycles - the
//     longest wait is bounded by the number of cores.
//  2. Sustained contention: every core issues back-to-back writes; no access may take
//     longer than 4+3(NC-1) cycles (fairness of the rotating priority).
//  3. A shared counter is incremented by all cores under the global lock.
//  4. NC disjoint blocks are locked and written at the same time (bypass).
//  5. Barriers over subsets: cores 0 and 1 meet in an extended barrier while cores
//     2..NC-1 meet in a complex barrier with id 1; then all cores meet in a complex
//     barrier with id 2 and count NC-1, which none may leave before the last arrives.
// Each mechanism (race stall, bypass, global lock wait, extended and complex barrier
// wait) is counted and must occur.
module mactrl_env #(
  parameter int unsigned NC = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import mactrl_pkg::*;
  localparam int unsigned DW = 32, WORDS = 512, MAW = 9, AW = 10;
  localparam int K = 40, INCS = 20;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] core_req, core_we, core_ack;
  logic [NC-1:0][AW-1:0] core_addr;
  logic [NC-1:0][DW-1:0] core_wdata, core_rdata;

  mactrl #(.N(NC), .DW(DW), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  int n_stall = 0, n_bypass = 0, n_glk_wait = 0, n_bar_ext = 0, n_bar_cplx = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall    += $countones(dut.race_req & ~dut.race_grant);
    n_bypass   += $countones(dut.race_bypass);
    n_glk_wait += $countones(dut.glk_req & ~dut.glk_mine);
    for (int i = 0; i < NC; i++) if (dut.bar_waiting[i]) begin
      if (dut.u_bar.kind_r[i] == BAR_EXT)     n_bar_ext++;
      if (dut.u_bar.kind_r[i] == BAR_COMPLEX) n_bar_cplx++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL (%0d cores): %s", NC, what); end
  endtask

  task automatic bus(int c, bit w, int a, logic [DW-1:0] d,
                     output logic [DW-1:0] rd, output int cycles);
    @(negedge clk);
    core_req[c] = 1; core_we[c] = w; core_addr[c] = AW'(a); core_wdata[c] = d;
    cycles = 1;
    @(posedge clk);
    while (!core_ack[c]) begin cycles++; @(posedge clk); end
    rd = core_rdata[c];
    #1 core_req[c] = 0;
  endtask

  task automatic regw(int c, reg_e r, logic [DW-1:0] d);
    logic [DW-1:0] rd; int n;
    bus(c, 1, (1 << MAW) | int'(r), d, rd, n);
  endtask

  int lat [NC];
  int maxlat = 0;
  int t_leave [NC];
  int t_last_arrival;

  task automatic job_writes(int c);
    logic [DW-1:0] rd; int n;
    for (int i = 0; i < K; i++) begin
      bus(c, 1, 10, DW'(c), rd, n);
      if (n > maxlat) maxlat = n;
    end
  endtask

  task automatic job_counter(int c);
    logic [DW-1:0] rd; int n;
    for (int i = 0; i < INCS; i++) begin
      regw(c, REG_GLOCK_ACQ, 0);
      bus(c, 0, 20, 0, rd, n);
      bus(c, 1, 20, rd + 1, rd, n);
      regw(c, REG_GLOCK_REL, 0);
    end
  endtask

  // own block [64+32c, 64+32c+15]
  task automatic job_block(int c);
    logic [DW-1:0] rd; int n;
    regw(c, REG_ALOCK_LO, 64 + 32 * c);
    regw(c, REG_ALOCK_HI, 64 + 32 * c + 15);
    for (int k = 0; k < 16; k++) bus(c, 1, 64 + 32 * c + k, DW'(1000 * c + k), rd, n);
    regw(c, REG_ALOCK_REL, 0);
  endtask

  task automatic collide(int c);
    logic [DW-1:0] rd;
    bus(c, 1, 5, DW'(c), rd, lat[c]);
  endtask

  task automatic bar_subsets(int c);
    if (c == 0) regw(0, REG_BAR_EXT, 32'b10);
    else if (c == 1) begin repeat (20) @(posedge clk); regw(1, REG_BAR_EXT, 32'b01); end
    else if (c == NC - 1) begin
      repeat (60) @(posedge clk); t_last_arrival = $time;
      regw(c, REG_BAR_CPLX, {16'd0, 8'd1, 8'(NC - 3)});
    end else regw(c, REG_BAR_CPLX, {16'd0, 8'd1, 8'(NC - 3)});
    t_leave[c] = $time;
  endtask

  task automatic bar_all(int c);
    if (c == NC - 1) begin repeat (50) @(posedge clk); t_last_arrival = $time; end
    else repeat (3 * c) @(posedge clk);
    regw(c, REG_BAR_CPLX, {16'd0, 8'd2, 8'(NC - 1)});
    t_leave[c] = $time;
  endtask

  initial begin
    logic [DW-1:0] rd;
    int n;
    done = 0; checks = 0; failures = 0;
    core_req = 0; core_we = 0; core_addr = 0; core_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. all cores collide
    for (int c = 0; c < NC; c++) fork automatic int cc = c; collide(cc); join_none
    wait fork;
    begin
      int seen = 0;
      for (int i = 0; i < NC; i++) for (int s = 0; s < NC; s++) if (lat[i] == 4 + 3 * s) seen |= 1 << s;
      check(seen == (1 << NC) - 1, "colliding writes finish after 4, 7, 10, ... cycles");
    end
    // 2-4
    bus(0, 1, 20, 32'd0, rd, n);
    for (int c = 0; c < NC; c++) fork automatic int cc = c; job_writes(cc); join_none
    wait fork;
    check(maxlat <= 4 + 3 * (NC - 1), $sformatf("worst access under sustained contention %0d <= %0d cycles",
                                                maxlat, 4 + 3 * (NC - 1)));
    for (int c = 0; c < NC; c++) fork automatic int cc = c; job_counter(cc); join_none
    wait fork;
    bus(0, 0, 20, 0, rd, n);
    check(rd == NC * INCS, $sformatf("global-lock counter %0d, expected %0d", rd, NC * INCS));
    for (int c = 0; c < NC; c++) fork automatic int cc = c; job_block(cc); join_none
    wait fork;
    begin
      int bad = 0;
      for (int c = 0; c < NC; c++) for (int k = 0; k < 16; k++) begin
        bus(0, 0, 64 + 32 * c + k, 0, rd, n);
        if (rd != DW'(1000 * c + k)) bad++;
      end
      check(bad == 0, $sformatf("block writes: %0d words wrong", bad));
    end
    // 5. barriers
    for (int c = 0; c < NC; c++) fork automatic int cc = c; bar_subsets(cc); join_none
    wait fork;
    check(t_leave[0] < t_last_arrival && t_leave[1] < t_last_arrival, "pair 0/1 leaves without waiting for the others");
    for (int c = 2; c < NC - 1; c++)
      check(t_leave[c] > t_last_arrival, $sformatf("core %0d waits for the last core of complex barrier id 1", c));
    for (int c = 0; c < NC; c++) fork automatic int cc = c; bar_all(cc); join_none
    wait fork;
    for (int c = 0; c < NC - 1; c++)
      check(t_leave[c] > t_last_arrival, $sformatf("core %0d held by the all-core complex barrier", c));
    $display("%0d cores, mechanisms: race stalls %0d, block bypasses %0d, global lock waits %0d, barrier waits extended %0d complex %0d",
             NC, n_stall, n_bypass, n_glk_wait, n_bar_ext, n_bar_cplx);
    check(n_stall > 0, "race stalls happened");
    check(n_bypass > 0, "block bypasses happened");
    check(n_glk_wait > 0, "global lock waits happened");
    check(n_bar_ext > 0 && n_bar_cplx > 0, "extended and complex barrier waits happened");
    done = 1;
  end
endmodule
