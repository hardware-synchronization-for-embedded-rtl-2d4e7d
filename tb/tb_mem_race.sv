// tb_mem_race: self-checking test of the shared-memory access race.
//
// Three cores are modelled by simple request generators: a core raises req, and once
// granted through the race it reports done two cycles later (the controller's MEM and
// RESP cycles). Directed cases check one winner per cycle among writers, the rotation
// of the winner, concurrent reads, the bypass into a core's own locked block while the
// memory is busy, the exclusion from blocks locked by other cores and the exclusion of
// all but the global lock holder. A random phase checks that a written word is never
// held by two race winners and that every request is served within a bound.
module tb_mem_race;
  localparam int unsigned N = 3, AW = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, we, done, blk_held, grant, bypass;
  logic [N-1:0][AW-1:0] addr, blk_lo, blk_hi;
  logic glk_held;
  logic [1:0] glk_holder;
  logic concurrent_reads, busy;
  int checks = 0, failures = 0;

  mem_race #(.N(N), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (req=%b grant=%b busy=%0d)", what, req, grant, busy); end
  endtask

  // core models: done two cycles after a race grant (not after a bypass)
  logic [N-1:0] d1, d2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin d1 <= 0; d2 <= 0; end
    else begin d1 <= grant & ~bypass; d2 <= d1; end
  end
  assign done = d2;

  task automatic cyc(); @(negedge clk); endtask

  initial begin
    int waited [N];
    req = 0; we = 0; addr = 0; blk_held = 0; blk_lo = 0; blk_hi = 0; glk_held = 0; glk_holder = 0;
    cyc(); cyc(); rst_n = 1; cyc();
    // 1. cores 0 and 1 write the same word: core 0 wins, core 1 after core 0 is done
    req = 3'b011; we = 3'b011; addr[0] = 8'd4; addr[1] = 8'd4;
    #1 check(grant == 3'b001, "one winner per cycle, core 0 first");
    cyc(); req[0] = 0;
    #1 check(busy && grant == 0, "core 1 blocked while core 0 owns the memory");
    cyc();
    #1 check(busy && grant == 0, "still blocked in core 0's last cycle");
    cyc();
    #1 check(grant == 3'b010, "core 1 granted three cycles after core 0");
    cyc(); req = 0; cyc(); cyc();
    // 2. rotation: all three write, priority is at core 2 now
    req = 3'b111; we = 3'b111;
    #1 check(grant == 3'b100, "rotating priority: core 2 wins");
    cyc(); req[2] = 0; req = 0; cyc(); cyc();
    // 3. concurrent reads
    req = 3'b111; we = 3'b000; addr = '0;
    #1 check(grant == 3'b111 && concurrent_reads, "all readers granted together");
    cyc(); req = 0; cyc(); cyc();
    // 4. bypass into own block while memory busy
    blk_held = 3'b010; blk_lo[1] = 8'd16; blk_hi[1] = 8'd31;
    req = 3'b001; we = 3'b001; addr[0] = 8'd2;
    #1 check(grant == 3'b001, "core 0 wins race");
    cyc(); req = 3'b010; we = 3'b010; addr[1] = 8'd20;
    #1 check(busy && grant == 3'b010 && bypass == 3'b010, "owner of a block bypasses a busy race");
    cyc(); req = 0; cyc(); cyc();
    // 5. other cores are kept out of a locked block
    req = 3'b001; we = 3'b001; addr[0] = 8'd25;
    repeat (3) begin #1 check(grant == 0, "no access into another core's block"); cyc(); end
    blk_held = 0;
    #1 check(grant == 3'b001, "access allowed after block release");
    cyc(); req = 0; cyc(); cyc();
    // 6. global lock: only the holder competes
    glk_held = 1; glk_holder = 2'd1;
    req = 3'b011; we = 3'b011; addr[0] = 8'd1; addr[1] = 8'd1;
    #1 check(grant == 3'b010, "only the global lock holder is granted");
    cyc(); req[1] = 0;
    repeat (4) begin #1 check(grant == 0, "others wait while the global lock is held"); cyc(); end
    glk_held = 0;
    #1 check(grant == 3'b001, "others served after release");
    cyc(); req = 0; cyc(); cyc();
    // 7. random traffic: safety and bounded waiting
    for (int i = 0; i < N; i++) waited[i] = 0;
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < N; i++) if (!req[i]) begin
        req[i] = ($urandom % 2) != 0; we[i] = ($urandom % 2) != 0; addr[i] = AW'($urandom % 4);
      end
      #1;
      checks++;
      if ((grant & ~req) != 0 || ((grant & we) != 0 && !$onehot(grant))) begin
        failures++; $display("FAIL: unsafe grant %b req=%b we=%b", grant, req, we);
      end
      for (int i = 0; i < N; i++) begin
        if (grant[i]) waited[i] = 0; else if (req[i]) waited[i]++;
        if (waited[i] > 3 * N) begin failures++; waited[i] = 0; $display("FAIL: core %0d starved", i); end
      end
      cyc();
      req = req & ~grant_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] grant_q;
  always_ff @(posedge clk) grant_q <= grant;
endmodule
