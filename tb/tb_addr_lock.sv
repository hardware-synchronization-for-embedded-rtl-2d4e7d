// tb_addr_lock: self-checking test of address-sensitive block locking.
//
// Two cores lock disjoint blocks (both granted), then one relocates its block onto the
// other's (it must wait until the other releases), a pending attempt is held back while
// the global lock is taken, and two simultaneous overlapping attempts are granted one
// at a time. No two held blocks may ever overlap.
module tb_addr_lock;
  localparam int unsigned N = 2, AW = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] lo_we, hi_we, rel;
  logic [N-1:0][AW-1:0] wdata;
  logic global_held;
  logic [N-1:0] held, pending;
  logic [N-1:0][AW-1:0] lo, hi;
  logic any_held;
  int checks = 0, failures = 0;

  addr_lock #(.N(N), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (held=%b pending=%b)", what, held, pending); end
  endtask

  task automatic cyc(); @(negedge clk); endtask

  task automatic set_block(int c, int l, int h);
    lo_we[c] = 1; wdata[c] = AW'(l); cyc(); lo_we[c] = 0;
    hi_we[c] = 1; wdata[c] = AW'(h); cyc(); hi_we[c] = 0;
  endtask

  // independent overlap monitor
  always @(posedge clk) if (rst_n && held[0] && held[1]) begin
    checks++;
    if (lo[0] <= hi[1] && lo[1] <= hi[0]) begin failures++; $display("FAIL: overlapping blocks held"); end
  end

  initial begin
    lo_we = 0; hi_we = 0; rel = 0; wdata = 0; global_held = 0;
    cyc(); cyc(); rst_n = 1; cyc();
    set_block(0, 0, 15);
    check(pending[0] && !held[0], "attempt pending after upper write");
    cyc();
    check(held[0] && lo[0] == 0 && hi[0] == 15, "core 0 holds [0,15]");
    set_block(1, 32, 47);
    cyc();
    check(held[1] && held[0], "disjoint blocks held together");
    check(any_held, "any_held set");
    // core 1 relocates onto [8,40]: overlaps core 0's block
    set_block(1, 8, 40);
    repeat (5) begin cyc(); check(pending[1] && !held[1], "overlapping attempt waits"); end
    rel[0] = 1; cyc(); rel = 0;
    check(!held[0], "core 0 released");
    cyc();
    check(held[1] && lo[1] == 8 && hi[1] == 40, "core 1 gets relocated block");
    rel[1] = 1; cyc(); rel = 0;
    check(!any_held, "all released");
    // global lock holds attempts back
    global_held = 1;
    set_block(0, 100, 110);
    repeat (3) begin cyc(); check(!held[0], "no block while global lock held"); end
    global_held = 0; cyc();
    check(held[0], "granted after global lock free");
    rel[0] = 1; cyc(); rel = 0;
    // simultaneous overlapping attempts: one granted, the other after release
    lo_we = 2'b11; wdata[0] = 8'd50; wdata[1] = 8'd55; cyc(); lo_we = 0;
    hi_we = 2'b11; wdata[0] = 8'd60; wdata[1] = 8'd70; cyc(); hi_we = 0;
    cyc();
    check($onehot(held), "only one of two overlapping attempts granted");
    begin
      int w = held[0] ? 0 : 1;
      rel[w] = 1; cyc(); rel = 0; cyc();
      check(held[1-w] && !held[w], "other attempt granted after release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
