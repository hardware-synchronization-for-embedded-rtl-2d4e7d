// tb_global_lock: self-checking test of the global lock bit.
//
// Three cores contend: the lock must be granted one cycle after the request, to one
// core at a time, in rotating order (0, 1, 2 when all request together), must ignore a
// release from a core that does not hold it, and must not be granted while a memory
// block is locked (mutual exclusion with address-sensitive locking).
module tb_global_lock;
  localparam int unsigned N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, rel;
  logic any_block_locked;
  logic held;
  logic [1:0] holder;
  int checks = 0, failures = 0;

  global_lock #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (held=%0d holder=%0d)", what, held, holder); end
  endtask

  task automatic cyc(); @(negedge clk); endtask

  initial begin
    req = 0; rel = 0; any_block_locked = 0;
    cyc(); cyc(); rst_n = 1;
    cyc();
    check(!held, "free after reset");
    // All three request in the same cycle
    req = 3'b111;
    cyc();
    check(held && holder == 0, "core 0 wins first");
    req[0] = 0;
    // non-holder release is ignored
    rel = 3'b010; cyc(); rel = 0;
    check(held && holder == 0, "release from non-holder ignored");
    repeat (3) begin cyc(); check(held && holder == 0, "lock kept while held"); end
    rel[0] = 1; cyc(); rel = 0;
    check(!held, "released");
    cyc();
    check(held && holder == 1, "core 1 next");
    req[1] = 0; rel[1] = 1; cyc(); rel = 0; cyc();
    check(held && holder == 2, "core 2 next");
    req[2] = 0; rel[2] = 1; cyc(); rel = 0;
    check(!held, "free again");
    // Blocked while a memory block is locked
    any_block_locked = 1; req = 3'b001;
    repeat (4) begin cyc(); check(!held, "not granted while a block is locked"); end
    any_block_locked = 0;
    cyc();
    check(held && holder == 0, "granted once the block is released");
    req = 0; rel = 3'b001; cyc(); rel = 0;
    // Rotation: core 1 last had priority after core 0 won -> with 0 and 2 requesting,
    // core 2 must win (priority now at core 1)
    req = 3'b101; cyc();
    check(held && holder == 2, "rotating priority passes core 0");
    req[2] = 0; rel = 3'b100; cyc(); rel = 0; cyc();
    check(held && holder == 0, "core 0 served afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
