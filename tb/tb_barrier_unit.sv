// tb_barrier_unit: self-checking test of the simple, extended and complex barriers.
//
// Four cores. Directed scenarios check that a lone core stays blocked, that the
// release comes in the cycle after the partner's arrival strobe, that an extended
// barrier waits for exactly the cores in its mask (including the chained case where a
// released core still counts for a partner waiting for more cores), and that complex
// barriers with different ids do not mix and release after the requested count.
module tb_barrier_unit;
  import mactrl_pkg::*;
  localparam int unsigned N = 4, DW = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] arrive, waiting, release_o;
  bar_kind_e [N-1:0] kind;
  logic [N-1:0][DW-1:0] arg;
  logic [N-1:0] left;  // cores that have been released since the last clear
  int checks = 0, failures = 0;

  barrier_unit #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) left <= left | release_o;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (waiting=%b left=%b)", what, waiting, left); end
  endtask

  task automatic cyc(); @(negedge clk); endtask

  task automatic enter(int c, bar_kind_e k, logic [DW-1:0] a);
    arrive[c] = 1; kind[c] = k; arg[c] = a;
  endtask

  task automatic strobe(); cyc(); arrive = 0; endtask

  initial begin
    arrive = 0; arg = 0; kind = {N{BAR_SIMPLE}}; left = 0;
    cyc(); cyc(); rst_n = 1; cyc();
    // Simple barrier: core 0 alone waits
    enter(0, BAR_SIMPLE, 32'hdead); strobe();
    repeat (4) begin check(!release_o[0] && waiting[0], "lone core blocked"); cyc(); end
    // core 2 arrives: both released in the cycle after the strobe
    enter(2, BAR_SIMPLE, 32'h0); strobe();
    check(release_o[0] && release_o[2], "simple barrier releases both partners at once");
    cyc();
    check(waiting == 0, "nobody waiting after release");
    left = 0;
    // Extended: core 0 waits for {1,3}; core 1 waits for {0}; core 3 waits for {0}
    enter(0, BAR_EXT, 32'b1010); strobe();
    enter(1, BAR_EXT, 32'b0001); strobe();
    check(release_o[1] && !release_o[0], "core 1 released, core 0 still needs core 3");
    cyc(); cyc();
    check(waiting[0] && !left[0], "core 0 waits for core 3");
    enter(3, BAR_EXT, 32'b0001); strobe();
    check(release_o[0] && release_o[3], "core 0 counts core 1 met earlier and now core 3");
    cyc();
    check(waiting == 0, "extended barrier done");
    left = 0;
    // Extended and simple barriers do not mix
    enter(0, BAR_EXT, 32'b0100); strobe();
    enter(2, BAR_SIMPLE, 32'h0); strobe();
    repeat (3) begin check(!release_o[0] && !release_o[2], "different kinds do not meet"); cyc(); end
    enter(1, BAR_SIMPLE, 32'h0); strobe();
    check(release_o[1] && release_o[2] && !release_o[0], "simple pair 1,2 released");
    cyc();
    enter(2, BAR_EXT, 32'b0001); strobe();
    check(release_o[0] && release_o[2], "extended pair 0,2 released");
    cyc(); left = 0;
    // Complex: id 5 count 2 for cores 0,1,3; id 7 count 1 for core 2
    enter(0, BAR_COMPLEX, {16'd0, 8'd5, 8'd2}); enter(2, BAR_COMPLEX, {16'd0, 8'd7, 8'd1}); strobe();
    enter(1, BAR_COMPLEX, {16'd0, 8'd5, 8'd2}); strobe();
    repeat (3) begin check(release_o == 0, "complex id 5 needs three cores, id 7 needs a partner"); cyc(); end
    enter(3, BAR_COMPLEX, {16'd0, 8'd5, 8'd2}); strobe();
    check(release_o == 4'b1011, "complex id 5 releases its three cores together");
    cyc();
    check(waiting == 4'b0100, "id 7 still waiting");
    enter(1, BAR_COMPLEX, {16'd0, 8'd7, 8'd1}); strobe();
    check(release_o == 4'b0110, "complex id 7 pair released");
    cyc();
    check(waiting == 0, "all released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
