// tb_rr_arbiter: self-checking test of the rotating-priority access race.
//
// A 4-input arbiter is driven with random request vectors and enables. A reference
// pointer kept by the testbench predicts the winner of every cycle (first requester at
// or after the pointer, pointer moving past each winner). A directed phase with all
// cores requesting checks that grants visit every core in turn (the fairness bound of
// N-1 foreign grants), and a phase with one lone requester checks that idle cores
// cannot win.
module tb_rr_arbiter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic en;
  logic [1:0] gnt_idx;
  logic gnt_valid;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_idx(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  task automatic step_check();
    int e;
    #1;
    e = en ? expect_idx(req, ptr) : -1;
    checks++;
    if (e < 0) begin
      if (gnt_valid || gnt != 0) begin failures++; $display("FAIL: grant %b without winner", gnt); end
    end else if (!gnt_valid || gnt_idx != e || gnt != (1 << e)) begin
      failures++; $display("FAIL: req=%b ptr=%0d expected %0d got %b", req, ptr, e, gnt);
    end
    @(posedge clk);
    if (e >= 0) ptr = (e + 1) % N;
    #1;
  endtask

  initial begin
    req = 0; en = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // All request: strict rotation 0,1,2,3,0,...
    for (int c = 0; c < 8; c++) begin
      req = '1; en = 1;
      #1;
      checks++;
      if (gnt_idx != c % N) begin failures++; $display("FAIL: rotation %0d got %0d", c, gnt_idx); end
      @(posedge clk); ptr = (c % N + 1) % N; #1;
    end
    // Lone requester always wins, others never do
    for (int c = 0; c < 6; c++) begin
      req = 4'b0100; en = 1;
      step_check();
    end
    // Random
    for (int c = 0; c < 2000; c++) begin
      req = N'($urandom);
      en  = ($urandom % 4) != 0;
      step_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
