// tb_shared_mem: self-checking test of the multi-port shared memory.
//
// Two ports (the dual-ported configuration) issue random reads and writes; writes of
// the two ports never hit the same word in one cycle, as the controller guarantees. A
// reference array predicts every read, which must appear exactly one cycle after the
// enable, including a read-first result when a port writes the word it reads.
module tb_shared_mem;
  localparam int unsigned NP = 2, WORDS = 64, DW = 32;
  logic clk = 0;
  logic [NP-1:0] en, we;
  logic [NP-1:0][5:0] addr;
  logic [NP-1:0][DW-1:0] wdata, rdata;
  logic [DW-1:0] model [WORDS];
  logic [NP-1:0][DW-1:0] exp_q;
  logic [NP-1:0] chk_q;
  int checks = 0, failures = 0;

  shared_mem #(.NPORTS(NP), .WORDS(WORDS), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) model[w] = '0;
    en = 0; we = 0; addr = 0; wdata = 0; chk_q = 0;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      for (int p = 0; p < NP; p++) begin
        en[p] = ($urandom % 4) != 0;
        we[p] = $urandom % 2;
        addr[p] = 6'($urandom % 16);
        wdata[p] = $urandom;
      end
      if (en[0] && en[1] && we[0] && we[1] && addr[0] == addr[1]) we[1] = 0;
      // a read on one port of a word written by the other in the same cycle is not
      // used by the controller; avoid it
      if (en[0] && en[1] && addr[0] == addr[1] && (we[0] || we[1])) en[1] = 0;
      @(posedge clk);
      // compare results of the previous cycle's reads
      for (int p = 0; p < NP; p++) if (chk_q[p]) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++; $display("FAIL: port %0d read %h expected %h", p, rdata[p], exp_q[p]);
        end
      end
      for (int p = 0; p < NP; p++) begin
        chk_q[p] = en[p];
        exp_q[p] = model[addr[p]];
      end
      for (int p = 0; p < NP; p++) if (en[p] && we[p]) model[addr[p]] = wdata[p];
      #1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
