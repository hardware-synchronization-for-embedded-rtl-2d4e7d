// shared_mem: the on-chip shared memory of the multi-core system.
//
// A word-addressed RAM with one independent synchronous port per core. With the
// default of two cores it is the dual-ported block RAM of the dual-core system, whose
// two ports allow concurrent reads; with more cores it becomes a register-file style
// multi-port memory. Each port reads and writes in the cycle its enable is high:
// a write updates the word at the clock edge, a read returns the word one cycle later
// on rdata (read-first when the same port writes). The memory itself does no
// arbitration: the controller guarantees that two ports never write the same word in
// the same cycle. Contents are cleared to zero at power-up (an FPGA block RAM is
// initialised by its configuration). The size is not given by the paper;
// 2048 words of 32 bits is this design's choice.
module shared_mem #(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned WORDS  = 2048,
  parameter int unsigned DW     = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                    clk,
  input  logic [NPORTS-1:0]       en,
  input  logic [NPORTS-1:0]       we,
  input  logic [NPORTS-1:0][AW-1:0] addr,
  input  logic [NPORTS-1:0][DW-1:0] wdata,
  output logic [NPORTS-1:0][DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];

  initial begin
    for (int unsigned w = 0; w < WORDS; w++) mem[w] = '0;
  end

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NPORTS; p++) begin
      if (en[p]) begin
        rdata[p] <= mem[addr[p]];
        if (we[p]) mem[addr[p]] <= wdata[p];
      end
    end
  end

endmodule
