// barrier_unit: hardware barriers for event synchronization between the cores.
//
// A core enters a barrier by writing one of three barrier registers; its bus access
// then stays blocked until the barrier lets it leave. Three kinds exist:
//  - simple barrier: the value written is ignored; the core leaves as soon as at least
//    one other core has entered a simple barrier too (the point-to-point meeting of two
//    cores);
//  - extended simple barrier: the value is a bit mask, bit j standing for core j; the
//    core leaves once every core named in the mask (other than itself) has entered an
//    extended barrier;
//  - complex barrier: the value carries a barrier id and a count K; the core leaves
//    once K other cores have entered the complex barrier with the same id. Software
//    needs no core numbers, and different ids form independent barriers for different
//    subsets of cores.
// Each waiting core keeps a "met" vector: bit j is set in a cycle where core i and
// core j are both waiting at compatible barriers, and is kept after j has left. This
// way a core that is released early still counts for a partner that waits for more
// cores. A core's vector is cleared when it leaves. The paper gives the behaviour of
// the three kinds; the met-vector mechanism and the encodings are this design's own.
//
// Interface: arrive[i] is a one-cycle strobe with kind[i] and arg[i]; release[i] is
// high (combinationally) in the cycle core i may leave, the earliest being the cycle
// after its arrival strobe, and waiting[i] drops at the following clock edge.
module barrier_unit
  import mactrl_pkg::*;
#(
  parameter int unsigned N  = 2,
  parameter int unsigned DW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         arrive,
  input  bar_kind_e [N-1:0]    kind,
  input  logic [N-1:0][DW-1:0] arg,
  output logic [N-1:0]         waiting,
  output logic [N-1:0]         release_o
);
  bar_kind_e [N-1:0]              kind_r;
  logic [N-1:0][N-1:0]            mask_r;
  logic [N-1:0][BAR_ID_W-1:0]     id_r;
  logic [N-1:0][BAR_CNT_W-1:0]    cnt_r;
  logic [N-1:0][N-1:0]            met_r;
  logic [N-1:0][N-1:0]            met_now;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      met_now[i] = met_r[i];
      for (int unsigned j = 0; j < N; j++) begin
        if (j != i && waiting[i] && waiting[j] && kind_r[i] == kind_r[j] &&
            (kind_r[i] != BAR_COMPLEX || id_r[i] == id_r[j]))
          met_now[i][j] = 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic [N-1:0] need;
      int unsigned  nmet;
      need = mask_r[i];
      need[i] = 1'b0;
      nmet = 0;
      for (int unsigned j = 0; j < N; j++) nmet += int'(met_now[i][j]);
      unique case (kind_r[i])
        BAR_SIMPLE:  release_o[i] = waiting[i] && (|met_now[i]);
        BAR_EXT:     release_o[i] = waiting[i] && ((need & ~met_now[i]) == '0);
        BAR_COMPLEX: release_o[i] = waiting[i] && (nmet >= int'(cnt_r[i]));
        default:     release_o[i] = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      waiting <= '0;
      met_r   <= '0;
      kind_r  <= {N{BAR_SIMPLE}};
      mask_r  <= '0;
      id_r    <= '0;
      cnt_r   <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (arrive[i]) begin
          waiting[i] <= 1'b1;
          met_r[i]   <= '0;
          kind_r[i]  <= kind[i];
          mask_r[i]  <= arg[i][N-1:0];
          id_r[i]    <= arg[i][BAR_ID_LSB +: BAR_ID_W];
          cnt_r[i]   <= arg[i][BAR_CNT_LSB +: BAR_CNT_W];
        end else if (release_o[i]) begin
          waiting[i] <= 1'b0;
          met_r[i]   <= '0;
        end else begin
          met_r[i]   <= met_now[i];
        end
      end
    end
  end

  a_arrive_idle: assert property (@(posedge clk) disable iff (!rst_n) (arrive & waiting) == '0);

endmodule
