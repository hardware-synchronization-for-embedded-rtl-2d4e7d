// core_fsm: the core-side logic of the Multi-Access Controller, one instance per core.
//
// It accepts one bus access of its core at a time and keeps the core blocked (no
// acknowledge) until the access is complete. The core's word address has one bit more
// than the shared memory: with the top bit clear the access goes to the shared memory,
// with it set to the controller's registers (mactrl_pkg::reg_e).
//  - Shared memory: the FSM enters the race (CS_ARB) and waits for its grant, drives
//    its memory port for one cycle (CS_MEM) and acknowledges with the read data
//    (CS_RESP). Uncontended, an access takes 4 cycles from the request to the
//    acknowledge, inclusive; when the other core of a dual-core system wins the race
//    first, it takes 7 (matching the best and worst single-access cycle counts the
//    paper reports for the controller).
//  - Registers: the FSM issues a one-cycle command to the inter-core logic (CS_REG).
//    Writes that must wait - acquiring the global lock, locking a block (upper address
//    register) and the three barriers - hold the core in CS_WAIT until the inter-core
//    logic reports success. Register reads return a status word:
//    bits [31:16] core number, [15:8] number of cores, [1] holds the global lock,
//    [0] holds a block lock.
// Bus protocol (this design's own; the paper's cores use a vendor memory interface):
// the core raises req with we/addr/wdata and holds them until ack, which is high for
// one cycle with rdata. The FSM accepts a new request in the cycle after ack.
module core_fsm
  import mactrl_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter int unsigned CORE_ID = 0,
  parameter int unsigned DW      = 32,
  parameter int unsigned MAW     = 11,
  localparam int unsigned AW     = MAW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // core bus
  input  logic           bus_req,
  input  logic           bus_we,
  input  logic [AW-1:0]  bus_addr,
  input  logic [DW-1:0]  bus_wdata,
  output logic [DW-1:0]  bus_rdata,
  output logic           bus_ack,
  // access race
  output logic           race_req,
  output logic           race_we,
  output logic [MAW-1:0] race_addr,
  input  logic           race_grant,
  output logic           race_done,
  // shared memory port
  output logic           mem_en,
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output logic [DW-1:0]  mem_wdata,
  input  logic [DW-1:0]  mem_rdata,
  // global lock
  output logic           glk_req,
  output logic           glk_rel,
  input  logic           glk_mine,
  // address-sensitive lock
  output logic           blk_lo_we,
  output logic           blk_hi_we,
  output logic           blk_rel,
  output logic [MAW-1:0] blk_addr,
  input  logic           blk_mine,
  // barriers
  output logic           bar_arrive,
  output bar_kind_e      bar_kind,
  output logic [DW-1:0]  bar_arg,
  input  logic           bar_release
);
  core_state_e   state;
  logic          we_r;
  logic [AW-1:0] addr_r;
  logic [DW-1:0] wdata_r;
  reg_e          reg_idx;
  logic          is_reg;

  assign is_reg  = addr_r[AW-1];
  assign reg_idx = reg_e'(addr_r[REG_IDX_W-1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= CS_IDLE;
      we_r    <= 1'b0;
      addr_r  <= '0;
      wdata_r <= '0;
    end else begin
      unique case (state)
        CS_IDLE: if (bus_req) begin
          we_r    <= bus_we;
          addr_r  <= bus_addr;
          wdata_r <= bus_wdata;
          state   <= bus_addr[AW-1] ? CS_REG : CS_ARB;
        end
        CS_ARB:  if (race_grant) state <= CS_MEM;
        CS_MEM:  state <= CS_RESP;
        CS_REG: begin
          state <= CS_RESP;
          if (we_r) begin
            unique case (reg_idx)
              REG_GLOCK_ACQ: if (!glk_mine) state <= CS_WAIT;
              REG_ALOCK_HI, REG_BAR_SIMPLE, REG_BAR_EXT, REG_BAR_CPLX: state <= CS_WAIT;
              default: ;
            endcase
          end
        end
        CS_WAIT: begin
          unique case (reg_idx)
            REG_GLOCK_ACQ: if (glk_mine)    state <= CS_RESP;
            REG_ALOCK_HI:  if (blk_mine)    state <= CS_RESP;
            default:       if (bar_release) state <= CS_RESP;
          endcase
        end
        CS_RESP: state <= CS_IDLE;
        default: state <= CS_IDLE;
      endcase
    end
  end

  // Race and memory port
  assign race_req  = (state == CS_ARB);
  assign race_we   = we_r;
  assign race_addr = addr_r[MAW-1:0];
  assign race_done = (state == CS_RESP) && !is_reg;
  assign mem_en    = (state == CS_MEM);
  assign mem_we    = (state == CS_MEM) && we_r;
  assign mem_addr  = addr_r[MAW-1:0];
  assign mem_wdata = wdata_r;

  // Register commands
  logic reg_wr;
  assign reg_wr     = (state == CS_REG) && we_r;
  assign glk_req    = (state == CS_WAIT) && (reg_idx == REG_GLOCK_ACQ);
  assign glk_rel    = reg_wr && (reg_idx == REG_GLOCK_REL);
  assign blk_lo_we  = reg_wr && (reg_idx == REG_ALOCK_LO);
  assign blk_hi_we  = reg_wr && (reg_idx == REG_ALOCK_HI);
  assign blk_rel    = reg_wr && (reg_idx == REG_ALOCK_REL);
  assign blk_addr   = wdata_r[MAW-1:0];
  assign bar_arrive = reg_wr && (reg_idx == REG_BAR_SIMPLE || reg_idx == REG_BAR_EXT ||
                                 reg_idx == REG_BAR_CPLX);
  assign bar_kind   = (reg_idx == REG_BAR_EXT)  ? BAR_EXT :
                      (reg_idx == REG_BAR_CPLX) ? BAR_COMPLEX : BAR_SIMPLE;
  assign bar_arg    = wdata_r;

  // Response
  logic [31:0] status;
  assign status    = {16'(CORE_ID), 8'(N), 6'd0, glk_mine, blk_mine};
  assign bus_ack   = (state == CS_RESP);
  assign bus_rdata = is_reg ? DW'(status) : mem_rdata;

  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) bus_ack |=> !bus_ack);

endmodule
