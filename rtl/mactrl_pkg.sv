// mactrl_pkg: constants and types shared by the Multi-Access Controller (MACtrl).
//
// The controller is reached by every core through one word-addressed bus port. The
// most significant address bit selects between the shared memory (0) and the
// controller's register file (1). The register indices, the barrier kinds and the
// field layout of the complex-barrier argument are defined here. The paper names
// the registers (lower/upper block address, barrier registers, global lock) but gives
// no map or encoding: the numbering below is this design's own choice.
package mactrl_pkg;

  // Register index, taken from the low address bits when the register space is selected.
  typedef enum logic [3:0] {
    REG_STATUS    = 4'd0,  // read: status word (see core_fsm); write: no effect
    REG_GLOCK_ACQ = 4'd1,  // write: acquire the global lock, core blocked until it holds it
    REG_GLOCK_REL = 4'd2,  // write: release the global lock
    REG_ALOCK_LO  = 4'd3,  // write: lower word address of the block to lock (inclusive)
    REG_ALOCK_HI  = 4'd4,  // write: upper word address (inclusive), starts the lock attempt
    REG_ALOCK_REL = 4'd5,  // write: release the locked block
    REG_BAR_SIMPLE= 4'd6,  // write (any value): simple barrier
    REG_BAR_EXT   = 4'd7,  // write (bit mask of cores): extended simple barrier
    REG_BAR_CPLX  = 4'd8   // write ({id, count}): complex barrier
  } reg_e;

  localparam int unsigned REG_IDX_W = 4;

  // Barrier kinds as held by the barrier unit for a waiting core.
  typedef enum logic [1:0] {
    BAR_SIMPLE  = 2'd0,
    BAR_EXT     = 2'd1,
    BAR_COMPLEX = 2'd2
  } bar_kind_e;

  // Complex barrier argument: bits [7:0] number of other cores to wait for,
  // bits [15:8] barrier identifier (cores meet only with cores of the same id).
  localparam int unsigned BAR_CNT_LSB = 0;
  localparam int unsigned BAR_CNT_W   = 8;
  localparam int unsigned BAR_ID_LSB  = 8;
  localparam int unsigned BAR_ID_W    = 8;

  // States of the core-side finite state machine.
  typedef enum logic [2:0] {
    CS_IDLE, // waiting for a bus request
    CS_ARB,  // shared-memory access: taking part in the race
    CS_MEM,  // shared-memory access: memory port driven
    CS_REG,  // register access: command issued to the inter-core logic
    CS_WAIT, // blocked on the global lock, a block lock or a barrier
    CS_RESP  // acknowledge to the core
  } core_state_e;

endpackage
