// rbc_pkg: types and constants shared by the Rollback Chip modules.
//
// The chip keeps NFRAMES mark frames (one written bit per frame and word,
// packed in one NFRAMES-bit word per address) plus one archive frame whose
// frame number is NFRAMES. NFRAMES = 32 follows the 32-bit written-bits word
// of the design; the other sizes are this design's own choices and are set
// as parameters of the modules.
package rbc_pkg;

  // Operations the host issues to the chip.
  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_RESET    = 3'd1,
    OP_READ     = 3'd2,
    OP_WRITE    = 3'd3,
    OP_MARK     = 3'd4,
    OP_ROLLBACK = 3'd5,
    OP_ADVANCE  = 3'd6
  } rbc_op_e;

  // Events of the written-bits / timestamp / advance-counter store.
  typedef enum logic [2:0] {
    WBTS_NOP    = 3'd0,
    WBTS_READ   = 3'd1,
    WBTS_WRITE  = 3'd2,
    WBTS_RESET  = 3'd3,
    WBTS_CLRWAC = 3'd4,
    WBTS_UPWAC  = 3'd5
  } wbts_ev_e;

  // Events of the rollback history stack.
  typedef enum logic [1:0] {
    RBH_NOP    = 2'd0,
    RBH_READ   = 2'd1,
    RBH_UPDATE = 2'd2,
    RBH_SETALL = 2'd3
  } rbh_ev_e;

  // Events of a frame pointer register (CMF, OMF).
  typedef enum logic [2:0] {
    FP_NOP   = 3'd0,
    FP_CLEAR = 3'd1,
    FP_UP    = 3'd2,
    FP_DOWN  = 3'd3,
    FP_LOAD  = 3'd4
  } fp_ev_e;

  // Events of the rollback index counter.
  typedef enum logic [1:0] {
    CRBI_NOP = 2'd0,
    CRBI_CLR = 2'd1,
    CRBI_UP  = 2'd2
  } crbi_ev_e;

  // Events of the RAM.
  typedef enum logic [1:0] {
    RAM_NOP   = 2'd0,
    RAM_READ  = 2'd1,
    RAM_WRITE = 2'd2
  } ram_ev_e;

  // Error codes reported with the completion of an operation.
  typedef enum logic [2:0] {
    ERR_NONE      = 3'd0,
    ERR_MARK_OVF  = 3'd1,  // mark would make CMF equal to OMF
    ERR_RB_UNDER  = 3'd2,  // rollback left no frame: CMF is the archive frame
    ERR_ADV_OVF   = 3'd3,  // advance with OMF equal to CMF
    ERR_RBH_FULL  = 3'd4,  // no rollback history entry left
    ERR_NEED_RST  = 3'd5   // an underflow happened; only reset is accepted
  } rbc_err_e;

endpackage
