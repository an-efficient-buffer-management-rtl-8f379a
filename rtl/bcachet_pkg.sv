// bcachet_pkg: shared encodings of the BCachet coherence system.
//
// Holds the message commands, the 14 cache states (4 bits, as the protocol
// description counts them), the five memory-state kinds, the processor
// operations and the codes of the voluntary rules that an external policy
// may request. Message and line layouts depend on the system size and are
// declared inside each module from its parameters; the field order is
// {cmd, site, a, hasv, v} everywhere.
//
// Commands, states and message classes (high/low/one path) follow the
// protocol tables. The numeric encodings and the voluntary-rule codes are
// this implementation's own choice.
package bcachet_pkg;

  // Message commands. Cache_b of the original protocol is carried by a
  // CacheAck that holds a value.
  typedef enum logic [4:0] {
    CMD_CACHEREQ   = 5'd0,
    CMD_WB         = 5'd1,
    CMD_DOWN_WB    = 5'd2,
    CMD_DOWN_MW    = 5'd3,
    CMD_DOWNV_MW   = 5'd4,
    CMD_DOWN_MB    = 5'd5,
    CMD_DOWNV_MB   = 5'd6,
    CMD_ERFRTAG    = 5'd7,
    CMD_CACHE_W    = 5'd8,
    CMD_CACHE_M    = 5'd9,
    CMD_UP_WM      = 5'd10,
    CMD_WBACK_B    = 5'd11,
    CMD_DOWNREQ_WB = 5'd12,
    CMD_DOWNREQ_MW = 5'd13,
    CMD_DOWNREQ_MB = 5'd14,
    CMD_CACHEACK   = 5'd15,
    CMD_CACHENACK  = 5'd16,
    CMD_WBNACK     = 5'd17
  } cmd_e;

  // Cache states: Invalid (a not in cache), six stable, two transient and
  // five locked states (a stable state plus a held message).
  typedef enum logic [3:0] {
    CS_INV       = 4'd0,
    CS_CB        = 4'd1,   // Clean_b
    CS_DB        = 4'd2,   // Dirty_b
    CS_CW        = 4'd3,   // Clean_w
    CS_DW        = 4'd4,   // Dirty_w
    CS_CM        = 4'd5,   // Clean_m
    CS_DM        = 4'd6,   // Dirty_m
    CS_WBP       = 4'd7,   // WbPending
    CS_CP        = 4'd8,   // CachePending
    CS_L_CB_DWB  = 4'd9,   // (Clean_b, Down_wb)
    CS_L_CB_DMB  = 4'd10,  // (Clean_b, Down_mb)
    CS_L_CW      = 4'd11,  // (Clean_w, -)
    CS_L_CW_DMW  = 4'd12,  // (Clean_w, Down_mw)
    CS_L_CM      = 4'd13   // (Clean_m, -)
  } cstate_e;

  // Memory-state kinds. The directories and the suspended-writeback list
  // live in the shared Dir and GM tables (plus one in-line directory slot).
  typedef enum logic [2:0] {
    MS_CW  = 3'd0,  // Cw[dir]
    MS_TW  = 3'd1,  // Tw[dir1, dir2, gm]
    MS_CM  = 3'd2,  // Cm[id]
    MS_TM  = 3'd3,  // Tm[id, gm]
    MS_TPM = 3'd4   // T'm[id]
  } mkind_e;

  // Processor instructions (CRF).
  typedef enum logic [2:0] {
    OP_LOADL     = 3'd0,
    OP_STOREL    = 3'd1,
    OP_COMMIT    = 3'd2,
    OP_RECONCILE = 3'd3,
    OP_FENCE     = 3'd4
  } op_e;

  // Voluntary cache-engine rules an adaptivity policy may request.
  typedef enum logic [2:0] {
    VC_PURGE    = 3'd0,  // VC1
    VC_WB       = 3'd1,  // VC2, VC5
    VC_DOWN_WB  = 3'd2,  // VC3, VC4, VC11, VC12
    VC_DOWN_MW  = 3'd3,  // VC6, VC8, VC13
    VC_DOWN_MB  = 3'd4,  // VC7, VC9, VC14
    VC_CACHEREQ = 3'd5   // VC10
  } vc_op_e;

  // Voluntary memory-engine rules.
  typedef enum logic [2:0] {
    VM_CACHE_W    = 3'd0,  // VM1
    VM_UP_WM      = 3'd1,  // VM2
    VM_CACHE_M    = 3'd2,  // VM3
    VM_DOWNREQ_WB = 3'd3,  // VM4
    VM_DOWNREQ_MW = 3'd4,  // VM5
    VM_DOWNREQ_MB = 3'd5,  // VM6
    VM_TPM_WB     = 3'd6   // VM7
  } vm_op_e;

  // Cache-to-memory path selection: responses use the high-priority FIFO,
  // requests (CacheReq, Wb) the low-priority FIFO.
  function automatic logic is_low_prio(cmd_e c);
    return (c == CMD_CACHEREQ) || (c == CMD_WB);
  endfunction

  // Number of memory-engine event counters exported for observation.
  localparam int NUM_MEV = 12;
  // Indices of the memory-engine events.
  localparam int MEV_STQ_PUSH   = 0;   // request parked in STQ
  localparam int MEV_CACHENACK  = 1;   // CacheNack sent
  localparam int MEV_WBNACK     = 2;   // WbNack sent
  localparam int MEV_FR_LOAD    = 3;   // request moved into FR (CHB1/WBC1)
  localparam int MEV_FR_SERVE   = 4;   // request served from FR
  localparam int MEV_GM_SUSPEND = 5;   // writeback id suspended in GM
  localparam int MEV_WBACK      = 6;   // WbAck_b released from GM (GM1)
  localparam int MEV_DOWNREQ    = 7;   // DownReq sent (any kind)
  localparam int MEV_CACHEACK_V = 8;   // CacheAck carrying data
  localparam int MEV_CACHEACK_D = 9;   // dummy CacheAck (no data)
  localparam int MEV_VOLUNTARY  = 10;  // voluntary memory rule fired
  localparam int MEV_ERFRTAG    = 11;  // FRTAG erased by a served request

endpackage
