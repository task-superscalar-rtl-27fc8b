// Shared types and constants of the task superscalar frontend.
//
// All frontend modules (gateway, task reservation stations, object renaming
// tables, object versioning tables, ready queue) talk through one message
// format, ts_msg_t, carried by the point-to-point message network. A message
// names its destination and source endpoint; its payload fields are used
// according to the message type. Endpoint numbering and the sizes below
// follow the frontend configuration of 8 TRSs and 2 ORT/OVT pairs; the field
// widths are this design's own choice.
package ts_pkg;

  // ---- configuration -------------------------------------------------------
  localparam int NUM_TRS      = 8;     // task reservation stations
  localparam int NUM_ORT      = 2;     // object renaming tables (one OVT each)
  localparam int MAX_OPS      = 19;    // 4 in the main block + 3 x 5 indirect
  localparam int OPS_MAIN     = 4;
  localparam int OPS_INDIRECT = 5;
  localparam int MAX_IND      = 3;
  localparam int MAX_BLOCKS   = 1 + MAX_IND;

  // ---- widths ----------------------------------------------------------------
  localparam int AW    = 40;   // physical address bits
  localparam int SW    = 21;   // object size in bytes (up to 2 MB)
  localparam int TRSW  = 3;    // TRS index
  localparam int SLOTW = 13;   // TRS slot = main block number (8K blocks max)
  localparam int IDXW  = 5;    // operand index within a task
  localparam int SERW  = 16;   // task serial number
  localparam int VERW  = 13;   // OVT version index
  localparam int SETW  = 10;   // ORT set index
  localparam int WAYW  = 4;    // ORT way index
  localparam int GWW   = 7;    // gateway buffer word address
  localparam int EPW   = 5;    // network endpoint id

  // ---- network endpoints ---------------------------------------------------
  localparam int EP_GW    = 0;
  localparam int EP_TRS0  = 1;
  localparam int EP_ORT0  = EP_TRS0 + NUM_TRS;
  localparam int EP_OVT0  = EP_ORT0 + NUM_ORT;
  localparam int EP_RQ    = EP_OVT0 + NUM_ORT;
  localparam int EP_BE    = EP_RQ + 1;
  localparam int NUM_EP   = EP_BE + 1;

  // ---- operand encoding ------------------------------------------------------
  typedef enum logic [1:0] {DIR_IN = 2'd0, DIR_OUT = 2'd1, DIR_INOUT = 2'd2} dir_e;

  // Operand descriptor as written by the task-generating thread (64 bits).
  typedef struct packed {
    logic          scalar;   // 1: scalar value (addr field holds the value)
    dir_e          dir;
    logic [SW-1:0] size;
    logic [AW-1:0] addr;
  } opdesc_t;

  // Task header word: kernel pointer and number of operands.
  typedef struct packed {
    logic [63-AW-IDXW-1:0] rsvd;
    logic [IDXW-1:0]       nops;
    logic [AW-1:0]         kernel;
  } taskhdr_t;

  // Operand id <TRS, slot, index> plus the task serial number that guards
  // against a slot that has been freed and reused.
  typedef struct packed {
    logic [TRSW-1:0]  trs;
    logic [SLOTW-1:0] slot;
    logic [IDXW-1:0]  idx;
    logic [SERW-1:0]  serial;
  } opid_t;

  // ---- messages ----------------------------------------------------------------
  typedef enum logic [3:0] {
    M_ALLOC_REQ  = 4'd0,  // GW  -> TRS : allocate nops operands (kernel, gw addr, serial)
    M_ALLOC_REP  = 4'd1,  // TRS -> GW  : slot number, gw addr, space left flag
    M_SPACE      = 4'd2,  // TRS -> GW  : TRS has room for a full-size task again
    M_OPERAND    = 4'd3,  // GW  -> ORT : memory operand to decode
    M_SCALAR     = 4'd4,  // GW  -> TRS : scalar operand value
    M_OP_INFO    = 4'd5,  // ORT -> TRS : decoded operand (producer/previous user, version)
    M_REG_CONS   = 4'd6,  // TRS -> TRS : register consumer with a previous user
    M_DATA_READY = 4'd7,  // OVT/TRS -> TRS : input or output data ready
    M_RELEASE    = 4'd8,  // TRS -> OVT : task finished, decrement version usage
    M_READY_TASK = 4'd9,  // TRS -> RQ  : task has all operands ready
    M_TASK_DONE  = 4'd10  // BE  -> TRS : task finished executing
  } mtype_e;

  typedef struct packed {
    mtype_e           mtype;
    logic [EPW-1:0]   dst;
    logic [EPW-1:0]   src;
    opid_t            id;       // subject operand / task (idx unused for tasks)
    opid_t            id2;      // previous user (OP_INFO) or consumer (REG_CONS)
    logic             flag;     // OP_INFO: has previous user; DATA_READY: 1=output side; ALLOC_REP: space left
    dir_e             dir;
    logic [AW-1:0]    addr;     // object base address / scalar value / kernel pointer
    logic [SW-1:0]    size;
    logic [AW-1:0]    buf_addr; // version buffer address
    logic [VERW-1:0]  ver;
    logic             ort;      // which ORT/OVT pair handled the operand
    logic [IDXW-1:0]  nops;
    logic [GWW-1:0]   gwaddr;
  } ts_msg_t;


  // ---- ORT <-> OVT direct link ---------------------------------------------
  typedef enum logic [1:0] {V_USE = 2'd0, V_NEW_MISS = 2'd1, V_NEW_OUT = 2'd2, V_NEW_INOUT = 2'd3} vreq_e;

  typedef struct packed {
    vreq_e           kind;
    logic [VERW-1:0] ver;      // version the ORT entry holds (hits)
    dir_e            dir;
    logic [AW-1:0]   addr;
    logic [SW-1:0]   size;
    opid_t           writer;   // operand being decoded
    logic [SETW-1:0] set;
    logic [WAYW-1:0] way;
  } ovt_req_t;

  typedef struct packed {
    logic            stale;    // version is being retired: decode as a miss
    logic [VERW-1:0] ver;
    logic [AW-1:0]   buf_addr;
  } ovt_rsp_t;

  typedef struct packed {
    logic [SETW-1:0] set;
    logic [WAYW-1:0] way;
  } ort_rel_t;

  function automatic logic [EPW-1:0] trs_ep(input logic [TRSW-1:0] t);
    return EPW'(EP_TRS0) + EPW'(t);
  endfunction

  // Blocks a task of n operands occupies: the main block plus ceil((n-4)/5).
  function automatic logic [2:0] blocks_for(input logic [IDXW-1:0] n);
    if (n <= 5'd4)       return 3'd1;
    else if (n <= 5'd9)  return 3'd2;
    else if (n <= 5'd14) return 3'd3;
    else                 return 3'd4;
  endfunction

endpackage
