// coma_pkg: types and constants shared by the on-chip COMA memory system.
//
// The memory system is a Cache Only Memory Architecture on chip: every L2
// cache (an "attraction cache", AC) is an attraction memory without home
// locations, the ACs of a group sit on a unidirectional level-1 ring, and the
// group directories plus a root directory sit on a level-2 ring. All of these
// exchange one message type, ring_msg_t, carried one per cycle per ring link.
//
// The ten request names (LR, LW, RS, SR, BR, IV, DE, RE, ER, WB), the AC line
// states (Modified, Owned, Shared, Invalid, ReadPending, WritePending) and the
// directory states (IN, SH, EX) follow the protocol definition. Widths, the
// line size, the node numbering and the routing flags (lap, up_done, mem,
// deflection) are choices of this implementation.
package coma_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int ADDR_W     = 32;                 // byte address
  localparam int WORD_W     = 32;                 // processor word
  localparam int LINE_BYTES = 32;                 // cache line (assumed)
  localparam int LINE_W     = LINE_BYTES * 8;     // line payload bits
  localparam int WORDS      = LINE_BYTES / (WORD_W / 8);
  localparam int OFF_W      = $clog2(LINE_BYTES); // byte offset bits
  localparam int WOFF_W     = $clog2(WORDS);      // word-in-line bits
  localparam int LA_W       = ADDR_W - OFF_W;     // line address bits
  localparam int GRP_W      = 4;                  // group number bits
  localparam int IDX_W      = 4;                  // AC index within a group
  localparam int PID_W      = 3;                  // processor on a snoop bus
  localparam int RTAG_W     = 16;                 // register target + family id
  localparam int NODE_W     = 8;                  // deflecting node id

  typedef logic [LA_W-1:0]   line_addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [WORD_W-1:0] word_t;

  // ------------------------------------------------------------ requests
  // The ten transactions of the protocol. DE is an IV that has come back to
  // the cache that issued it; BR is the eviction of a line.
  typedef enum logic [3:0] {
    R_NONE = 4'd0,
    R_LR   = 4'd1,   // local read (processor)
    R_LW   = 4'd2,   // local write (processor)
    R_RS   = 4'd3,   // remote read to shared state
    R_SR   = 4'd4,   // read reply to shared state
    R_BR   = 4'd5,   // block relocation (eviction)
    R_IV   = 4'd6,   // invalidation
    R_DE   = 4'd7,   // data exclusive (returned IV)
    R_RE   = 4'd8,   // remote read to exclusive state
    R_ER   = 4'd9,   // read reply to exclusive state
    R_WB   = 4'd10   // write back to main memory
  } req_e;

  // ----------------------------------------------------------- AC states
  typedef enum logic [2:0] {
    AC_I  = 3'd0,
    AC_S  = 3'd1,
    AC_O  = 3'd2,
    AC_M  = 3'd3,
    AC_RP = 3'd4,
    AC_WP = 3'd5
  } ac_state_e;

  // ---------------------------------------------------- directory states
  typedef enum logic [1:0] {
    D_IN = 2'd0,
    D_SH = 2'd1,
    D_EX = 2'd2
  } dir_state_e;

  // ------------------------------------------------------- ring message
  // lap     : the request has been round its own group ring once unanswered
  // up_done : the request has already made its tour of the level-2 ring
  // mem     : nobody on chip answered; the root sends it off chip
  // defl    : the message could not be accepted by node defl_id and is
  //           circling back to it; every other node passes it untouched
  typedef struct packed {
    logic                valid;
    req_e                kind;
    line_addr_t          addr;
    logic [GRP_W-1:0]    src_grp;
    logic [IDX_W-1:0]    src_idx;
    logic                lap;
    logic                up_done;
    logic                mem;
    logic                defl;
    logic [NODE_W-1:0]   defl_id;
    line_t               data;
  } ring_msg_t;

  // ------------------------------------------- processor <-> L1 <-> bus
  typedef struct packed {
    logic                valid;
    logic                we;
    logic [ADDR_W-1:0]   addr;
    word_t               wdata;
    logic [PID_W-1:0]    pid;
    logic [RTAG_W-1:0]   rtag;
  } loc_req_t;

  typedef struct packed {
    logic                valid;
    logic                we;
    logic [ADDR_W-1:0]   addr;
    word_t               rdata;
    line_t               line;
    logic [PID_W-1:0]    pid;
    logic [RTAG_W-1:0]   rtag;
  } loc_rsp_t;

  // ------------------------------------------ suspended request entry
  // One request parked on a locked line: either a local LR/LW or a ring
  // request (IV or RE) received while the line was pending.
  typedef struct packed {
    req_e                kind;
    line_addr_t          addr;
    logic [WOFF_W-1:0]   woff;
    word_t               wdata;
    logic [PID_W-1:0]    pid;
    logic [RTAG_W-1:0]   rtag;
    logic [GRP_W-1:0]    src_grp;
    logic [IDX_W-1:0]    src_idx;
    logic                lap;
    logic                up_done;
  } sq_entry_t;

  // ------------------------------------------------ off-chip interface
  typedef struct packed {
    logic                valid;
    logic                we;
    line_addr_t          addr;
    line_t               data;
  } mem_req_t;

  typedef struct packed {
    logic                valid;
    line_addr_t          addr;
    line_t               data;
  } mem_rsp_t;

  localparam ring_msg_t MSG_NONE = '0;

  function automatic logic is_request(req_e k);
    return k == R_RS || k == R_RE || k == R_IV;
  endfunction

  function automatic logic is_reply(req_e k);
    return k == R_SR || k == R_ER;
  endfunction

endpackage
