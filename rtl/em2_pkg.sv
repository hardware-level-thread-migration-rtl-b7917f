// em2_pkg: constants, flit and packet formats shared by every block of the
// execution-migration multiprocessor.
//
// All on-chip networks carry 64-bit flits. A link carries one flit plus a
// 'last' marker that closes a wormhole packet. The first flit of every packet
// is a header whose top bits hold the packet type, the destination node and
// the source node:
//   [63:60] type   [59:53] destination   [52:46] source
// Node numbers 0..NCORES-1 are cores (row-major in the mesh, x = id % W,
// y = id / W); the numbers NCORES and NCORES+1 are the two off-chip memory
// interfaces, which sit just outside the east edge of the mesh.
//
// The 110-core count, 7-bit core IDs (top 7 address bits), 64-bit flits and
// six networks follow the document. The packet layouts, the network roles and
// the node numbering of the memory interfaces are this design's own choices.
package em2_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NCORES_DEF = 110;  // cores on the chip
  localparam int unsigned MESH_W_DEF = 10;   // mesh columns
  localparam int unsigned MESH_H_DEF = 11;   // mesh rows
  localparam int unsigned CID_W      = 7;    // core ID = top 7 address bits
  localparam int unsigned XY_W       = 4;    // mesh coordinate width
  localparam int unsigned FLIT_W     = 64;
  localparam int unsigned NUM_NETS   = 6;

  // Addresses from this base up are cacheable in every core (thread-private
  // stack spill area); all other addresses have exactly one home core.
  localparam logic [31:0] REPL_BASE = 32'hD600_0000;

  // ---------------------------------------------------------------- networks
  // Six physical networks so that no message class can block another:
  // migrations, evictions, remote requests, remote replies, memory requests,
  // memory replies.
  typedef enum logic [2:0] {
    NET_MIG   = 3'd0,
    NET_EVICT = 3'd1,
    NET_RREQ  = 3'd2,
    NET_RREP  = 3'd3,
    NET_MREQ  = 3'd4,
    NET_MREP  = 3'd5
  } net_e;

  typedef struct packed {
    logic                last;   // final flit of the packet
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // Router port numbering.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // y - 1
    P_EAST  = 3'd2,   // x + 1
    P_SOUTH = 3'd3,   // y + 1
    P_WEST  = 3'd4    // x - 1
  } port_e;

  // ---------------------------------------------------------------- packets
  typedef enum logic [3:0] {
    PK_MIG      = 4'h1,  // thread context, migration network
    PK_EVICT    = 4'h2,  // thread context, eviction network
    PK_LD       = 4'h3,  // remote word load
    PK_ST       = 4'h4,  // remote word store
    PK_LDRSV    = 4'h5,  // remote load with reservation
    PK_STCND    = 4'h6,  // remote conditional store
    PK_RREPLY   = 4'h7,  // remote access reply (load data / store status)
    PK_MRD      = 4'h8,  // memory line read
    PK_MWR      = 4'h9,  // memory line write-back
    PK_MFILL    = 4'hA   // memory line fill (reply)
  } pkt_e;

  function automatic logic [3:0] hdr_type(input logic [FLIT_W-1:0] h);
    return h[63:60];
  endfunction
  function automatic logic [CID_W-1:0] hdr_dst(input logic [FLIT_W-1:0] h);
    return h[59:53];
  endfunction
  function automatic logic [CID_W-1:0] hdr_src(input logic [FLIT_W-1:0] h);
    return h[52:46];
  endfunction

  // Mesh coordinates of a node. Memory interface k sits at x = W on row
  // mc_row_k; the memory networks route Y first so that requests reach that
  // row before turning east.
  function automatic logic [XY_W-1:0] node_x(input logic [CID_W-1:0] id,
                                             input int unsigned ncores,
                                             input int unsigned w);
    if (int'(id) >= int'(ncores)) return XY_W'(w);
    return XY_W'(int'(id) % int'(w));
  endfunction
  function automatic logic [XY_W-1:0] node_y(input logic [CID_W-1:0] id,
                                             input int unsigned ncores,
                                             input int unsigned w,
                                             input int unsigned mc_row0,
                                             input int unsigned mc_row1);
    if (int'(id) == int'(ncores))     return XY_W'(mc_row0);
    if (int'(id) == int'(ncores) + 1) return XY_W'(mc_row1);
    return XY_W'(int'(id) / int'(w));
  endfunction

  // ---------------------------------------------------------------- ISA
  // 32-bit instructions: [31:26] opcode, [25:24] migration mode of a memory
  // instruction, [15:0] immediate.
  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    OP_HALT   = 6'h01,
    OP_PUSHI  = 6'h02,  // push sign-extended imm
    OP_LUI    = 6'h03,  // push imm << 16
    OP_ORI    = 6'h04,  // TOS |= zero-extended imm
    OP_ADDI   = 6'h05,  // TOS += sign-extended imm
    OP_ADD    = 6'h06,  // a b -- a+b
    OP_SUB    = 6'h07,  // a b -- a-b
    OP_DUP    = 6'h08,
    OP_DROP   = 6'h09,
    OP_SWAP   = 6'h0A,
    OP_OVER   = 6'h0B,
    OP_TOA    = 6'h0C,  // move TOS to the auxiliary stack
    OP_FROMA  = 6'h0D,  // move aux TOS back to the main stack
    OP_LD     = 6'h10,  // addr -- data
    OP_ST     = 6'h11,  // data addr --
    OP_LDRSV  = 6'h12,  // addr -- data   (sets a reservation)
    OP_STCND  = 6'h13,  // data addr -- ok
    OP_MIG    = 6'h14,  // migrate to core imm
    OP_BNZ    = 6'h18,  // x --      ; branch by imm words if x != 0
    OP_BR     = 6'h19,  // branch by imm words
    OP_COREID = 6'h1A   // push the ID of the executing core
  } opcode_e;

  // Migration mode bits of LD/ST instructions.
  typedef enum logic [1:0] {
    MM_AUTO    = 2'd0,  // the learning predictor decides
    MM_REMOTE  = 2'd1,  // always remote access
    MM_MIGRATE = 2'd2   // always migrate
  } mig_mode_e;

  // Per-tile event pulses, counted by testbenches and by anyone who wants
  // activity statistics.
  typedef struct packed {
    logic migrate_out;   // a context left by migration
    logic evict_out;     // a guest context was evicted
    logic ctx_arrive;    // a context was loaded from the network
    logic remote_req;    // a remote access was sent
    logic remote_served; // this D$ slice served a remote request
    logic pred_migrate;  // the predictor chose migration
    logic pred_learn;    // the predictor inserted a start PC
    logic pred_unlearn;  // the predictor removed a start PC
    logic spill;         // a stack entry was spilled
    logic refill;        // a stack entry was refilled
    logic stack_home;    // a guest went home on stack under/overflow
    logic cache_miss;    // an I$ or D$ line miss
    logic writeback;     // a dirty D$ line was written back
    logic stcnd_fail;    // a conditional store failed
    logic halt;          // a native thread halted
  } tile_events_t;

endpackage
