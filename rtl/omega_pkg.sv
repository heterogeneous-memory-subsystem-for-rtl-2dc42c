// omega_pkg: constants and types shared by the OMEGA memory-subsystem blocks.
//
// OMEGA adds to every core of a chip multiprocessor a direct-mapped scratchpad
// that holds the vertex properties (vtxProp) of the most-connected vertices of
// a graph, a small atomic-operation engine beside it (PISC, processing in
// scratchpad) and a source-vertex buffer. The node count, the 1 MB scratchpad,
// the 128-bit interconnect, the 64-bit word payload and the limit of three
// properties per vertex follow the reference configuration. The 16-byte line,
// the request opcodes, the packet layout, the micro-op encoding and the
// configuration register map are this implementation's own choices.
package omega_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned NUM_NODES   = 16;        // cores / scratchpads
  localparam int unsigned NODE_W      = $clog2(NUM_NODES);
  localparam int unsigned SP_BYTES    = 1048576;   // 1 MB scratchpad per core
  localparam int unsigned LINE_BYTES  = 16;        // one vertex: up to 12 B of Props
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned SP_LINES    = SP_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W       = $clog2(SP_LINES);
  localparam int unsigned VID_W       = IDX_W + NODE_W;   // scratchpad-resident vertex IDs
  localparam int unsigned MAX_PROPS   = 3;         // vtxProp structures per algorithm
  localparam int unsigned PROP_W      = 2;
  localparam int unsigned DATA_W      = 64;        // word-granular access, 1..8 bytes
  localparam int unsigned ADDR_W      = 48;        // virtual address width
  localparam int unsigned FLIT_W      = 128;       // interconnect bus width
  localparam int unsigned SP_LAT      = 3;         // scratchpad read latency (cycles)
  localparam int unsigned NUM_OPTYPES = 4;
  localparam int unsigned OPT_W       = 2;
  localparam int unsigned UCODE_DEPTH = 32;
  localparam int unsigned PC_W        = $clog2(UCODE_DEPTH);
  localparam int unsigned NUM_GLOBALS = 4;

  // ------------------------------------------------------- core request port
  typedef enum logic [2:0] {
    OP_RD     = 3'd0,  // word read of one Prop
    OP_WR     = 3'd1,  // word write of one Prop
    OP_RD_SRC = 3'd2,  // read of a source vertex's Prop (may be served by the buffer)
    OP_ATOMIC = 3'd3,  // offloaded atomic update, executed by the home PISC
    OP_RD_ACT = 3'd4   // read-and-clear of a Prop's dense active-list bit
  } op_e;

  typedef struct packed {
    op_e                op;
    logic [OPT_W-1:0]   optype;  // atomic operation type (microcode entry)
    logic [ADDR_W-1:0]  addr;    // virtual address of the Prop entry
    logic [DATA_W-1:0]  data;    // write data or atomic operand (src_data)
  } core_req_t;

  // ---------------------------------------------------- configuration space
  // Word addresses of the memory-mapped configuration registers.
  localparam logic [7:0] CFG_START   = 8'h00;  // + prop : start_addr
  localparam logic [7:0] CFG_TSIZE   = 8'h04;  // + prop : type_size (bytes)
  localparam logic [7:0] CFG_STRIDE  = 8'h08;  // + prop : stride (bytes)
  localparam logic [7:0] CFG_NVERT   = 8'h0C;  // scratchpad-resident vertices
  localparam logic [7:0] CFG_CHUNK   = 8'h0D;  // mapping chunk size (vertices)
  localparam logic [7:0] CFG_NPROPS  = 8'h0E;  // number of vtxProps in use
  localparam logic [7:0] CFG_GLOBAL  = 8'h10;  // + i    : PISC global register
  localparam logic [7:0] CFG_ENTRY   = 8'h14;  // + type : microcode entry point
  localparam logic [7:0] CFG_UCODE   = 8'h20;  // + j    : microcode word

  typedef struct packed {
    logic [MAX_PROPS-1:0][ADDR_W-1:0] start_addr;
    logic [MAX_PROPS-1:0][3:0]        type_size;   // 1..8
    logic [MAX_PROPS-1:0][7:0]        stride;      // bytes between entries
    logic [MAX_PROPS-1:0][3:0]        prop_off;    // byte offset of the Prop in a line
    logic [MAX_PROPS-1:0][ADDR_W-1:0] end_addr;    // start + nvert*stride
    logic [VID_W:0]                   nvert;
    logic [VID_W:0]                   chunk;
    logic [PROP_W-1:0]                nprops;
  } cfg_t;

  // ------------------------------------------------------ on-chip packets
  typedef enum logic [2:0] {
    PK_RD    = 3'd0,
    PK_WR    = 3'd1,
    PK_RDSRC = 3'd2,
    PK_AT    = 3'd3,
    PK_RDACT = 3'd4,
    PK_RESP  = 3'd5
  } pkind_e;

  typedef struct packed {
    logic [FLIT_W-115-1:0] pad;
    pkind_e               kind;    // 3
    logic [NODE_W-1:0]    dst;     // 4
    logic [NODE_W-1:0]    src;     // 4
    logic [PROP_W-1:0]    prop;    // 2
    logic [OPT_W-1:0]     optype;  // 2
    logic [VID_W-1:0]     vid;     // 20
    logic [IDX_W-1:0]     line;    // 16
    logic [DATA_W-1:0]    data;    // 64
  } flit_t;

  // --------------------------------------------------------- PISC microcode
  typedef enum logic [2:0] {
    U_END    = 3'd0,  // finish, write the line back
    U_LDP    = 3'd1,  // rd <= Prop k of the line (zero or sign extended)
    U_LDG    = 3'd2,  // rd <= global register k
    U_ALU    = 3'd3,  // rd <= ra fn rb
    U_CMP    = 3'd4,  // flag <= ra fn rb
    U_STP    = 3'd5,  // Prop k of the line <= ra
    U_SETACT = 3'd6,  // dense active-list bit of Prop k <= 1
    U_PUSH   = 3'd7   // append vertex ID to the sparse active list
  } uop_e;

  typedef enum logic [1:0] {
    PR_AL = 2'd0,  // always
    PR_T  = 2'd1,  // if flag
    PR_F  = 2'd2   // if not flag
  } pred_e;

  typedef enum logic [2:0] {
    F_FADD = 3'd0,  // ALU: IEEE double add      CMP: equal
    F_ADD  = 3'd1,  // ALU: integer add          CMP: not equal
    F_UMIN = 3'd2,  // ALU: unsigned min         CMP: unsigned less
    F_SMIN = 3'd3,  // ALU: signed min           CMP: signed less
    F_OR   = 3'd4,  // ALU: bitwise or           CMP: -
    F_MOV  = 3'd5   // ALU: rd <= ra             CMP: -
  } fn_e;

  typedef struct packed {
    uop_e              op;
    pred_e             pred;
    fn_e               fn;
    logic [1:0]        rd;
    logic [1:0]        ra;
    logic [1:0]        rb;
    logic [1:0]        k;
    logic              sx;
  } uop_t;

  localparam int unsigned UOP_W = $bits(uop_t);

  // ------------------------------------------------------ activity events
  typedef struct packed {
    logic to_cache;     // request not for the scratchpads
    logic local_acc;    // request served by the local scratchpad
    logic remote_acc;   // request sent to a remote scratchpad
    logic served_remote;// request from another node served here
    logic svb_hit;      // source read served by the source vertex buffer
    logic svb_fill;     // source vertex buffer filled
    logic atomic;       // atomic operation started on the PISC
    logic block;        // request held back: its vertex is being updated
  } ev_t;

endpackage
