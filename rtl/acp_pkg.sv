// acp_pkg: types and constants shared by the asymmetric clustered back end.
//
// The back end has a 64b "slow" (wide) cluster and a 20b "fast" (narrow)
// cluster. Every physical register carries a 2-bit value-type descriptor:
// Simple (the value fits in 20 bits, sign-extended), Long (needs 64 bits) or
// Addr (upper 44 bits are held in one of the Addr registers, the low 20 bits
// in the Simple file). Bits [19:17] of an Addr value (its PTR field) select
// the Addr register. The widths follow the document; the micro-op format,
// the opcode set and the encodings are this design's own.
package acp_pkg;

  localparam int XLEN      = 64;   // wide datapath
  localparam int NW        = 20;   // narrow datapath
  localparam int UPPER_W   = XLEN - NW;  // 44 invariant upper address bits
  localparam int NPREG     = 128;  // physical registers per file
  localparam int TAG_W     = $clog2(NPREG);
  localparam int NADDR     = 8;    // Addr register file entries
  localparam int PTR_W     = $clog2(NADDR);
  localparam int IMM_W     = 16;
  localparam int ID_W      = 8;    // instruction sequence number (for the ROB)
  localparam int PA_W      = 44;   // physical address width
  localparam int ATTR_W    = 4;    // page attribute bits kept by the L0 TLB

  typedef logic [TAG_W-1:0] tag_t;

  // Register descriptor (RD)
  typedef enum logic [1:0] {
    VT_SIMPLE = 2'd0,
    VT_LONG   = 2'd1,
    VT_ADDR   = 2'd2
  } vtype_e;

  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
    OP_SLL, OP_SRL, OP_SRA, OP_ADDI, OP_MUL,
    OP_LD,  OP_ST
  } op_e;

  // Micro-op payload (the "payload RAM" contents of an IQ entry).
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [XLEN-1:0] pc;
    op_e             op;
    logic            dst_v;
    tag_t            dst;
    logic            s1_v;
    tag_t            s1;
    logic            s2_v;
    tag_t            s2;
    logic [IMM_W-1:0] imm;
  } uop_t;

  // Memory request towards the data cache / level-1 TLB.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            is_st;
    tag_t            dst;
    logic [XLEN-1:0] va;
    logic            pa_v;    // translated by the level-0 TLB
    logic [PA_W-1:0] pa;
    logic [XLEN-1:0] data;    // store data
  } memreq_t;

  // Wide -> narrow update: register tag, its value type and low 20 bits.
  typedef struct packed {
    tag_t          tag;
    vtype_e        vt;
    logic [NW-1:0] low;
    logic [PTR_W-1:0] ptr;
    logic          wake;     // a new value (wakeup) rather than a type change
  } w2n_t;

  // Narrow -> wide result (written sign-extended into the Long file).
  typedef struct packed {
    tag_t          tag;
    logic [NW-1:0] val;
  } n2w_t;

  // One-cycle event pulses of the back end, for performance counting.
  typedef struct packed {
    logic steer_narrow;     // instruction dispatched to the fast cluster
    logic steer_corrected;  // narrow prediction overridden by a Long source
    logic mispredict;       // fast-cluster instruction sent for replay
    logic replay_issue;     // replayed instruction issued in the wide cluster
    logic addr_ovf;         // 20b address carry/borrow in the fast cluster
    logic wide_to_simple;   // wide result forwarded to the fast cluster as Simple
    logic wide_to_addr;     // wide result forwarded as Addr
    logic base_to_addr;     // Ld/St base register retyped Addr by the base check
    logic addr_evict;       // Addr entry freed or replaced
    logic l0_hit;           // fast-cluster Ld/St translated by the level-0 TLB
    logic l0_miss;          // fast-cluster Ld/St on an Addr base that missed it
    logic load_wb;          // load value written back
  } acp_events_t;

  function automatic logic is_mem(op_e op);
    return (op == OP_LD) || (op == OP_ST);
  endfunction

  // A value is Simple when sign-extending its low 20 bits reproduces it.
  function automatic logic fits_narrow(logic [XLEN-1:0] v);
    return (v[XLEN-1:NW-1] == '0) || (v[XLEN-1:NW-1] == '1);
  endfunction

  function automatic logic [XLEN-1:0] sext_nw(logic [NW-1:0] v);
    return {{(XLEN-NW){v[NW-1]}}, v};
  endfunction

endpackage
