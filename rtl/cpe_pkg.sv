// cpe_pkg: shared types and constants of the clustered integer back end.
//
// The back end is a ring of integer processing elements (PEs). Every PE owns
// a slice of the physical registers (a "non-consistent" register file: each
// value lives in exactly one PE), so a physical register name is the pair
// {PE number, index inside that PE}. The field widths below are fixed maxima
// (up to 8 PEs, up to 64 registers per PE); the modules take the actual
// counts as parameters. The instruction format is this design's own: the
// front end is expected to deliver decoded integer micro-operations.
package cpe_pkg;

  localparam int XLEN   = 64;          // Alpha integer word
  localparam int NARCH  = 32;          // architectural integer registers $0-$31
  localparam int AREG_W = 5;
  localparam int PE_W   = 3;           // up to 8 PEs
  localparam int IDX_W  = 6;           // up to 64 registers per PE
  localparam int ROB_W  = 8;           // up to 256 reorder-buffer entries
  localparam int IMM_W  = 16;
  localparam int CNT_W  = 8;           // width of the per-cycle event counts

  typedef logic [XLEN-1:0] word_t;

  // Physical register name: owning PE and index inside its register file.
  typedef struct packed {
    logic [PE_W-1:0]  pe;
    logic [IDX_W-1:0] idx;
  } ptag_t;

  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
    OP_CMPLT, OP_CMPULT, OP_MUL
  } op_t;

  // Decoded instruction as delivered by the front end.
  typedef struct packed {
    op_t               op;
    logic              use_imm;   // second operand is imm (sign-extended)
    logic [IMM_W-1:0]  imm;
    logic              s1_v;
    logic [AREG_W-1:0] s1;
    logic              s2_v;
    logic [AREG_W-1:0] s2;
    logic              d_v;
    logic [AREG_W-1:0] d;
  } uop_t;

  // Renamed and steered instruction as held in the issue queue.
  typedef struct packed {
    op_t               op;
    logic              use_imm;
    logic [IMM_W-1:0]  imm;
    logic [PE_W-1:0]   pe;        // PE it was steered to
    logic              s1_v;
    ptag_t             s1;
    logic              s1_rdy;    // value already in a register file at dispatch
    logic              s2_v;
    ptag_t             s2;
    logic              s2_rdy;
    logic              d_v;
    ptag_t             d;
    logic [ROB_W-1:0]  rob;
  } iq_entry_t;

  // Reorder-buffer entry written at dispatch.
  typedef struct packed {
    logic              d_v;
    logic [AREG_W-1:0] areg;
    ptag_t             newt;
    ptag_t             prevt;
  } rob_entry_t;

  // Wake-up broadcast of a result tag.
  typedef struct packed {
    logic  v;
    ptag_t t;
  } bcast_t;

  // Result leaving a functional unit (one cycle after it is computed).
  typedef struct packed {
    logic             v;
    logic             d_v;
    ptag_t            t;
    logic [ROB_W-1:0] rob;
    word_t            data;
  } result_t;

  // Per-cycle event counts brought out of the core.
  typedef struct packed {
    logic [CNT_W-1:0] dispatched;
    logic [CNT_W-1:0] committed;
    logic [CNT_W-1:0] issued;
    logic [CNT_W-1:0] mul_issued;
    logic [CNT_W-1:0] steer_min_dcount;  // Min_dcount entries of the steering table
    logic [CNT_W-1:0] steer_producer;    // steered to a producer's PE
    logic [CNT_W-1:0] steer_rfo_right;   // rFO = 2 or 4: right neighbour of the producer
    logic [CNT_W-1:0] steer_realloc;     // chosen PE had no free register
    logic [CNT_W-1:0] wake_local;        // result woke a consumer in the same PE
    logic [CNT_W-1:0] wake_adjacent;     // result woke a consumer in the right neighbour
    logic [CNT_W-1:0] wake_remote;       // two-cycle inter-PE transfer
    logic [CNT_W-1:0] remote_read;       // ready operand read from another PE's file
    logic [CNT_W-1:0] fwd_local;         // operand taken from own PE's result bus
    logic [CNT_W-1:0] fwd_adjacent;      // operand taken from left PE's result bus
    logic             stall_no_reg;      // dispatch held: no free register anywhere
    logic             stall_iq;          // dispatch held: issue queue full
    logic             stall_rob;         // dispatch held: reorder buffer full
  } perf_ev_t;

  function automatic word_t sext_imm(logic [IMM_W-1:0] imm);
    return {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  // Right neighbour on the ring of n PEs.
  function automatic logic [PE_W-1:0] ring_right(logic [PE_W-1:0] p, int n);
    return (int'(p) == n-1) ? '0 : p + 1'b1;
  endfunction

  // Left neighbour on the ring of n PEs.
  function automatic logic [PE_W-1:0] ring_left(logic [PE_W-1:0] p, int n);
    return (p == '0) ? PE_W'(n-1) : p - 1'b1;
  endfunction

endpackage
