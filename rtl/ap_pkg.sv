// ap_pkg: types and constants shared by the associative processor.
//
// The processor is driven by one micro-instruction per clock. A
// micro-instruction carries fields for the three pipeline stages of every
// PE at once: the read stage (memory -> input buffer), the compute stage
// (ALU -> output latch) and the write stage (output latch -> memory). The
// three-stage overlap follows the document; the field list and encodings
// are this design's own choice.
package ap_pkg;

  // Address width of the per-PE memory bank (256 bits in the prototype).
  localparam int unsigned ADDR_W = 8;

  // Which memory row a PE reads or writes: its own, the one above or the
  // one below (memory extension and systolic chains).
  typedef enum logic [1:0] {
    LINK_FRONT = 2'd0,
    LINK_UP    = 2'd1,
    LINK_DOWN  = 2'd2
  } link_e;

  // Operating modes of the activity status block.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,   // active = status register
    MODE_FORCED = 2'd1,   // all PEs active
    MODE_ONE    = 2'd2    // only the first PE with status 1 is active
  } mode_e;

  // Inputs of the output selection multiplexer.
  typedef enum logic [1:0] {
    OUT_ARITH  = 2'd0,    // full-adder sum
    OUT_DONE   = 2'd1,    // comparator: comparison finished
    OUT_DEC    = 2'd2,    // comparator: decision
    OUT_STATUS = 2'd3     // status register
  } outsel_e;

  // Second ALU operand: external data bit or the held memory bit.
  typedef enum logic {
    OP2_EXT  = 1'b0,
    OP2_HOLD = 1'b1
  } op2_e;

  typedef struct packed {
    // read stage
    logic              rd_en;     // 0: input buffer loads 0
    logic [ADDR_W-1:0] rd_addr;
    link_e             rd_link;
    // compute stage
    logic              alu_en;    // update carry, comparator and output latch
    logic              hold_en;   // hold register <= input buffer
    op2_e              op2_sel;
    logic              inv;       // invert memory operand / comparator sense
    logic              c_init;    // use c_val instead of the stored carry
    logic              c_val;
    logic              cmp_clr;   // restart the comparator at this bit
    outsel_e           out_sel;
    logic              st_load;   // status <= selected output (active PEs)
    mode_e             mode;
    logic              ext_bit;   // external data bit X, common to all PEs
    // write stage
    logic              sum_start; // first bit of a stream into the adder tree
    logic              wr_en;
    logic [ADDR_W-1:0] wr_addr;
    link_e             wr_link;
  } uinstr_t;

  localparam uinstr_t UINSTR_NOP = '{
    rd_en: 1'b0, rd_addr: '0, rd_link: LINK_FRONT,
    alu_en: 1'b0, hold_en: 1'b0, op2_sel: OP2_EXT, inv: 1'b0,
    c_init: 1'b0, c_val: 1'b0, cmp_clr: 1'b0, out_sel: OUT_ARITH,
    st_load: 1'b0, mode: MODE_NORMAL, ext_bit: 1'b0,
    sum_start: 1'b0, wr_en: 1'b0, wr_addr: '0, wr_link: LINK_FRONT
  };

  // High-level instructions executed by the control unit.
  typedef enum logic [3:0] {
    HOP_ADD_X   = 4'd0,   // C = X + A            (n bits)
    HOP_ADD_B   = 4'd1,   // C = B + A            (n bits)
    HOP_SUB_X   = 4'd2,   // C = X - A            (n+1 bits, two's complement)
    HOP_SUB_B   = 4'd3,   // C = B - A            (n+1 bits, two's complement)
    HOP_CMP_X   = 4'd4,   // S = X > A  (inv: A > X), active PEs
    HOP_CMP_B   = 4'd5,   // S = B > A  (inv: A > B), active PEs
    HOP_WRITE_X = 4'd6,   // C = X                (n bits)
    HOP_LOAD_S  = 4'd7,   // S = mem[A]
    HOP_STORE_S = 4'd8,   // mem[C] = S
    HOP_SET_S   = 4'd9,   // S = X[0]
    HOP_COUNT   = 4'd10,  // result = sum over active PEs of field A
    HOP_MAX     = 4'd11,  // keep S only on PEs holding the largest A; result = max
    HOP_READ1   = 4'd12   // result = field A of the first active PE; clear its S
  } hop_e;

  typedef struct packed {
    hop_e              op;
    mode_e             mode;
    logic              inv;
    link_e             rlink;  // memory row the operands are read from
    link_e             wlink;  // memory row the result is written to
    logic [ADDR_W-1:0] a;
    logic [ADDR_W-1:0] b;
    logic [ADDR_W-1:0] c;
    logic [5:0]        n;      // operand width in bits, 1..32
    logic [31:0]       x;      // external operand
  } hinstr_t;

endpackage
