// remorph_pkg: widths, instruction format and shared types of the reMORPH grain.
//
// A grain executes explicit 72-bit instructions. Every instruction carries all four
// fields at once: a 14-bit compute-element control word, two 10-bit source operands
// (9-bit address + indirect bit), a 21-bit destination (own write, neighbour write)
// and a 12-bit next-address field (9-bit target, 2-bit flag select, enable). The
// field widths 14/20/21/11+1 and the 72-bit word follow the architecture
// description; the bit order inside the word, the flag encoding and the use of the
// five spare bits (one is the branch-condition invert bit) are this design's choice.
//
// Bit layout of instr_t (MSB first):
//   [71:68] reserved, write 0
//   [67]    nx_inv    invert the selected branch condition
//   [66]    nx_en     1: take nx_addr when the condition holds; 0: go to pc+1
//   [65:64] nx_flag   00 always, 01 zero, 10 negative, 11 equal (P == C)
//   [63:55] nx_addr
//   [54]    nb_we     write the result to the neighbour's data memory
//   [53:45] nb_addr   (direct only)
//   [44]    own_we    write the result to the own data memory
//   [43]    own_ind   own write address is read from data memory location own_addr
//   [42:34] own_addr
//   [33]    s2_ind    operand 2 indirect
//   [32:24] s2_addr
//   [23]    s1_ind    operand 1 indirect
//   [22:14] s1_addr
//   [13:0]  op        {CARRYINSEL[2:0], ALUMODE[3:0], OPMODE[6:0]}
// HALT is an enabled, unconditional jump to the instruction's own address.
// An all-zero op field is a NOP: the compute element is not clocked and
// P and the flags keep their values.
package remorph_pkg;

  localparam int unsigned DW     = 48;  // data word, DSP48E1 P width
  localparam int unsigned IW     = 72;  // instruction word
  localparam int unsigned AW     = 9;   // 512 data and 512 instruction locations
  localparam int unsigned AWIDTH = 30;  // compute element A input
  localparam int unsigned BWIDTH = 18;  // compute element B input
  localparam int unsigned CTRLW  = 14;  // compute element control word

  typedef logic [DW-1:0] word_t;
  typedef logic [AW-1:0] addr_t;

  // Compute element control word, DSP48E1 naming.
  typedef struct packed {
    logic [2:0] carryinsel;
    logic [3:0] alumode;
    logic [6:0] opmode;     // [6:4] Z mux, [3:2] Y mux, [1:0] X mux
  } ctrl_t;

  typedef struct packed {
    logic  ind;
    addr_t addr;
  } src_t;

  typedef enum logic [1:0] {
    FL_ALWAYS = 2'b00,
    FL_ZERO   = 2'b01,
    FL_NEG    = 2'b10,
    FL_EQ     = 2'b11
  } flag_sel_e;

  typedef struct packed {
    logic [3:0] rsvd;
    logic       nx_inv;
    logic       nx_en;
    flag_sel_e  nx_flag;
    addr_t      nx_addr;
    logic       nb_we;
    addr_t      nb_addr;
    logic       own_we;
    logic       own_ind;
    addr_t      own_addr;
    src_t       s2;
    src_t       s1;
    ctrl_t      op;
  } instr_t;

  // Flags produced by the comparator of the compute element, aligned with P.
  typedef struct packed {
    logic carry;  // carry out of the 48-bit adder
    logic eq;     // P equals the registered C operand (48-bit comparator)
    logic neg;    // P[47]
    logic zero;   // P == 0
  } flags_t;

  // One write on a near-neighbour link: what a grain drives towards the
  // neighbour memory that the link switch connects to it.
  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t data;
  } link_t;

  // Link-switch input selection of one grain (who may write its memory).
  typedef enum logic [2:0] {
    IN_NONE  = 3'd0,
    IN_NORTH = 3'd1,
    IN_EAST  = 3'd2,
    IN_SOUTH = 3'd3,
    IN_WEST  = 3'd4
  } in_sel_e;

  // Host programming targets.
  typedef enum logic [1:0] {
    PT_IMEM = 2'd0,
    PT_DMEM = 2'd1,
    PT_LINK = 2'd2
  } prog_tgt_e;

  // Common OPMODE / ALUMODE encodings used by programs and testbenches.
  localparam logic [6:0] OPM_AB_PLUS_C  = 7'b011_00_11; // Z=C, Y=0, X=A:B
  localparam logic [6:0] OPM_P_PLUS_C   = 7'b010_11_00; // Z=P, Y=C, X=0
  localparam logic [6:0] OPM_MUL        = 7'b000_01_01; // Z=0, X/Y=M
  localparam logic [6:0] OPM_MUL_PLUS_C = 7'b011_01_01; // Z=C, X/Y=M
  localparam logic [6:0] OPM_MACC       = 7'b010_01_01; // Z=P, X/Y=M
  localparam logic [3:0] ALU_ADD        = 4'b0000;      // Z + X + Y + CIN
  localparam logic [3:0] ALU_ZSUB       = 4'b0011;      // Z - (X + Y + CIN)

endpackage
