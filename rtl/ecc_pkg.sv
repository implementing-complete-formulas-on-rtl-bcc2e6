// ecc_pkg: types and constants shared by the scalar-multiplication core.
//
// The core works on 17-bit words. A field element occupies one "big word" of
// up to 32 words (544 bits) in the main memory; the 1024-word main memory is
// therefore 32 big words. This package fixes the word width, the big-word map
// of the main memory, the processor opcodes and the encoding of one scheduled
// processor operation.
//
// Word width, memory size and big-word size follow the document. The memory
// map, the operand encoding and the opcode values are this design's choices.
package ecc_pkg;

  localparam int unsigned W         = 17;   // word width
  localparam int unsigned MAX_WORDS = 32;   // words per big word
  localparam int unsigned IDX_W     = 5;    // word index inside a big word
  localparam int unsigned BW_W      = 5;    // big-word index
  localparam int unsigned ADDR_W    = BW_W + IDX_W;  // 1024 words
  localparam int unsigned NW_W      = 6;    // operand length field (1..32)
  localparam int unsigned KB_W      = 11;   // scalar bit count (up to 2 big words)

  typedef logic [W-1:0] word_t;

  // Processor operations.
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,
    OP_MUL  = 2'd1,   // Montgomery product a*b/r mod p, not fully reduced
    OP_ADD  = 2'd2,   // a + b, no reduction
    OP_SUB  = 2'd3    // a - b + 4p, no reduction
  } mm_op_e;

  // Slots of a processor's local memory written by a load.
  typedef enum logic [1:0] {
    SLOT_A    = 2'd0,
    SLOT_B    = 2'd1,
    SLOT_P    = 2'd2,
    SLOT_PINV = 2'd3   // word 0 only: p' = -p^-1 mod 2^17
  } slot_e;

  // Main-memory map, in big words. The host writes the constants, the input
  // point (into R0, in normal representation) and the scalar; the result x, y
  // is read back from R1.X and R1.Y.
  localparam logic [BW_W-1:0] BW_P     = 5'd0;   // prime p
  localparam logic [BW_W-1:0] BW_PINV  = 5'd1;   // word 0: p'
  localparam logic [BW_W-1:0] BW_A     = 5'd2;   // a*r mod p
  localparam logic [BW_W-1:0] BW_B3    = 5'd3;   // 3*b*r mod p
  localparam logic [BW_W-1:0] BW_R2    = 5'd4;   // r^2 mod p
  localparam logic [BW_W-1:0] BW_ONE   = 5'd5;   // the integer 1
  localparam logic [BW_W-1:0] BW_ZERO  = 5'd6;   // a multiple of p, made by the core
  localparam logic [BW_W-1:0] BW_R0    = 5'd9;   // R0.X, R0.Y, R0.Z (always doubled)
  localparam logic [BW_W-1:0] BW_R1    = 5'd12;  // R1: sum when the scalar bit is 0
  localparam logic [BW_W-1:0] BW_RACC  = 5'd15;  // R2: sum when the scalar bit is 1
  localparam logic [BW_W-1:0] BW_T0    = 5'd18;  // t0 .. t11 at 18 .. 29
  localparam logic [BW_W-1:0] BW_K     = 5'd30;  // scalar, big words 30 and 31

  // Operand reference of a scheduled operation. Absolute references name a
  // big word directly; relative ones name coordinate c (0..2 = X, Y, Z) of
  // one of the three point bases the controller sets per addition.
  typedef enum logic [1:0] {
    BASE_P   = 2'd0,   // first summand  (X1 : Y1 : Z1)
    BASE_Q   = 2'd1,   // second summand (X2 : Y2 : Z2)
    BASE_OUT = 2'd2    // result         (X3 : Y3 : Z3)
  } base_e;

  typedef struct packed {
    logic            rel;    // 1: relative to a point base
    base_e           base;   // used when rel
    logic [BW_W-1:0] bw;     // absolute big word, or coordinate when rel
  } opnd_t;

  typedef struct packed {
    mm_op_e op;
    opnd_t  a;
    opnd_t  b;
    opnd_t  dst;
  } mm_cmd_t;

  localparam int unsigned NPROC     = 3;
  localparam int unsigned ADD_STEPS = 14;

  function automatic opnd_t abs_op(input logic [BW_W-1:0] bw);
    abs_op = '{rel: 1'b0, base: BASE_P, bw: bw};
  endfunction

  function automatic opnd_t rel_op(input base_e b, input int unsigned c);
    rel_op = '{rel: 1'b1, base: b, bw: BW_W'(c)};
  endfunction

  function automatic opnd_t t_op(input int unsigned i);
    t_op = abs_op(BW_T0 + BW_W'(i));
  endfunction

  localparam mm_cmd_t NOP = '{op: OP_NONE, a: '0, b: '0, dst: '0};

  function automatic mm_cmd_t mk(input mm_op_e op, input opnd_t a, input opnd_t b,
                                 input opnd_t dst);
    mk = '{op: op, a: a, b: b, dst: dst};
  endfunction

endpackage
