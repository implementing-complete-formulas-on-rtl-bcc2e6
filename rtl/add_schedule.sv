// add_schedule: the complete addition formulas scheduled on three processors.
//
// A read-only table of ADD_STEPS = 14 steps that computes
// (X3 : Y3 : Z3) = (X1 : Y1 : Z1) + (X2 : Y2 : Z2) on y^2 = x^3 + a*x + b with
// the complete (exception-free) projective formulas, using the constants a
// and b3 = 3b. Each step gives at most one operation per processor (MM0, MM1,
// MM2): an opcode, two source operands and a destination. All operands of a
// step are read before any result of the step is written, so a step may
// overwrite a value another operation of the same step still reads.
//
// The operations are those of the document's three-processor algorithm: 17
// multiplications grouped in six multiplication steps, and the additions and
// subtractions between them. As in the document's assignment, the additions
// of line 7 run on MM2 while MM0 and MM1 multiply by the curve constants
// (step 5 here), so that they cost no extra step. Where the document's
// assignment of an operation to a processor could not be followed under this
// design's one-operation-per-processor rule, the operation was placed on a
// free processor of the same step.
//
// Interface: `step` selects a row; `ops` is combinational. P, Q and the
// result are given as relative operands (base P, Q, OUT); t0..t11, a and b3
// are absolute big words of the main memory.
module add_schedule
  import ecc_pkg::*;
(
  input  logic [3:0] step,
  output mm_cmd_t    ops [NPROC]
);

  localparam opnd_t X1 = rel_op(BASE_P, 0), Y1 = rel_op(BASE_P, 1), Z1 = rel_op(BASE_P, 2);
  localparam opnd_t X2 = rel_op(BASE_Q, 0), Y2 = rel_op(BASE_Q, 1), Z2 = rel_op(BASE_Q, 2);
  localparam opnd_t X3 = rel_op(BASE_OUT, 0), Y3 = rel_op(BASE_OUT, 1), Z3 = rel_op(BASE_OUT, 2);
  localparam opnd_t CA = abs_op(BW_A), CB3 = abs_op(BW_B3);
  localparam opnd_t T0 = t_op(0), T1 = t_op(1), T2 = t_op(2), T3 = t_op(3);
  localparam opnd_t T4 = t_op(4), T5 = t_op(5), T6 = t_op(6), T7 = t_op(7);
  localparam opnd_t T8 = t_op(8), T9 = t_op(9), T10 = t_op(10), T11 = t_op(11);

  always_comb begin
    ops[0] = NOP;
    ops[1] = NOP;
    ops[2] = NOP;
    unique case (step)
      4'd0: begin  // products of like coordinates
        ops[0] = mk(OP_MUL, X1, X2, T0);
        ops[1] = mk(OP_MUL, Y1, Y2, T1);
        ops[2] = mk(OP_MUL, Z1, Z2, T2);
      end
      4'd1: begin
        ops[0] = mk(OP_ADD, X1, Y1, T3);
        ops[1] = mk(OP_ADD, X2, Y2, T4);
        ops[2] = mk(OP_ADD, Y1, Z1, T5);
      end
      4'd2: begin
        ops[0] = mk(OP_ADD, X1, Z1, T7);
        ops[1] = mk(OP_ADD, X2, Z2, T8);
        ops[2] = mk(OP_ADD, Y2, Z2, T6);
      end
      4'd3: begin  // cross products
        ops[0] = mk(OP_MUL, T3, T4, T9);
        ops[1] = mk(OP_MUL, T7, T8, T11);
        ops[2] = mk(OP_MUL, T5, T6, T10);
      end
      4'd4: begin
        ops[0] = mk(OP_ADD, T1, T2, T4);
        ops[1] = mk(OP_ADD, T0, T2, T5);
        ops[2] = mk(OP_ADD, T0, T1, T3);
      end
      4'd5: begin  // multiplications by the curve constants, MM2 subtracts
        ops[0] = mk(OP_MUL, CB3, T2, T6);
        ops[1] = mk(OP_MUL, CA, T2, T8);
        ops[2] = mk(OP_SUB, T9, T3, T2);
      end
      4'd6: begin
        ops[0] = mk(OP_ADD, T0, T0, T9);
        ops[1] = mk(OP_SUB, T10, T4, T3);
        ops[2] = mk(OP_SUB, T11, T5, T4);
      end
      4'd7: begin
        ops[0] = mk(OP_ADD, T9, T0, T10);
        ops[1] = mk(OP_SUB, T0, T8, T7);
      end
      4'd8: begin
        ops[0] = mk(OP_MUL, CA, T4, T0);
        ops[1] = mk(OP_MUL, CB3, T4, T5);
        ops[2] = mk(OP_MUL, CA, T7, T9);
      end
      4'd9: begin
        ops[0] = mk(OP_ADD, T0, T6, T4);
        ops[1] = mk(OP_ADD, T5, T9, T7);
        ops[2] = mk(OP_ADD, T8, T10, T0);
      end
      4'd10: begin
        ops[0] = mk(OP_SUB, T1, T4, T5);
        ops[1] = mk(OP_ADD, T1, T4, T6);
      end
      4'd11: begin
        ops[0] = mk(OP_MUL, T5, T6, T1);
        ops[1] = mk(OP_MUL, T0, T7, T4);
        ops[2] = mk(OP_MUL, T3, T7, T8);
      end
      4'd12: begin
        ops[0] = mk(OP_MUL, T0, T2, T11);
        ops[1] = mk(OP_MUL, T3, T6, T10);
        ops[2] = mk(OP_MUL, T2, T5, T9);
      end
      4'd13: begin  // results
        ops[0] = mk(OP_ADD, T1, T4, Y3);
        ops[1] = mk(OP_SUB, T9, T8, X3);
        ops[2] = mk(OP_ADD, T10, T11, Z3);
      end
      default: ;
    endcase
  end

endmodule
