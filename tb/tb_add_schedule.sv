// tb_add_schedule: checks that the 14-step three-processor schedule computes
// the complete addition formulas.
//
// Interprets the schedule on exact values modulo the prime 2^61-1: per step,
// every operand of every operation is read first, then all results are
// written, as the controller does. The result is compared with the closed
// formulas for X3, Y3, Z3 evaluated directly. It also checks that the
// schedule holds 17 multiplications in 6 multiplication steps, that no
// processor is given two operations, and that no operation writes a curve
// constant or an input coordinate.
module tb_add_schedule;
  import ecc_pkg::*;

  typedef logic [127:0] v_t;
  localparam v_t P = (v_t'(1) << 61) - 1;

  logic [3:0] step;
  mm_cmd_t    ops [NPROC];
  add_schedule dut (.step(step), .ops(ops));

  int checks = 0, failures = 0;
  v_t mem [32];

  function automatic int addr(opnd_t o);
    // P at 9, Q at 12, OUT at 15 for the interpretation
    if (!o.rel) return int'(o.bw);
    case (o.base)
      BASE_P:  return 9 + int'(o.bw);
      BASE_Q:  return 12 + int'(o.bw);
      default: return 15 + int'(o.bw);
    endcase
  endfunction

  function automatic v_t rnd();
    return v_t'({$urandom, $urandom}) % P;
  endfunction

  initial begin
    v_t x1, y1, z1, x2, y2, z2, a, b3, ex, ey, ez, va[3], vb[3], res[3];
    int nmul, nmulsteps;
    step = '0;
    for (int trial = 0; trial < 20; trial++) begin
      x1 = rnd(); y1 = rnd(); z1 = rnd(); x2 = rnd(); y2 = rnd(); z2 = rnd();
      a = rnd(); b3 = rnd();
      if (trial == 1) begin x2 = x1; y2 = y1; z2 = z1; end     // doubling
      if (trial == 2) begin x1 = 0; y1 = 1; z1 = 0; end        // P at infinity
      for (int i = 0; i < 32; i++) mem[i] = 0;
      mem[BW_A] = a; mem[BW_B3] = b3;
      mem[9] = x1; mem[10] = y1; mem[11] = z1; mem[12] = x2; mem[13] = y2; mem[14] = z2;
      nmul = 0; nmulsteps = 0;
      for (int s = 0; s < ADD_STEPS; s++) begin
        bit has_mul;
        has_mul = 0;
        step = 4'(s);
        #1;
        has_mul = 0;
        for (int k = 0; k < NPROC; k++) begin
          va[k] = mem[addr(ops[k].a)];
          vb[k] = mem[addr(ops[k].b)];
        end
        for (int k = 0; k < NPROC; k++) begin
          case (ops[k].op)
            OP_MUL:  begin res[k] = (va[k] * vb[k]) % P; nmul++; has_mul = 1; end
            OP_ADD:  res[k] = (va[k] + vb[k]) % P;
            OP_SUB:  res[k] = (va[k] + P - vb[k]) % P;
            default: res[k] = 0;
          endcase
        end
        if (has_mul) nmulsteps++;
        for (int k = 0; k < NPROC; k++)
          if (ops[k].op != OP_NONE) begin
            int d;
            d = addr(ops[k].dst);
            checks++;
            if (d == BW_A || d == BW_B3 || (d >= 9 && d <= 14)) begin
              failures++; $display("FAIL step %0d writes a constant or an input", s);
            end
            mem[d] = res[k];
          end
      end
      // closed formulas of the complete addition (a, b3 = 3b)
      begin
        v_t xy, yz, xz, yy, xx, zz, s1, s2, s3, s4;
        xy = (x1 * y2 + x2 * y1) % P;
        yz = (y1 * z2 + y2 * z1) % P;
        xz = (x1 * z2 + x2 * z1) % P;
        xx = (x1 * x2) % P; yy = (y1 * y2) % P; zz = (z1 * z2) % P;
        s1 = (yy + 2 * P - (a * xz) % P - (b3 * zz) % P) % P;               // Y1Y2 - a XZ - 3b ZZ
        s2 = ((a * xx) % P + (b3 * xz) % P + P - (((a * a) % P) * zz) % P) % P;
        s3 = (3 * xx + (a * zz) % P) % P;
        s4 = (yy + (a * xz) % P + (b3 * zz) % P) % P;
        ex = ((xy * s1) % P + P - (yz * s2) % P) % P;
        ey = ((s3 * s2) % P + (s4 * s1) % P) % P;
        ez = ((yz * s4) % P + (xy * s3) % P) % P;
      end
      checks++;
      if (mem[15] != ex || mem[16] != ey || mem[17] != ez) begin
        failures++;
        $display("FAIL trial %0d: got (%h,%h,%h) expected (%h,%h,%h)", trial,
                 mem[15], mem[16], mem[17], ex, ey, ez);
      end
      checks++;
      if (nmul != 17 || nmulsteps != 6) begin
        failures++; $display("FAIL %0d multiplications in %0d steps", nmul, nmulsteps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
