// ecc_ctrl: main state machine of the scalar-multiplication core.
//
// Computes k*P as a fixed sequence of "steps". A step gives each of the three
// Montgomery processors (MM0, MM1, MM2) at most one operation; the controller
// runs it as follows, using the two memory-transfer machines (xa on memory
// port A, xb on port B):
//
//   1. xa loads both operands of MM0 while xb loads both of MM1;
//   2. MM0 and MM1 start; while they compute, xa and xb load the two
//      operands of MM2 in parallel, and MM2 starts;
//   3. when all three are idle, xa stores MM0's result and xb MM1's, then xa
//      stores MM2's.
//
// All operands of a step are thus read before any result is written. The
// program is:
//
//   start    broadcast p, then p', to all processors over port A
//   PRE      R0 <- P*r^2/r (into the Montgomery domain, three products in
//            parallel); R2 <- point at infinity (0 : 2r^2 : 0), with 0
//            represented by the multiple 4p of p
//   loop     for each scalar bit k_i, least significant first:
//              ADD: R1 (k_i = 0) or R2 (k_i = 1) <- R2 + R0   (14 steps)
//              DBL: R0 <- R0 + R0                            (14 steps)
//            both with the same complete addition schedule (add_schedule),
//            so every bit costs the same work (double-and-add-always)
//   INV      Z^-1 by Fermat, right to left over the bits of p-2: per bit,
//            MM0 forms M0*M1 (kept as M0 only when the bit is 1) and MM1
//            squares M1; M0 starts at 1 and M1 at Z*r, so M0 ends as Z^-1
//   POST     x = X*Z^-1/r, y = Y*Z^-1/r into R1.X, R1.Y
//
// The scalar is read from memory one 17-bit word at a time into the shift
// register (scalar_shr); during INV the same register is loaded with the
// words of p-2, formed on the fly from p with a borrow. Point addresses are
// resolved from the schedule's relative operands through three base
// registers (P, Q, OUT); choosing OUT from the scalar bit is what makes the
// addition real or dummy.
//
// Interface: `start` (one cycle, core idle) with nwords (operand length s)
// and k_bits (number of scalar bits, 1..1088); busy stays high until `done`
// pulses. The memory must hold the map of ecc_pkg.
//
// The double-and-add-always with registers R0, R1, R2, the use of the
// addition formulas for doubling, the two-port loading order (two processors
// loaded together, MM2 loaded once MM0 and MM1 run), pre-processing by three
// multiplications and inversion by Fermat's little theorem follow the
// document. Waiting for MM2 at the end of every step, the representation of
// the point at infinity and zero, and the memory map are this design's own.
module ecc_ctrl
  import ecc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NW_W-1:0]    nwords,
  input  logic [KB_W-1:0]    k_bits,
  output logic               busy,
  output logic               done,
  // transfer machine on port A
  output logic               xa_valid,
  output logic [1:0]         xa_kind,
  output logic [BW_W-1:0]    xa_bw,
  output logic [IDX_W-1:0]   xa_idx,
  output logic [NPROC-1:0]   xa_mask,
  output logic [1:0]         xa_proc,
  output slot_e              xa_slot,
  output logic [NW_W-1:0]    xa_len,
  input  logic               xa_busy,
  input  logic               xa_fetch_valid,
  input  word_t              xa_fetch_data,
  // transfer machine on port B
  output logic               xb_valid,
  output logic [1:0]         xb_kind,
  output logic [BW_W-1:0]    xb_bw,
  output logic [NPROC-1:0]   xb_mask,
  output logic [1:0]         xb_proc,
  output slot_e              xb_slot,
  output logic [NW_W-1:0]    xb_len,
  input  logic               xb_busy,
  // processors
  output logic [NPROC-1:0]   mm_start,
  output mm_op_e             mm_op [NPROC],
  input  logic [NPROC-1:0]   mm_busy
);

  localparam logic [1:0] K_LOAD = 2'd0, K_STORE = 2'd1, K_FETCH = 2'd2;

  typedef enum logic [2:0] {PH_PRE, PH_ADD, PH_DBL, PH_INV0, PH_INV, PH_POST} phase_e;

  typedef enum logic [4:0] {
    C_IDLE, C_INITP, C_INITP_W, C_INITQ, C_INITQ_W,
    C_LD01A, C_LD01A_W, C_LD01B, C_LD01B_W, C_START01,
    C_LD2, C_LD2_W, C_START2, C_RUN_W,
    C_ST01, C_ST01_W, C_ST2, C_ST2_W,
    C_NEXT, C_FETCH, C_FETCH_W, C_BITSTART, C_DONE
  } cstate_e;

  cstate_e          st;
  phase_e           phase;
  logic [3:0]       step;
  logic [KB_W-1:0]  bit_cnt;     // bits done in the current loop
  logic [4:0]       bit_in_word; // bits consumed of the word in the register
  logic [NW_W:0]    word_cnt;    // next word to fetch
  logic             borrow;      // for p-2
  logic [NW_W-1:0]  s;
  logic [KB_W-1:0]  nbits;       // bits of the current loop
  logic [BW_W-1:0]  base_p, base_q, base_out;

  // shift register
  logic  shr_load, shr_shift, cur_bit;
  word_t shr_din;
  scalar_shr #(.W(W)) u_shr (
    .clk(clk), .rst_n(rst_n), .load(shr_load), .din(shr_din),
    .shift(shr_shift), .bit_out(cur_bit)
  );

  // schedule of the addition formulas
  mm_cmd_t add_ops [NPROC];
  add_schedule u_sched (.step(step), .ops(add_ops));

  // the other steps of the program
  mm_cmd_t cur_ops [NPROC];
  always_comb begin
    for (int k = 0; k < NPROC; k++) cur_ops[k] = NOP;
    unique case (phase)
      PH_ADD, PH_DBL: cur_ops = add_ops;
      PH_PRE: begin
        if (step == 4'd0) begin
          cur_ops[0] = mk(OP_MUL, abs_op(BW_R0),        abs_op(BW_R2), abs_op(BW_R0));
          cur_ops[1] = mk(OP_MUL, abs_op(BW_R0 + 5'd1), abs_op(BW_R2), abs_op(BW_R0 + 5'd1));
          cur_ops[2] = mk(OP_MUL, abs_op(BW_R0 + 5'd2), abs_op(BW_R2), abs_op(BW_R0 + 5'd2));
        end else if (step == 4'd1) begin
          cur_ops[0] = mk(OP_SUB, abs_op(BW_ONE), abs_op(BW_ONE), abs_op(BW_ZERO));
          cur_ops[1] = mk(OP_SUB, abs_op(BW_ONE), abs_op(BW_ONE), abs_op(BW_RACC));
          cur_ops[2] = mk(OP_SUB, abs_op(BW_ONE), abs_op(BW_ONE), abs_op(BW_RACC + 5'd2));
        end else begin
          cur_ops[0] = mk(OP_ADD, abs_op(BW_R2), abs_op(BW_R2), abs_op(BW_RACC + 5'd1));
        end
      end
      PH_INV0: begin  // M0 <- 1, M1 <- Z (of R2)
        cur_ops[0] = mk(OP_ADD, abs_op(BW_ONE), abs_op(BW_ZERO), t_op(0));
        cur_ops[1] = mk(OP_ADD, abs_op(BW_RACC + 5'd2), abs_op(BW_ZERO), t_op(1));
      end
      PH_INV: begin   // OUT.X is M0 when the bit is 1, a scratch word when 0
        cur_ops[0] = mk(OP_MUL, t_op(0), t_op(1), rel_op(BASE_OUT, 0));
        cur_ops[1] = mk(OP_MUL, t_op(1), t_op(1), t_op(1));
      end
      PH_POST: begin
        cur_ops[0] = mk(OP_MUL, abs_op(BW_RACC),        t_op(0), abs_op(BW_R1));
        cur_ops[1] = mk(OP_MUL, abs_op(BW_RACC + 5'd1), t_op(0), abs_op(BW_R1 + 5'd1));
      end
      default: ;
    endcase
  end

  function automatic logic [BW_W-1:0] resolve(input opnd_t o, input logic [BW_W-1:0] bp,
                                              input logic [BW_W-1:0] bq,
                                              input logic [BW_W-1:0] bo);
    if (!o.rel) return o.bw;
    unique case (o.base)
      BASE_P:  return bp + o.bw;
      BASE_Q:  return bq + o.bw;
      default: return bo + o.bw;
    endcase
  endfunction

  logic [BW_W-1:0] a_bw [NPROC], b_bw [NPROC], d_bw [NPROC];
  logic [NPROC-1:0] valid;
  always_comb begin
    for (int k = 0; k < NPROC; k++) begin
      a_bw[k]  = resolve(cur_ops[k].a,   base_p, base_q, base_out);
      b_bw[k]  = resolve(cur_ops[k].b,   base_p, base_q, base_out);
      d_bw[k]  = resolve(cur_ops[k].dst, base_p, base_q, base_out);
      valid[k] = (cur_ops[k].op != OP_NONE);
      mm_op[k] = cur_ops[k].op;
    end
  end

  logic xfers_idle;
  assign xfers_idle = !xa_busy && !xb_busy;

  // word of the exponent p-2 being fetched
  logic [W:0] sub_word;
  assign sub_word = {1'b0, xa_fetch_data} - ((word_cnt == 0) ? (W+1)'(2) : (W+1)'(borrow));

  always_comb begin
    xa_valid = 1'b0; xa_kind = K_LOAD; xa_bw = '0; xa_idx = '0; xa_mask = '0;
    xa_proc  = '0;   xa_slot = SLOT_A; xa_len = s;
    xb_valid = 1'b0; xb_kind = K_LOAD; xb_bw = '0; xb_mask = '0;
    xb_proc  = '0;   xb_slot = SLOT_A; xb_len = s;
    mm_start = '0;
    unique case (st)
      C_INITP: begin
        xa_valid = 1'b1; xa_bw = BW_P;    xa_mask = '1; xa_slot = SLOT_P;
      end
      C_INITQ: begin
        xa_valid = 1'b1; xa_bw = BW_PINV; xa_mask = '1; xa_slot = SLOT_PINV; xa_len = NW_W'(1);
      end
      C_LD01A: begin
        xa_valid = valid[0]; xa_bw = a_bw[0]; xa_mask = 3'b001; xa_slot = SLOT_A;
        xb_valid = valid[1]; xb_bw = a_bw[1]; xb_mask = 3'b010; xb_slot = SLOT_A;
      end
      C_LD01B: begin
        xa_valid = valid[0]; xa_bw = b_bw[0]; xa_mask = 3'b001; xa_slot = SLOT_B;
        xb_valid = valid[1]; xb_bw = b_bw[1]; xb_mask = 3'b010; xb_slot = SLOT_B;
      end
      C_START01: mm_start = {1'b0, valid[1:0]};
      C_LD2: begin
        xa_valid = valid[2]; xa_bw = a_bw[2]; xa_mask = 3'b100; xa_slot = SLOT_A;
        xb_valid = valid[2]; xb_bw = b_bw[2]; xb_mask = 3'b100; xb_slot = SLOT_B;
      end
      C_START2: mm_start = {valid[2], 2'b00};
      C_ST01: begin
        xa_valid = valid[0]; xa_kind = K_STORE; xa_bw = d_bw[0]; xa_proc = 2'd0;
        xb_valid = valid[1]; xb_kind = K_STORE; xb_bw = d_bw[1]; xb_proc = 2'd1;
      end
      C_ST2: begin
        xa_valid = valid[2]; xa_kind = K_STORE; xa_bw = d_bw[2]; xa_proc = 2'd2;
      end
      C_FETCH: begin
        xa_valid = 1'b1; xa_kind = K_FETCH;
        xa_bw    = (phase == PH_INV) ? BW_P : (BW_K + BW_W'(word_cnt[IDX_W]));
        xa_idx   = word_cnt[IDX_W-1:0];
      end
      default: ;
    endcase
  end

  always_comb begin
    shr_load  = (st == C_FETCH_W) && xa_fetch_valid;
    shr_din   = (phase == PH_INV) ? sub_word[W-1:0] : xa_fetch_data;
    shr_shift = (st == C_NEXT) && ((phase == PH_DBL && step == 4'(ADD_STEPS - 1)) ||
                                   phase == PH_INV);
  end

  // Starts a new bit: fetch a new word when the register is used up.
  function automatic cstate_e bit_entry(input logic [4:0] biw);
    return (biw == 5'(W)) ? C_FETCH : C_BITSTART;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      phase       <= PH_PRE;
      step        <= '0;
      bit_cnt     <= '0;
      bit_in_word <= '0;
      word_cnt    <= '0;
      borrow      <= 1'b0;
      s           <= '0;
      nbits       <= '0;
      base_p      <= BW_RACC;
      base_q      <= BW_R0;
      base_out    <= BW_R1;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          s     <= nwords;
          nbits <= k_bits;
          phase <= PH_PRE;
          step  <= '0;
          st    <= C_INITP;
        end
        C_INITP:   st <= C_INITP_W;
        C_INITP_W: if (xfers_idle) st <= C_INITQ;
        C_INITQ:   st <= C_INITQ_W;
        C_INITQ_W: if (xfers_idle) st <= C_LD01A;
        // ---- one step ----
        C_LD01A:   st <= C_LD01A_W;
        C_LD01A_W: if (xfers_idle) st <= C_LD01B;
        C_LD01B:   st <= C_LD01B_W;
        C_LD01B_W: if (xfers_idle) st <= C_START01;
        C_START01: st <= C_LD2;
        C_LD2:     st <= C_LD2_W;
        C_LD2_W:   if (xfers_idle) st <= C_START2;
        C_START2:  st <= C_RUN_W;
        C_RUN_W:   if (mm_busy == '0) st <= C_ST01;
        C_ST01:    st <= C_ST01_W;
        C_ST01_W:  if (xfers_idle) st <= C_ST2;
        C_ST2:     st <= C_ST2_W;
        C_ST2_W:   if (xfers_idle) st <= C_NEXT;
        // ---- sequencing ----
        C_NEXT: begin
          unique case (phase)
            PH_PRE: begin
              if (step != 4'd2) begin
                step <= step + 1'b1;
                st   <= C_LD01A;
              end else begin
                step        <= '0;
                bit_cnt     <= '0;
                word_cnt    <= '0;
                bit_in_word <= 5'(W);
                if (nbits == '0) begin
                  phase <= PH_INV0;
                  st    <= C_LD01A;
                end else begin
                  phase <= PH_ADD;
                  st    <= C_FETCH;
                end
              end
            end
            PH_ADD: begin
              if (step != 4'(ADD_STEPS - 1)) begin
                step <= step + 1'b1;
              end else begin
                step     <= '0;
                phase    <= PH_DBL;
                base_p   <= BW_R0;
                base_q   <= BW_R0;
                base_out <= BW_R0;
              end
              st <= C_LD01A;
            end
            PH_DBL: begin
              if (step != 4'(ADD_STEPS - 1)) begin
                step <= step + 1'b1;
                st   <= C_LD01A;
              end else begin
                step        <= '0;
                bit_cnt     <= bit_cnt + 1'b1;
                bit_in_word <= bit_in_word + 1'b1;
                if (bit_cnt + 1'b1 == nbits) begin
                  phase <= PH_INV0;
                  st    <= C_LD01A;
                end else begin
                  phase <= PH_ADD;
                  st    <= bit_entry(bit_in_word + 1'b1);
                end
              end
            end
            PH_INV0: begin
              phase       <= PH_INV;
              bit_cnt     <= '0;
              word_cnt    <= '0;
              bit_in_word <= 5'(W);
              nbits       <= KB_W'(s) * KB_W'(W);
              st          <= C_FETCH;
            end
            PH_INV: begin
              bit_cnt     <= bit_cnt + 1'b1;
              bit_in_word <= bit_in_word + 1'b1;
              if (bit_cnt + 1'b1 == nbits) begin
                phase <= PH_POST;
                st    <= C_LD01A;
              end else begin
                st <= bit_entry(bit_in_word + 1'b1);
              end
            end
            default: st <= C_DONE;  // PH_POST
          endcase
        end
        C_FETCH:   st <= C_FETCH_W;
        C_FETCH_W: if (xa_fetch_valid) begin
          word_cnt    <= word_cnt + 1'b1;
          bit_in_word <= '0;
          if (phase == PH_INV) borrow <= sub_word[W];
          st <= C_BITSTART;
        end
        C_BITSTART: begin  // the register now shows the bit to use
          if (phase == PH_INV) begin
            base_out <= cur_bit ? BW_T0 : (BW_T0 + 5'd2);
          end else begin
            base_p   <= BW_RACC;
            base_q   <= BW_R0;
            base_out <= cur_bit ? BW_RACC : BW_R1;
          end
          st <= C_LD01A;
        end
        C_DONE: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);

endmodule
