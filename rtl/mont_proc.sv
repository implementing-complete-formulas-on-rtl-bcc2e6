// mont_proc: Montgomery addition, subtraction and multiplication processor.
//
// One processor of the core. It holds its operands in a small local memory
// (slots A, B and the prime p, one big word of up to MAX_WORDS 17-bit words
// each, plus the one-word constant p' = -p^-1 mod 2^17) and its result in an
// accumulator of MAX_WORDS+1 words. Three operations, selected by `op`:
//
//   OP_MUL  t = A*B/r mod p with r = 2^(17*nwords), by the FIOS method
//           (finely integrated operand scanning): for each word a_i of A the
//           partial product a_i*B and the partial reduction m*p are added
//           into t in the same inner loop, word by word, then t is shifted
//           down one word. No final subtraction: if A*B < r*p the result is
//           below 2p.
//   OP_ADD  t = A + B, no reduction.
//   OP_SUB  t = A - B + 4p, no reduction, so the result stays positive for any
//           B below 4p.
//
// The inner loop uses two 17x17 multipliers, one for a_i*b_j and one for
// m*p_j; the second one also forms m = t_0*p' mod 2^17 at the start of each
// outer iteration. Values are kept below 7p between reductions (see the
// README), which needs r >= 64p, i.e. 17*nwords >= bits(p) + 6.
//
// Interface and timing. Words are written with ld_en/ld_slot/ld_idx/ld_data
// while the processor is idle, one per cycle on each of the two load ports;
// the two ports may write different slots in the same cycle. `start` (one
// cycle, with `op` and `nwords`) begins an operation; `busy` is high until `done` pulses.
// OP_MUL takes nwords*(nwords+3)+1 cycles, OP_ADD and OP_SUB nwords+1. The
// result is read combinationally through rd_idx/rd_data after `done`, and
// stays valid until the next start.
//
// The operations, their lack of reduction, FIOS and the two internal
// multipliers follow the document; the local-memory layout, the 4p offset of
// the subtraction and the exact cycle schedule are this design's own.
module mont_proc
  import ecc_pkg::*;
#(
  parameter int unsigned SUB_K_LOG2 = 2   // subtraction adds (2^SUB_K_LOG2)*p
) (
  input  logic                clk,
  input  logic                rst_n,
  // two local-memory load ports (one per main-memory port)
  input  logic                ld_en   [2],
  input  slot_e               ld_slot [2],
  input  logic [IDX_W-1:0]    ld_idx  [2],
  input  word_t               ld_data [2],
  // command
  input  logic                start,
  input  mm_op_e              op,
  input  logic [NW_W-1:0]     nwords,
  output logic                busy,
  output logic                done,
  // result read port
  input  logic [IDX_W-1:0]    rd_idx,
  output word_t               rd_data
);

  word_t mem_a [MAX_WORDS];
  word_t mem_b [MAX_WORDS];
  word_t mem_p [MAX_WORDS];
  word_t pinv;
  word_t t     [MAX_WORDS+1];

  typedef enum logic [2:0] {S_IDLE, S_PROD0, S_MCALC, S_INNER, S_TOP, S_ADDSUB} state_e;
  state_e state;

  mm_op_e          cur_op;
  logic [NW_W-1:0] s;        // operand length
  logic [NW_W-1:0] i;        // outer index (word of A)
  logic [NW_W-1:0] j;        // inner index
  word_t           u_lo;     // low word of t_0 + a_i*b_0
  word_t           m;        // reduction factor
  logic [19:0]     carry;    // inner-loop carry
  logic [1:0]      c_as;     // add/sub carry (0..2)

  // shared multipliers
  word_t       mul1_x, mul1_y, mul2_x, mul2_y;
  logic [33:0] mul1, mul2;
  assign mul1 = mul1_x * mul1_y;
  assign mul2 = mul2_x * mul2_y;

  word_t a_i, b_j, nb_j, p_j, t_j, p_jm1, kp_j;
  always_comb begin
    a_i   = mem_a[i[IDX_W-1:0]];
    b_j   = mem_b[j[IDX_W-1:0]];
    nb_j  = ~b_j;
    p_j   = mem_p[j[IDX_W-1:0]];
    t_j   = t[j[IDX_W:0]];
    p_jm1 = (j == 0) ? '0 : mem_p[j[IDX_W-1:0] - 1'b1];
    // word j of (2^SUB_K_LOG2)*p
    kp_j  = word_t'({p_j, p_jm1} >> (W - SUB_K_LOG2));
  end

  always_comb begin
    mul1_x = a_i;
    mul1_y = (state == S_PROD0) ? mem_b[0] : b_j;
    mul2_x = (state == S_MCALC) ? u_lo : m;
    mul2_y = (state == S_MCALC) ? pinv : p_j;
  end

  logic [36:0] inner_sum;
  logic [35:0] prod0_sum;
  logic [20:0] top_sum;
  logic [18:0] as_sum;
  always_comb begin
    inner_sum = 37'(t_j) + 37'(mul1) + 37'(mul2) + 37'(carry);
    prod0_sum = 36'(t[0]) + 36'(mul1);
    top_sum   = 21'(t[s[IDX_W:0]]) + 21'(carry);
    if (cur_op == OP_ADD)
      as_sum = 19'(mem_a[j[IDX_W-1:0]]) + 19'(b_j) + 19'(c_as);
    else
      as_sum = 19'(mem_a[j[IDX_W-1:0]]) + 19'(kp_j) + 19'(nb_j) + 19'(c_as);
  end

  // local-memory writes
  always_ff @(posedge clk) begin
    for (int q = 0; q < 2; q++) begin
      if (ld_en[q]) begin
        unique case (ld_slot[q])
          SLOT_A:    mem_a[ld_idx[q]] <= ld_data[q];
          SLOT_B:    mem_b[ld_idx[q]] <= ld_data[q];
          SLOT_P:    mem_p[ld_idx[q]] <= ld_data[q];
          SLOT_PINV: pinv             <= ld_data[q];
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      cur_op <= OP_NONE;
      s      <= '0;
      i      <= '0;
      j      <= '0;
      u_lo   <= '0;
      m      <= '0;
      carry  <= '0;
      c_as   <= '0;
      for (int k = 0; k <= MAX_WORDS; k++) t[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && op != OP_NONE) begin
            cur_op <= op;
            s      <= nwords;
            i      <= '0;
            j      <= '0;
            carry  <= '0;
            for (int k = 0; k <= MAX_WORDS; k++) t[k] <= '0;
            if (op == OP_MUL) begin
              state <= S_PROD0;
            end else begin
              c_as  <= (op == OP_SUB) ? 2'd1 : 2'd0;
              state <= S_ADDSUB;
            end
          end
        end
        S_PROD0: begin        // u = t_0 + a_i*b_0
          u_lo  <= prod0_sum[W-1:0];
          state <= S_MCALC;
        end
        S_MCALC: begin        // m = u*p' mod 2^17
          m     <= mul2[W-1:0];
          j     <= '0;
          carry <= '0;
          state <= S_INNER;
        end
        S_INNER: begin        // t_{j-1} = low(t_j + a_i*b_j + m*p_j + carry)
          if (j != 0) t[j[IDX_W:0] - 1'b1] <= inner_sum[W-1:0];
          carry <= 20'(inner_sum >> W);
          if (j == s - 1'b1) state <= S_TOP;
          else               j     <= j + 1'b1;
        end
        S_TOP: begin          // t_{s-1}, t_s from the old top word and the carry
          t[s[IDX_W:0] - 1'b1] <= top_sum[W-1:0];
          t[s[IDX_W:0]]        <= word_t'(top_sum >> W);
          carry <= '0;
          if (i == s - 1'b1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i     <= i + 1'b1;
            state <= S_PROD0;
          end
        end
        S_ADDSUB: begin
          t[j[IDX_W:0]] <= as_sum[W-1:0];
          c_as <= as_sum[W+1:W];
          if (j == s - 1'b1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_data = t[{1'b0, rd_idx}];

  // Loads and a new start are only legal while idle.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> !(ld_en[0] || ld_en[1]));
  a_no_slot_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                    (ld_en[0] && ld_en[1]) |-> ld_slot[0] != ld_slot[1]);
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
