// tb_ecc_ctrl: checks the main state machine on its own.
//
// The transfer machines and processors are replaced by stand-ins that stay
// busy for random numbers of cycles and return scalar or prime words on a
// fetch. The test follows the commands the controller issues and checks:
//   - the number of processor operations of a run (pre-processing, 28 steps
//     per scalar bit, inversion over 17*nwords bits, post-processing);
//   - that the result of each scalar bit's addition goes to R2 when the bit
//     is 1 and to R1 when it is 0;
//   - that each inversion step keeps M0*M1 (writes t0) exactly when the
//     bit of p-2 is 1, with the borrow of p-2 crossing word boundaries;
//   - the step discipline: results are stored only when all processors are
//     idle, and MM2 starts only after MM0/MM1 have started in the same step.
module tb_ecc_ctrl;
  import ecc_pkg::*;
  typedef logic [1151:0] big_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [NW_W-1:0]   nwords;
  logic [KB_W-1:0]   k_bits;
  logic              xa_valid, xa_busy, xa_fetch_valid, xb_valid, xb_busy;
  logic [1:0]        xa_kind, xa_proc, xb_kind, xb_proc;
  logic [BW_W-1:0]   xa_bw, xb_bw;
  logic [IDX_W-1:0]  xa_idx;
  logic [NPROC-1:0]  xa_mask, xb_mask, mm_start, mm_busy;
  slot_e             xa_slot, xb_slot;
  logic [NW_W-1:0]   xa_len, xb_len;
  word_t             xa_fetch_data;
  mm_op_e            mm_op [NPROC];

  ecc_ctrl dut (.*);

  big_t kval, pval;
  int checks = 0, failures = 0;

  // stand-in transfer machines
  int xa_cnt = 0, xb_cnt = 0;
  logic xa_pf = 0;
  always @(posedge clk) begin
    xa_fetch_valid <= 1'b0;
    if (xa_cnt > 0) begin
      xa_cnt <= xa_cnt - 1;
      if (xa_cnt == 1 && xa_pf) begin
        xa_fetch_valid <= 1'b1;
        xa_pf <= 0;
      end
    end else if (xa_valid) begin
      xa_cnt <= 1 + $urandom % 6;
      if (xa_kind == 2) begin
        xa_pf <= 1;
        xa_fetch_data <= (xa_bw == BW_P) ? word_t'(pval >> (17 * xa_idx))
                       : word_t'(kval >> (17 * (32 * (xa_bw - BW_K) + xa_idx)));
      end
    end
    if (xb_cnt > 0) xb_cnt <= xb_cnt - 1;
    else if (xb_valid) xb_cnt <= 1 + $urandom % 6;
  end
  assign xa_busy = (xa_cnt > 0);
  assign xb_busy = (xb_cnt > 0);

  // stand-in processors
  int mm_cnt [NPROC] = '{0, 0, 0};
  always @(posedge clk)
    for (int k = 0; k < NPROC; k++) begin
      if (mm_cnt[k] > 0) mm_cnt[k] <= mm_cnt[k] - 1;
      else if (mm_start[k]) mm_cnt[k] <= 1 + $urandom % 40;
    end
  always_comb for (int k = 0; k < NPROC; k++) mm_busy[k] = (mm_cnt[k] > 0);

  // observation
  int n_ops = 0;
  int add_dst [$];
  int inv_dst [$];
  logic started01 = 0;
  always @(posedge clk) if (rst_n) begin
    n_ops += $countones(mm_start);
    if (mm_start[1:0] != 0) started01 = 1;
    if (mm_start[2]) begin
      checks++;
      if (!started01) begin failures++; $display("FAIL MM2 started before MM0/MM1"); end
    end
    if (xa_valid && !xa_busy && xa_kind == 1) begin
      started01 = 0;
      checks++;
      if (mm_busy != 0) begin failures++; $display("FAIL store while a processor is busy"); end
      if (xa_proc == 0 && dut.phase == dut.PH_ADD && (xa_bw == BW_R1 + 1 || xa_bw == BW_RACC + 1))
        add_dst.push_back(xa_bw == BW_RACC + 1);
      if (xa_proc == 0 && dut.phase == dut.PH_INV)
        inv_dst.push_back(xa_bw == BW_T0);
    end
  end

  task automatic run(input int nw, input int kb);
    big_t e;
    add_dst.delete(); inv_dst.delete(); n_ops = 0;
    @(negedge clk);
    start = 1; nwords = NW_W'(nw); k_bits = KB_W'(kb);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // operations: PRE 3+3+1, per bit 2 x 40, INV0 2, INV 2 per bit, POST 2
    checks++;
    if (n_ops != 7 + 80 * kb + 2 + 2 * 17 * nw + 2) begin
      failures++; $display("FAIL %0d operations, expected %0d", n_ops, 7 + 80 * kb + 2 + 34 * nw + 2);
    end
    checks++;
    if (add_dst.size() != kb) begin failures++; $display("FAIL %0d additions", add_dst.size()); end
    else for (int i = 0; i < kb; i++) begin
      checks++;
      if (add_dst[i] != kval[i]) begin failures++; $display("FAIL scalar bit %0d", i); end
    end
    e = pval - 2;
    checks++;
    if (inv_dst.size() != 17 * nw) begin failures++; $display("FAIL %0d inversion bits", inv_dst.size()); end
    else for (int i = 0; i < 17 * nw; i++) begin
      checks++;
      if (inv_dst[i] != e[i]) begin failures++; $display("FAIL exponent bit %0d", i); end
    end
  endtask

  initial begin
    start = 0; nwords = '0; k_bits = '0; xa_fetch_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    kval = big_t'({$urandom, $urandom, $urandom});
    pval = big_t'({$urandom, $urandom}) | 1;
    pval = pval & ((big_t'(1) << 51) - 1);
    run(3, 40);
    // p with low word 1: the borrow of p-2 runs through the upper words
    kval = big_t'({$urandom, $urandom});
    pval = (big_t'($urandom) << 34) | 1;
    run(3, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
