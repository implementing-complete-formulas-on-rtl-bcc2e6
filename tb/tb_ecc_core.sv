// tb_ecc_core: end-to-end test of the scalar-multiplication core.
//
// Runs complete scalar multiplications k*P and compares the affine result
// with a reference computed here by plain affine double-and-add (chord and
// tangent formulas with Fermat inversion), i.e. independently of the
// projective complete formulas the core uses. Two curves:
//   - a curve over the 61-bit prime 2^61-1 (nwords = 4), random point and
//     random scalars of a few dozen bits, including scalars spanning more than
//     one 17-bit scalar word;
//   - NIST P-256 (nwords = 16) with a short scalar;
//   - a curve over the 522-bit prime 2^522-117 with all 32 words.
// It also counts the mechanisms of the design and fails if one never
// happened: real and dummy additions, doublings, addition of the point at
// infinity, scalar word fetches, inversion bits 0 and 1, and MM2 being loaded
// while MM0/MM1 compute. The cycles of one point addition are measured and
// compared with the published figure for 256-bit fields (2774 cycles).
module tb_ecc_core;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              host_we, start, busy, done;
  logic [ADDR_W-1:0] host_addr;
  word_t             host_wdata, host_rdata;
  logic [NW_W-1:0]   nwords;
  logic [KB_W-1:0]   k_bits;

  ecc_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------- host access ----------------
  task automatic wr(input int bw, input int idx, input word_t d);
    @(negedge clk);
    host_we = 1'b1; host_addr = ADDR_W'(bw * 32 + idx); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic wr_big(input int bw, input big_t v, input int nw);
    for (int i = 0; i < nw; i++) wr(bw, i, word_t'(v >> (17 * i)));
  endtask

  task automatic rd_big(input int bw, input int nw, output big_t v);
    v = 0;
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      host_addr = ADDR_W'(bw * 32 + i);
      @(negedge clk);
      v = v | (big_t'(host_rdata) << (17 * i));
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_real_add = 0, n_dummy_add = 0, n_dbl = 0, n_fetch = 0, n_inv1 = 0, n_inv0 = 0;
  int n_mm2_overlap = 0, n_add_inf = 0;
  int step_start = 0, add_start = 0, last_add_cycles = 0, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_ctrl.st == dut.u_ctrl.C_BITSTART) begin
      if (dut.u_ctrl.phase == dut.u_ctrl.PH_INV) begin
        if (dut.u_ctrl.cur_bit) n_inv1++; else n_inv0++;
      end else begin
        if (dut.u_ctrl.cur_bit) n_real_add++; else n_dummy_add++;
      end
    end
    if (dut.u_ctrl.st == dut.u_ctrl.C_FETCH && dut.u_ctrl.phase != dut.u_ctrl.PH_INV) n_fetch++;
    if (dut.u_ctrl.st == dut.u_ctrl.C_LD2_W && dut.u_ctrl.mm_busy[0] && dut.u_ctrl.mm_busy[1])
      n_mm2_overlap++;
    // a point addition starts with step 0 of PH_ADD / PH_DBL
    if (dut.u_ctrl.st == dut.u_ctrl.C_NEXT && dut.u_ctrl.step == 4'd13 &&
        dut.u_ctrl.phase == dut.u_ctrl.PH_ADD) begin
      last_add_cycles = cyc - add_start;
      add_start = cyc;
    end
    if (dut.u_ctrl.st == dut.u_ctrl.C_NEXT && dut.u_ctrl.step == 4'd13 &&
        dut.u_ctrl.phase == dut.u_ctrl.PH_DBL) begin
      n_dbl++;
      add_start = cyc;
    end
  end

  // first addition of a run adds to the point at infinity
  always @(posedge clk)
    if (dut.u_ctrl.st == dut.u_ctrl.C_FETCH && dut.u_ctrl.phase == dut.u_ctrl.PH_ADD &&
        dut.u_ctrl.word_cnt == 0) n_add_inf++;

  // ---------------- one run ----------------
  task automatic run(input big_t p, input big_t a, input big_t b, input apt_t P,
                     input big_t k, input int kb, input int nw, input string name);
    big_t r, pinv, x, y, hx, hy;
    apt_t E;
    int t0;
    r = big_t'(1) << (17 * nw);
    pinv = mont_pinv(p);
    wr_big(0, p, nw);
    wr_big(1, pinv, 1);
    wr_big(2, mulm(a, r, p), nw);
    wr_big(3, mulm((3 * b) % p, r, p), nw);
    wr_big(4, mulm(r, r, p), nw);
    wr_big(5, 1, nw);
    wr_big(9, P.x, nw);
    wr_big(10, P.y, nw);
    wr_big(11, 1, nw);
    wr_big(30, k, 32);
    wr_big(31, k >> (17 * 32), 32);
    @(negedge clk);
    nwords = NW_W'(nw); k_bits = KB_W'(kb); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("%s: k_bits=%0d nwords=%0d cycles=%0d (one point addition: %0d)", name, kb, nw,
             cyc - t0, last_add_cycles);
    rd_big(12, nw, hx);
    rd_big(13, nw, hy);
    E = smul(k, P, a, p);
    checks++;
    if (E.inf || hx % p != E.x || hy % p != E.y || hx >= 2 * p || hy >= 2 * p) begin
      failures++;
      $display("FAIL %s: got x=%h y=%h expected x=%h y=%h", name, hx % p, hy % p, E.x, E.y);
    end
  endtask

  // ---------------- curves ----------------
  big_t p61, a61, b61, p256, a256, b256, k;
  apt_t P61, G;
  int   add256;

  initial begin
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; nwords = '0; k_bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // curve over 2^61-1 through a random point: b = y^2 - x^3 - a x
    p61 = (big_t'(1) << 61) - 1;
    a61 = big_t'({$urandom, $urandom}) % p61;
    P61.x = big_t'({$urandom, $urandom}) % p61;
    P61.y = big_t'({$urandom, $urandom}) % p61;
    P61.inf = 0;
    b61 = curve_b(p61, a61, P61);
    run(p61, a61, b61, P61, 1, 1, 4, "p61 k=1");
    run(p61, a61, b61, P61, 2, 2, 4, "p61 k=2");
    run(p61, a61, b61, P61, 'h2d, 6, 4, "p61 k=0x2d");
    for (int i = 0; i < 3; i++) begin
      k = big_t'({$urandom, $urandom}) & ((big_t'(1) << 40) - 1);
      k[39] = 1'b1;
      run(p61, a61, b61, P61, k, 40, 4, $sformatf("p61 random k=%h", k[39:0]));
    end

    // NIST P-256, short scalar
    p256 = 256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;
    a256 = p256 - 3;
    b256 = 256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b;
    G.x  = 256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296;
    G.y  = 256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5;
    G.inf = 0;
    run(p256, a256, b256, G, 'h13, 5, 16, "P-256 k=0x13");
    add256 = last_add_cycles;

    // largest field: a 522-bit prime with all 32 words (r = 2^544)
    p61 = (big_t'(1) << 522) - 117;
    P61.x = big_t'({$urandom, $urandom, $urandom}) % p61;
    P61.y = big_t'({$urandom, $urandom}) % p61;
    b61 = curve_b(p61, a61, P61);
    run(p61, a61, b61, P61, 'h2d, 6, 32, "p522 k=0x2d");

    // the published point addition at 256 bits takes 2774 cycles; this design
    // waits for MM2 and reloads operands each step, so allow up to 1.5x
    checks++;
    if (add256 < 1000 || add256 > 2774 * 3 / 2) begin
      failures++;
      $display("FAIL point addition took %0d cycles", add256);
    end

    $display("mechanisms: real_add=%0d dummy_add=%0d doublings=%0d add_to_infinity=%0d scalar_fetch=%0d inv_bit1=%0d inv_bit0=%0d mm2_overlap=%0d",
             n_real_add, n_dummy_add, n_dbl, n_add_inf, n_fetch, n_inv1, n_inv0, n_mm2_overlap);
    checks++; if (n_real_add == 0)   begin failures++; $display("FAIL no real addition"); end
    checks++; if (n_dummy_add == 0)  begin failures++; $display("FAIL no dummy addition"); end
    checks++; if (n_dbl == 0)        begin failures++; $display("FAIL no doubling"); end
    checks++; if (n_add_inf == 0)    begin failures++; $display("FAIL no addition of infinity"); end
    checks++; if (n_fetch < 3)       begin failures++; $display("FAIL scalar word fetch"); end
    checks++; if (n_inv1 == 0 || n_inv0 == 0) begin failures++; $display("FAIL inversion bits"); end
    checks++; if (n_mm2_overlap == 0) begin failures++; $display("FAIL MM2 never overlapped"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
