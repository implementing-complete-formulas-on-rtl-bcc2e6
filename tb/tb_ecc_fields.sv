// tb_ecc_fields: full-length scalar multiplications at every field size of
// the published results (192, 224, 256, 320, 384, 512 and 521 bits).
//
// For each size it takes a prime of that size (the NIST prime where there is
// one, 2^320-197 and 2^512-569 otherwise), builds a random curve through a
// random point (b = y^2 - x^3 - a*x), runs k*P with a random scalar as long
// as the prime and compares the affine result with the reference of
// ecc_ref_pkg. The operand length is the smallest number of 17-bit words with
// six spare bits. It measures the cycles of one point addition and of the
// whole run and checks them against the published counts: at most 1.25x for
// a point addition and 1.3x for the scalar multiplication (this design
// waits for all three processors at every step, see README).
module tb_ecc_fields;
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

  // ---------------- point-addition timing ----------------
  int add_start = 0, last_add_cycles = 0, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_ctrl.st == dut.u_ctrl.C_NEXT && dut.u_ctrl.step == 4'd13) begin
      if (dut.u_ctrl.phase == dut.u_ctrl.PH_ADD) last_add_cycles = cyc - add_start;
      add_start = cyc;
    end
  end

  localparam int BITS  [7] = '{192, 224, 256, 320, 384, 512, 521};
  // published cycle counts: one point addition, one scalar multiplication
  localparam int ADD   [7] = '{1895, 2311, 2774, 3902, 4874, 7994, 7994};
  localparam int TOTAL [7] = '{728508, 1036294, 1421392, 2498655, 3744883, 8188059, 8331987};
  int total_cycles;
  function automatic big_t prime(input int i);
    big_t one = 1;
    case (i)
      0:       return (one << 192) - (one << 64) - 1;
      1:       return (one << 224) - (one << 96) + 1;
      2:       return (one << 256) - (one << 224) + (one << 192) + (one << 96) - 1;
      3:       return (one << 320) - 197;
      4:       return (one << 384) - (one << 128) - (one << 96) + (one << 32) - 1;
      5:       return (one << 512) - 569;
      default: return (one << 521) - 1;
    endcase
  endfunction

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
    total_cycles = cyc - t0;
    $display("%s: k_bits=%0d nwords=%0d cycles=%0d (one point addition: %0d)", name, kb, nw,
             total_cycles, last_add_cycles);
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
  big_t p61, a61, b61, k;
  apt_t P61;

  initial begin
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; nwords = '0; k_bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    a61 = big_t'({$urandom, $urandom});
    for (int i = 0; i < 7; i++) begin
      p61 = prime(i);
      P61.x = big_t'({$urandom, $urandom, $urandom}) % p61;
      P61.y = big_t'({$urandom, $urandom}) % p61;
      P61.inf = 0;
      b61 = curve_b(p61, a61, P61);
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      k = k % p61;
      run(p61, a61, b61, P61, k, BITS[i], (BITS[i] + 22) / 17, $sformatf("%0d bits", BITS[i]));
      checks++;
      if (last_add_cycles > ADD[i] * 5 / 4) begin
        failures++; $display("FAIL point addition %0d cycles, published %0d", last_add_cycles, ADD[i]);
      end
      checks++;
      if (total_cycles > TOTAL[i] * 13 / 10) begin
        failures++; $display("FAIL scalar multiplication %0d cycles, published %0d", total_cycles, TOTAL[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
