// tb_mont_proc: self-checking test of one Montgomery processor.
//
// Loads p, p' and random operands through both load ports and checks
// Montgomery multiplication (result congruent to A*B*r^-1 mod p and below 2p
// when A*B < r*p), addition and subtraction (exact integer results A+B and
// A-B+4p) for several operand lengths, against arithmetic done here on wide
// integers. It also checks the cycle counts stated in the module header.
module tb_mont_proc;
  import ecc_pkg::*;

  typedef logic [1151:0] big_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ld_en   [2];
  slot_e            ld_slot [2];
  logic [IDX_W-1:0] ld_idx  [2];
  word_t            ld_data [2];
  logic             start, busy, done;
  mm_op_e           op;
  logic [NW_W-1:0]  nwords;
  logic [IDX_W-1:0] rd_idx;
  word_t            rd_data;

  mont_proc dut (.*);

  int checks = 0, failures = 0;

  task automatic load(input slot_e sl, input big_t v, input int nw, input int port);
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      ld_en[port] = 1'b1; ld_slot[port] = sl; ld_idx[port] = IDX_W'(i);
      ld_data[port] = word_t'(v >> (17 * i));
    end
    @(negedge clk);
    ld_en[port] = 1'b0;
  endtask

  // A on port 0 and B on port 1 in the same cycles
  task automatic load_ab(input big_t a, input big_t b, input int nw);
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      ld_en[0] = 1'b1; ld_slot[0] = SLOT_A; ld_idx[0] = IDX_W'(i); ld_data[0] = word_t'(a >> (17 * i));
      ld_en[1] = 1'b1; ld_slot[1] = SLOT_B; ld_idx[1] = IDX_W'(i); ld_data[1] = word_t'(b >> (17 * i));
    end
    @(negedge clk);
    ld_en[0] = 1'b0; ld_en[1] = 1'b0;
  endtask

  task automatic exec(input mm_op_e o, input int nw, output big_t res, output int cycles);
    @(negedge clk);
    start = 1'b1; op = o; nwords = NW_W'(nw);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    res = 0;
    for (int i = 0; i <= nw; i++) begin
      rd_idx = IDX_W'(i);
      #1;
      if (i < nw || nw < 32) res = res | (big_t'(rd_data) << (17 * i));
    end
  endtask

  function automatic big_t rnd(input int bits);
    big_t v = 0;
    for (int i = 0; i < 36; i++) v = (v << 32) | big_t'($urandom);
    return v & ((big_t'(1) << bits) - 1);
  endfunction

  task automatic one_prime(input big_t p, input int nw);
    big_t r, x, pinv, a, b, res, rinv_chk;
    int cyc;
    r = big_t'(1) << (17 * nw);
    x = p;
    for (int i = 0; i < 6; i++) x = (x * (2 - p * x)) & big_t'(17'h1ffff);
    pinv = (big_t'(1 << 17) - x) & big_t'(17'h1ffff);
    load(SLOT_P, p, nw, 0);
    load(SLOT_PINV, pinv, 1, 1);
    for (int n = 0; n < 6; n++) begin
      a = rnd(17 * nw) % (7 * p);
      b = rnd(17 * nw) % (7 * p);
      if (n == 0) begin a = 7 * p - 1; b = 7 * p - 1; end
      load_ab(a, b, nw);
      exec(OP_MUL, nw, res, cyc);
      checks++;
      // res*r == a*b (mod p) and res < 2p
      if ((res * r) % p != (a * b) % p || res >= 2 * p) begin
        failures++; $display("FAIL mul nw=%0d a=%h b=%h res=%h", nw, a, b, res);
      end
      checks++;
      if (cyc != nw * (nw + 3) + 1) begin
        failures++; $display("FAIL mul cycles %0d, expected %0d", cyc, nw * (nw + 3) + 1);
      end
      exec(OP_ADD, nw, res, cyc);
      checks++;
      if (res != a + b || cyc != nw + 1) begin
        failures++; $display("FAIL add nw=%0d res=%h exp=%h cycles=%0d", nw, res, a + b, cyc);
      end
      b = b % (4 * p);
      load(SLOT_B, b, nw, 1);
      exec(OP_SUB, nw, res, cyc);
      checks++;
      if (res != a + 4 * p - b || cyc != nw + 1) begin
        failures++; $display("FAIL sub nw=%0d res=%h exp=%h", nw, res, a + 4 * p - b);
      end
    end
  endtask

  initial begin
    ld_en = '{default: 1'b0}; ld_slot = '{default: SLOT_A}; ld_idx = '{default: '0};
    ld_data = '{default: '0}; start = 0; op = OP_NONE; nwords = '0; rd_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one_prime((big_t'(1) << 61) - 1, 4);
    one_prime(256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff, 16);
    // largest field: the 521-bit Mersenne prime with 31 words (r = 2^527)
    one_prime((big_t'(1) << 521) - 1, 31);
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
