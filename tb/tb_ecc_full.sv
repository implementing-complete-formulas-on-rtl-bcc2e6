// tb_ecc_full: one complete full-length scalar multiplication on NIST P-256.
//
// The core is used exactly as built, with no parameter changes. The host
// writes the P-256 constants and the generator G, then asks for k*G with the
// 256-bit scalar k = n-1, where n is the order of G. Since (n-1)*G = -G, the
// expected affine result is (Gx, p-Gy), known without any reference model.
// The testbench also checks that `busy` stays high for the whole run, and that
// the total cycle count is within 1.5x of the published figure for a 256-bit
// scalar multiplication (1,421,392 cycles), the difference being this design's
// operand reloads and its wait for the third processor at every step.
module tb_ecc_full;
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

  big_t p, a, b, n, k, r, gx, gy, hx, hy;
  int   cycles, busy_drop;
  localparam int NW = 16;

  initial begin
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; nwords = '0; k_bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    p  = 256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;
    a  = p - 3;
    b  = 256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b;
    gx = 256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296;
    gy = 256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5;
    n  = 256'hffffffff00000000ffffffffffffffffbce6faada7179e84f3b9cac2fc632551;
    k  = n - 1;
    r  = big_t'(1) << (17 * NW);

    wr_big(0, p, NW);
    wr_big(1, mont_pinv(p), 1);
    wr_big(2, mulm(a, r, p), NW);
    wr_big(3, mulm((3 * b) % p, r, p), NW);
    wr_big(4, mulm(r, r, p), NW);
    wr_big(5, 1, NW);
    wr_big(9, gx, NW);
    wr_big(10, gy, NW);
    wr_big(11, 1, NW);
    wr_big(30, k, 32);
    wr_big(31, 0, 32);

    @(negedge clk);
    nwords = NW_W'(NW); k_bits = KB_W'(256); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; busy_drop = 0;
    while (!done) begin
      if (!busy) busy_drop++;
      @(negedge clk);
      cycles++;
    end
    $display("P-256 k=n-1: %0d cycles", cycles);

    rd_big(12, NW, hx);
    rd_big(13, NW, hy);
    checks++;
    if (hx % p != gx || hy % p != p - gy || hx >= 2 * p || hy >= 2 * p) begin
      failures++;
      $display("FAIL result x=%h y=%h", hx % p, hy % p);
    end
    checks++;
    if (busy_drop != 0) begin failures++; $display("FAIL busy dropped during the run"); end
    checks++;
    if (cycles < 1_421_392 / 2 || cycles > 1_421_392 * 3 / 2) begin
      failures++; $display("FAIL cycle count %0d", cycles);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
