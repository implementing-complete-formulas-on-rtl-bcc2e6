// tb_mem_xfer: checks the memory-transfer machine against a main memory and
// a stand-in for the processors' result ports.
//
// Loads: every word of the big word must reach the selected processors'
// slot at the right index (broadcast masks included), in nwords+1 cycles.
// Stores: the result words of the selected processor (here a fixed function
// of processor and index) must land in the big word, in nwords cycles, and no
// other word may change. Fetches: the addressed word is returned.
module tb_mem_xfer;
  import ecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cmd_valid, busy, done, mem_we, fetch_valid;
  logic [1:0]        cmd_kind, cmd_proc, rd_proc;
  logic [BW_W-1:0]   cmd_bw;
  logic [IDX_W-1:0]  cmd_idx, ld_idx, rd_idx;
  logic [NPROC-1:0]  cmd_mask, ld_mask;
  slot_e             cmd_slot, ld_slot;
  logic [NW_W-1:0]   nwords;
  logic [ADDR_W-1:0] mem_addr;
  word_t             mem_wdata, mem_rdata, ld_data, rd_data, fetch_data;
  logic              b_we;
  logic [ADDR_W-1:0] b_addr;
  word_t             b_wdata, b_rdata;

  mem_xfer dut (.*);
  main_mem u_mem (.clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
                  .b_we, .b_addr, .b_wdata, .b_rdata);

  function automatic word_t res_word(input logic [1:0] pr, input logic [IDX_W-1:0] ix);
    return word_t'(17'h1000 * pr + 17'h35 * ix + 17'h7);
  endfunction
  assign rd_data = res_word(rd_proc, rd_idx);

  word_t model [1024];
  word_t got [NPROC][4][MAX_WORDS];
  int    nld = 0;
  int checks = 0, failures = 0;

  always @(posedge clk)
    for (int k = 0; k < NPROC; k++)
      if (ld_mask[k]) begin got[k][ld_slot][ld_idx] = ld_data; nld++; end

  task automatic issue(input logic [1:0] kind, input int bw, input int idx, input logic [2:0] mask,
                       input logic [1:0] pr, input slot_e sl, input int nw, output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd_kind = kind; cmd_bw = BW_W'(bw); cmd_idx = IDX_W'(idx); cmd_mask = mask;
    cmd_proc = pr; cmd_slot = sl; nwords = NW_W'(nw);
    @(negedge clk);
    cmd_valid = 0;
    cycles = 0;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, bw, nw;
    logic [2:0] mask;
    cmd_valid = 0; cmd_kind = 0; cmd_bw = '0; cmd_idx = '0; cmd_mask = '0; cmd_proc = '0;
    cmd_slot = SLOT_A; nwords = '0; b_we = 0; b_addr = '0; b_wdata = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); b_we = 1; b_addr = 10'(i); b_wdata = 17'($urandom); model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      bw = $urandom % 32; nw = 1 + $urandom % 32;
      mask = (n % 5 == 0) ? 3'b111 : 3'(1 << ($urandom % 3));
      nld = 0;
      issue(0, bw, 0, mask, 0, slot_e'(n % 4), nw, cyc);
      checks++;
      if (cyc != nw + 1 || nld != nw * $countones(mask)) begin
        failures++; $display("FAIL load timing %0d cycles, %0d writes", cyc, nld);
      end
      for (int k = 0; k < NPROC; k++)
        if (mask[k])
          for (int i = 0; i < nw; i++) begin
            checks++;
            if (got[k][n % 4][i] !== model[bw * 32 + i]) begin
              failures++; $display("FAIL load proc %0d word %0d", k, i);
            end
          end
      // store
      bw = $urandom % 32; nw = 1 + $urandom % 32;
      issue(1, bw, 0, '0, 2'(n % 3), SLOT_A, nw, cyc);
      for (int i = 0; i < nw; i++) model[bw * 32 + i] = res_word(2'(n % 3), IDX_W'(i));
      checks++;
      if (cyc != nw) begin failures++; $display("FAIL store timing %0d", cyc); end
      // fetch
      bw = $urandom % 32;
      begin
        int ix; ix = $urandom % 32;
        issue(2, bw, ix, '0, 0, SLOT_A, 1, cyc);
        @(negedge clk);
        checks++;
        if (fetch_data !== model[bw * 32 + ix]) begin failures++; $display("FAIL fetch"); end
      end
    end
    // whole memory compared through port B
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); b_addr = 10'(i);
      @(negedge clk);
      checks++;
      if (b_rdata !== model[i]) begin failures++; $display("FAIL memory word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
