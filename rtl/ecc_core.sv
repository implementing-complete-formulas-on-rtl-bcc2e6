// ecc_core: elliptic-curve scalar multiplication with complete addition
// formulas on three Montgomery processors.
//
// Computes the affine point k*P on any prime-order curve
// y^2 = x^3 + a*x + b over a prime field of up to 522 bits. All field
// elements live in one 1024 x 17-bit dual-port main memory (32 big words of
// 32 words). Three Montgomery processors (MM0, MM1, MM2) each compute one
// multiplication, addition or subtraction at a time on operands copied into
// their local memories by two memory-transfer machines, one per memory port.
// The main state machine (ecc_ctrl) runs pre-processing, a regular
// double-and-add-always loop in which both the addition and the doubling are
// the same complete addition formulas, a Fermat inversion and the conversion
// to affine coordinates.
//
// Host interface. While busy is low the host owns memory port B through
// host_we/host_addr/host_wdata; host_rdata returns the word addressed in the
// previous cycle (it also shows core traffic while busy). Before `start` the
// host writes, each as little-endian 17-bit words of one big word (word
// address = 32*big_word + index):
//   big word 0 p, 1 p' = -p^-1 mod 2^17 (word 0), 2 a*r mod p,
//   3 3b*r mod p, 4 r^2 mod p, 5 the integer 1, 9..11 X, Y, Z of P,
//   30..31 the scalar k,
// with r = 2^(17*nwords) and 17*nwords >= bits(p)+6. `start` (one cycle)
// with nwords and k_bits begins; `done` pulses after a run of roughly
// 2*k_bits point additions plus 17*nwords inversion steps (see README for
// cycle counts). The result x, y is then in big words 12 and 13 as values
// congruent to x, y modulo p and below 2p (not fully reduced).
//
// The structure (three processors, one dual-port memory, shift register, two
// state machines) follows the document; the host interface and memory map
// are this design's own.
module ecc_core
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata,
  input  logic              start,
  input  logic [NW_W-1:0]   nwords,
  input  logic [KB_W-1:0]   k_bits,
  output logic              busy,
  output logic              done
);

  // ---------------- controller ----------------
  logic              xa_valid, xb_valid, xa_busy, xb_busy, xa_done, xb_done;
  logic [1:0]        xa_kind, xb_kind, xa_proc, xb_proc;
  logic [BW_W-1:0]   xa_bw, xb_bw;
  logic [IDX_W-1:0]  xa_idx;
  logic [NPROC-1:0]  xa_mask, xb_mask;
  slot_e             xa_slot, xb_slot;
  logic [NW_W-1:0]   xa_len, xb_len;
  logic              xa_fetch_valid, xb_fetch_valid;
  word_t             xa_fetch_data, xb_fetch_data;
  logic [NPROC-1:0]  mm_start, mm_busy, mm_done;
  mm_op_e            mm_op [NPROC];

  ecc_ctrl u_ctrl (
    .clk, .rst_n, .start, .nwords, .k_bits, .busy, .done,
    .xa_valid, .xa_kind, .xa_bw, .xa_idx, .xa_mask, .xa_proc, .xa_slot, .xa_len,
    .xa_busy, .xa_fetch_valid, .xa_fetch_data,
    .xb_valid, .xb_kind, .xb_bw, .xb_mask, .xb_proc, .xb_slot, .xb_len, .xb_busy,
    .mm_start, .mm_op, .mm_busy
  );

  // ---------------- main memory ----------------
  logic              pa_we, pb_we, xb_we;
  logic [ADDR_W-1:0] pa_addr, pb_addr, xb_addr;
  word_t             pa_wdata, pb_wdata, xb_wdata, pa_rdata, pb_rdata;

  main_mem #(.W(W), .DEPTH(1 << ADDR_W)) u_mem (
    .clk,
    .a_we(pa_we), .a_addr(pa_addr), .a_wdata(pa_wdata), .a_rdata(pa_rdata),
    .b_we(pb_we), .b_addr(pb_addr), .b_wdata(pb_wdata), .b_rdata(pb_rdata)
  );

  // port B belongs to the host while the core is idle
  always_comb begin
    if (busy) begin
      pb_we = xb_we;   pb_addr = xb_addr;   pb_wdata = xb_wdata;
    end else begin
      pb_we = host_we; pb_addr = host_addr; pb_wdata = host_wdata;
    end
  end
  assign host_rdata = pb_rdata;

  // ---------------- transfer machines ----------------
  logic [NPROC-1:0]  xa_ld_mask, xb_ld_mask;
  slot_e             xa_ld_slot, xb_ld_slot;
  logic [IDX_W-1:0]  xa_ld_idx, xb_ld_idx, xa_rd_idx, xb_rd_idx;
  word_t             xa_ld_data, xb_ld_data, xa_rd_data, xb_rd_data;
  logic [1:0]        xa_rd_proc, xb_rd_proc;

  mem_xfer u_xa (
    .clk, .rst_n,
    .cmd_valid(xa_valid), .cmd_kind(xa_kind), .cmd_bw(xa_bw), .cmd_idx(xa_idx),
    .cmd_mask(xa_mask), .cmd_proc(xa_proc), .cmd_slot(xa_slot), .nwords(xa_len),
    .busy(xa_busy), .done(xa_done),
    .mem_we(pa_we), .mem_addr(pa_addr), .mem_wdata(pa_wdata), .mem_rdata(pa_rdata),
    .ld_mask(xa_ld_mask), .ld_slot(xa_ld_slot), .ld_idx(xa_ld_idx), .ld_data(xa_ld_data),
    .rd_proc(xa_rd_proc), .rd_idx(xa_rd_idx), .rd_data(xa_rd_data),
    .fetch_valid(xa_fetch_valid), .fetch_data(xa_fetch_data)
  );

  mem_xfer u_xb (
    .clk, .rst_n,
    .cmd_valid(xb_valid), .cmd_kind(xb_kind), .cmd_bw(xb_bw), .cmd_idx('0),
    .cmd_mask(xb_mask), .cmd_proc(xb_proc), .cmd_slot(xb_slot), .nwords(xb_len),
    .busy(xb_busy), .done(xb_done),
    .mem_we(xb_we), .mem_addr(xb_addr), .mem_wdata(xb_wdata), .mem_rdata(pb_rdata),
    .ld_mask(xb_ld_mask), .ld_slot(xb_ld_slot), .ld_idx(xb_ld_idx), .ld_data(xb_ld_data),
    .rd_proc(xb_rd_proc), .rd_idx(xb_rd_idx), .rd_data(xb_rd_data),
    .fetch_valid(xb_fetch_valid), .fetch_data(xb_fetch_data)
  );

  // ---------------- Montgomery processors ----------------
  word_t mm_rd_data [NPROC];

  // operand length of the running operation
  logic [NW_W-1:0] nwords_q;
  always_ff @(posedge clk) begin
    if (!rst_n)              nwords_q <= '0;
    else if (start && !busy) nwords_q <= nwords;
  end

  for (genvar k = 0; k < NPROC; k++) begin : g_mm
    logic             ld_en   [2];
    slot_e            ld_slot [2];
    logic [IDX_W-1:0] ld_idx  [2];
    word_t            ld_data [2];
    logic [IDX_W-1:0] rd_idx;

    always_comb begin
      ld_en[0] = xa_ld_mask[k]; ld_slot[0] = xa_ld_slot; ld_idx[0] = xa_ld_idx; ld_data[0] = xa_ld_data;
      ld_en[1] = xb_ld_mask[k]; ld_slot[1] = xb_ld_slot; ld_idx[1] = xb_ld_idx; ld_data[1] = xb_ld_data;
      rd_idx = (xb_we && xb_rd_proc == 2'(k)) ? xb_rd_idx : xa_rd_idx;
    end

    mont_proc u_mm (
      .clk, .rst_n,
      .ld_en(ld_en), .ld_slot(ld_slot), .ld_idx(ld_idx), .ld_data(ld_data),
      .start(mm_start[k]), .op(mm_op[k]), .nwords(nwords_q),
      .busy(mm_busy[k]), .done(mm_done[k]),
      .rd_idx(rd_idx), .rd_data(mm_rd_data[k])
    );
  end

  assign xa_rd_data = mm_rd_data[xa_rd_proc];
  assign xb_rd_data = mm_rd_data[xb_rd_proc];

  // When both machines load one processor (MM2), they fill different slots.
  a_two_loaders: assert property (@(posedge clk) disable iff (!rst_n)
                                  (xa_ld_mask & xb_ld_mask) != '0 |-> xa_ld_slot != xb_ld_slot);

endmodule
