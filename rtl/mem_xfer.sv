// mem_xfer: memory-transfer state machine for one main-memory port.
//
// Moves one big word between the main memory and the Montgomery processors
// on a single command, so that the main state machine needs only one state
// per transfer. Three commands:
//
//   XF_LOAD   read nwords words of big word cmd_bw and write them into slot
//             cmd_slot of every processor selected by cmd_mask (a mask of
//             several processors broadcasts, e.g. the prime at start-up);
//   XF_STORE  read nwords result words of processor cmd_proc and write them
//             to big word cmd_bw;
//   XF_FETCH  read the single word {cmd_bw, cmd_idx}; it is returned on
//             fetch_data with fetch_valid (used to load the scalar register).
//
// Timing: a command is accepted when cmd_valid is high and busy is low.
// XF_LOAD drives one memory read per cycle and, because the memory answers
// one cycle later, writes the processors one cycle behind, taking nwords+1
// cycles; XF_STORE writes one word per cycle, nwords cycles; XF_FETCH takes 2
// cycles. `done` pulses in the last cycle of a command.
//
// The existence of this machine and its purpose follow the document; the
// command set and the timing are this design's own.
module mem_xfer
  import ecc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               cmd_valid,
  input  logic [1:0]         cmd_kind,    // 0 load, 1 store, 2 fetch
  input  logic [BW_W-1:0]    cmd_bw,
  input  logic [IDX_W-1:0]   cmd_idx,
  input  logic [NPROC-1:0]   cmd_mask,
  input  logic [1:0]         cmd_proc,
  input  slot_e              cmd_slot,
  input  logic [NW_W-1:0]    nwords,
  output logic               busy,
  output logic               done,
  // main-memory port
  output logic               mem_we,
  output logic [ADDR_W-1:0]  mem_addr,
  output word_t              mem_wdata,
  input  word_t              mem_rdata,
  // load bus to the processors
  output logic [NPROC-1:0]   ld_mask,
  output slot_e              ld_slot,
  output logic [IDX_W-1:0]   ld_idx,
  output word_t              ld_data,
  // result read from one processor
  output logic [1:0]         rd_proc,
  output logic [IDX_W-1:0]   rd_idx,
  input  word_t              rd_data,
  // fetched word
  output logic               fetch_valid,
  output word_t              fetch_data
);

  localparam logic [1:0] XF_LOAD = 2'd0, XF_STORE = 2'd1, XF_FETCH = 2'd2;

  typedef enum logic [1:0] {X_IDLE, X_LOAD, X_STORE, X_FETCH} state_e;
  state_e state;

  logic [BW_W-1:0]  bw;
  logic [NW_W-1:0]  cnt;       // words issued
  logic [NW_W-1:0]  len;
  logic [NPROC-1:0] mask;
  slot_e            slot;
  logic [1:0]       proc;
  logic [IDX_W-1:0] idx;
  logic             rd_pend;   // a load read is in flight
  logic [IDX_W-1:0] rd_pend_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= X_IDLE;
      bw          <= '0;
      cnt         <= '0;
      len         <= '0;
      mask        <= '0;
      slot        <= SLOT_A;
      proc        <= '0;
      idx         <= '0;
      rd_pend     <= 1'b0;
      rd_pend_idx <= '0;
      fetch_valid <= 1'b0;
      fetch_data  <= '0;
    end else begin
      fetch_valid <= 1'b0;
      unique case (state)
        X_IDLE: begin
          rd_pend <= 1'b0;
          if (cmd_valid) begin
            bw   <= cmd_bw;
            len  <= nwords;
            cnt  <= '0;
            mask <= cmd_mask;
            slot <= cmd_slot;
            proc <= cmd_proc;
            idx  <= cmd_idx;
            unique case (cmd_kind)
              XF_LOAD:  state <= X_LOAD;
              XF_STORE: state <= X_STORE;
              default:  state <= X_FETCH;
            endcase
          end
        end
        X_LOAD: begin
          // issue read cnt while the previous word is written to the processors
          rd_pend     <= (cnt < len);
          rd_pend_idx <= cnt[IDX_W-1:0];
          if (cnt < len) cnt <= cnt + 1'b1;
          if (cnt == len) state <= X_IDLE;
        end
        X_STORE: begin
          cnt <= cnt + 1'b1;
          if (cnt == len - 1'b1) state <= X_IDLE;
        end
        X_FETCH: begin
          if (rd_pend) begin
            fetch_valid <= 1'b1;
            fetch_data  <= mem_rdata;
            rd_pend     <= 1'b0;
            state       <= X_IDLE;
          end else begin
            rd_pend <= 1'b1;
          end
        end
        default: state <= X_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = rd_data;
    rd_proc   = proc;
    rd_idx    = cnt[IDX_W-1:0];
    ld_mask   = '0;
    ld_slot   = slot;
    ld_idx    = rd_pend_idx;
    ld_data   = mem_rdata;
    done      = 1'b0;
    unique case (state)
      X_LOAD: begin
        mem_addr = {bw, cnt[IDX_W-1:0]};
        if (rd_pend) ld_mask = mask;
        done = (cnt == len);
      end
      X_STORE: begin
        mem_we   = 1'b1;
        mem_addr = {bw, cnt[IDX_W-1:0]};
        done     = (cnt == len - 1'b1);
      end
      X_FETCH: begin
        mem_addr = {bw, idx};
        done     = rd_pend;
      end
      default: ;
    endcase
  end

  assign busy = (state != X_IDLE);

endmodule
