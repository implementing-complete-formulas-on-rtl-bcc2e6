// main_mem: true dual-port main memory of the core, 1024 words of 17 bits.
//
// The memory is seen as 32 "big words" of 32 words; a big word holds one
// field element (up to 544 bits), so the word address is {big word, index}.
// Both ports can read or write any word in the same cycle. Reads are
// synchronous: the data of the address presented in one cycle appears on
// rdata in the next, as in an FPGA block RAM. When both ports write the same
// word in the same cycle, port B wins; the core never does this.
//
// Size and dual-port organisation follow the document; the read-during-write
// behaviour (old data is returned) is this design's choice.
module main_mem #(
  parameter int unsigned W      = 17,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [W-1:0]      a_wdata,
  output logic [W-1:0]      a_rdata,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [W-1:0]      b_wdata,
  output logic [W-1:0]      b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
