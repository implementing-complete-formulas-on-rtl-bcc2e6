// scalar_shr: 17-bit shift register that hands out an exponent bit by bit.
//
// The controller loads the scalar (or, during inversion, the exponent p-2)
// one 17-bit word at a time and consumes it least significant bit first:
// bit_out is always bit 0 of the register, `shift` moves the register right
// by one, and `load` (which takes priority) replaces its contents with din.
// Both act on the rising clock edge. A word counter is not part of this
// block: the controller knows when 17 bits have been used.
//
// The 17-bit width and word-by-word loading follow the document; the
// LSB-first order is this design's choice (it suits right-to-left
// double-and-add-always and right-to-left exponentiation).
module scalar_shr #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         shift,
  output logic         bit_out
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b0, sr[W-1:1]};
  end

  assign bit_out = sr[0];

endmodule
