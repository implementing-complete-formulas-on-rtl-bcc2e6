// tb_scalar_shr: loads random words into the shift register and checks that
// they come out least significant bit first, that load wins over shift and
// that reset clears the register.
module tb_scalar_shr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load, shift, bit_out;
  logic [16:0] din;
  int checks = 0, failures = 0;

  scalar_shr dut (.*);

  initial begin
    logic [16:0] w;
    load = 0; shift = 0; din = '0;
    repeat (2) @(negedge clk);
    checks++; if (bit_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      w = 17'($urandom);
      @(negedge clk); load = 1; din = w; shift = (n % 2 == 0);  // load has priority
      @(negedge clk); load = 0; shift = 0;
      for (int b = 0; b < 17; b++) begin
        checks++;
        if (bit_out !== w[b]) begin failures++; $display("FAIL word %h bit %0d", w, b); end
        if (b % 3 == 1) begin   // holding without shift keeps the bit
          @(negedge clk);
          checks++;
          if (bit_out !== w[b]) begin failures++; $display("FAIL hold"); end
        end
        shift = 1; @(negedge clk); shift = 0;
      end
      checks++; if (bit_out !== 1'b0) begin failures++; $display("FAIL empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
