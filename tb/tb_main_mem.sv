// tb_main_mem: random traffic on both ports of the 1024 x 17 main memory,
// compared with a model array: one-cycle read latency, writes from both ports
// in the same cycle to different words, read-before-write on the same port,
// and every address reachable.
module tb_main_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        a_we, b_we;
  logic [9:0]  a_addr, b_addr;
  logic [16:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [16:0] model [1024];
  int checks = 0, failures = 0;

  main_mem dut (.*);

  initial begin
    logic [9:0]  pa, pb;
    logic [16:0] ea, eb;
    a_we = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // fill every word through alternating ports
    for (int i = 0; i < 1024; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = 10'(i);     a_wdata = 17'($urandom); model[i] = a_wdata;
      b_we = 1; b_addr = 10'(i + 1); b_wdata = 17'($urandom); model[i + 1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int n = 0; n < 4000; n++) begin
      pa = 10'($urandom); pb = 10'($urandom);
      a_addr = pa; b_addr = pb;
      a_we = ($urandom % 3 == 0); b_we = ($urandom % 3 == 0) && (pb != pa);
      a_wdata = 17'($urandom); b_wdata = 17'($urandom);
      ea = model[pa]; eb = model[pb];
      @(posedge clk);
      if (a_we) model[pa] = a_wdata;
      if (b_we) model[pb] = b_wdata;
      @(negedge clk);
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("FAIL port A addr %0d", pa); end
      if (b_rdata !== eb) begin failures++; $display("FAIL port B addr %0d", pb); end
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
