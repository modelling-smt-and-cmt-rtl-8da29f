// tb_program_memory: fills the program memory through its load port and
// reads every word back through both read ports, each port at its own
// random address.
`timescale 1ns/1ps
module tb_program_memory;
  import spm_pkg::*;

  logic clk = 0, we = 0;
  mar_t raddr [2];
  word_t rdata [2];
  mar_t waddr = '0;
  word_t wdata = '0;
  word_t img [256];
  int checks = 0, failures = 0;

  program_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[i]) img[i] = word_t'($urandom);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = mar_t'(i); wdata = img[i];
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      raddr[0] = mar_t'($urandom);
      raddr[1] = mar_t'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] != img[raddr[p]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
