// tb_progcount_unit: checks the program counter: branch destination when
// the execute unit holds a taken branch, hold while it waits, advance by
// one otherwise; pc_next must show the coming value and reset must load
// rst_pc.
`timescale 1ns/1ps
module tb_progcount_unit;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0;
  mar_t rst_pc = 8'hA5, pc, pc_next;
  ex_t ex;
  int checks = 0, failures = 0;
  int epc;

  progcount_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    ex = '{result: '0, dest: '0, unit: U_WAIT, ctr: '0};
    @(negedge clk);
    chk(pc == 8'hA5, "reset value");
    rst_n = 1;
    epc = 'hA5;
    for (int n = 0; n < 10000; n++) begin
      int u;
      @(negedge clk);
      u = $urandom_range(0, 4);
      ex = '{result: word_t'($urandom), dest: mar_t'($urandom), unit: unit_t'(u), ctr: ctr_t'($urandom)};
      if (u == 1) epc = int'(ex.dest);
      else if (u != 4) epc = (epc + 1) % 256;
      #1;
      chk(int'(pc_next) == epc, "pc_next");
      @(posedge clk);
      #1;
      chk(int'(pc) == epc, $sformatf("pc %0h exp %0h", pc, epc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
