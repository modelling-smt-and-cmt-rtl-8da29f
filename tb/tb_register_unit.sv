// tb_register_unit: checks the register file. Random execute-unit states
// are applied; a result must land in register trim(dest) only when
// unit = reg. The three read ports and the regs output are compared with
// a testbench copy of the registers every cycle; reset must clear them.
`timescale 1ns/1ps
module tb_register_unit;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0;
  ri_t ra = '0, rb = '0;
  word_t ra_data, rb_data, r0_data;
  ex_t ex;
  word_t regs [NREGS];
  word_t model [8];
  int checks = 0, failures = 0, writes = 0;

  register_unit dut (.*);
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
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) chk(regs[i] == 0, "reset clears");
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      int u;
      @(negedge clk);
      u = $urandom_range(0, 4);
      ex = '{result: word_t'($urandom), dest: mar_t'($urandom), unit: unit_t'(u), ctr: ctr_t'($urandom)};
      ra = ri_t'($urandom); rb = ri_t'($urandom);
      #1;
      chk(ra_data == model[ra] && rb_data == model[rb] && r0_data == model[0], "read ports");
      if (u == 0) begin model[ex.dest % 8] = ex.result; writes++; end
      @(posedge clk);
      #1;
      for (int i = 0; i < 8; i++) chk(regs[i] == model[i], $sformatf("r%0d", i));
    end
    chk(writes > 0, "writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
