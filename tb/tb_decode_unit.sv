// tb_decode_unit: checks that the decode stage splits the instruction into
// opcode [15:13], ra [12:10], rb [5:3], rc [2:0] and address [7:0] one cycle
// later, and holds its fields while conflict is high.
`timescale 1ns/1ps
module tb_decode_unit;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0, conflict = 0;
  word_t ir = '0;
  dec_t d;
  int checks = 0, failures = 0;
  logic [15:0] held;

  decode_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    held = '0;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      ir = word_t'($urandom);
      conflict = ($urandom_range(0, 3) == 0);
      if (!conflict) held = ir;
      @(posedge clk);
      #1;
      checks++;
      if (d.opr != held[15:13] || d.ra != held[12:10] || d.rb != held[5:3] ||
          d.rc != held[2:0] || d.address != held[7:0]) begin
        failures++;
        if (failures < 10) $display("FAIL ir %0h d %0h", held, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
