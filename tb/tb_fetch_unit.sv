// tb_fetch_unit: checks the fetch stage. A testbench array stands for the
// program memory. Random conflict, execute-unit action/destination and
// flush inputs are applied; the expected instruction register and fetch pc
// follow the three fetch cases (hold on conflict, fetch the branch target
// when unit = pc, fetch sequentially otherwise) and flush (fetch pc takes
// pc_next).
`timescale 1ns/1ps
module tb_fetch_unit;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, conflict = 0;
  mar_t rst_pc = 8'h40, pc_next = '0, ex_dest = '0, pm_addr;
  unit_t ex_unit = U_WAIT;
  word_t pm_rdata;
  ftch_t f;
  word_t pm [256];
  int checks = 0, failures = 0;

  fetch_unit dut (.*);
  assign pm_rdata = pm[pm_addr];
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int eir, efpc;

  initial begin
    foreach (pm[i]) pm[i] = word_t'($urandom);
    @(negedge clk);
    checks++; if (f.fpc != 8'h40 || f.ir != 0) failures++;
    rst_n = 1;
    // the first loop iteration passes one edge fetching sequentially
    eir = int'(pm['h40]); efpc = 'h41;
    for (int n = 0; n < 20000; n++) begin
      int u;
      @(negedge clk);
      u = $urandom_range(0, 4);
      ex_unit = unit_t'(u);
      ex_dest = mar_t'($urandom);
      pc_next = mar_t'($urandom);
      flush = ($urandom_range(0, 30) == 0);
      // a conflict needs an executing register write or store
      conflict = (u == 0 || u == 3) && ($urandom_range(0, 2) == 0);
      if (flush) efpc = int'(pc_next);
      else if (conflict) ;
      else if (u == 1) begin eir = int'(pm[ex_dest]); efpc = (int'(ex_dest) + 1) % 256; end
      else begin eir = int'(pm[efpc]); efpc = (efpc + 1) % 256; end
      @(posedge clk);
      #1;
      checks++;
      if (int'(f.ir) != eir || int'(f.fpc) != efpc) begin
        failures++;
        if (failures < 10) $display("FAIL ir %0h fpc %0h exp %0h %0h", f.ir, f.fpc, eir, efpc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
