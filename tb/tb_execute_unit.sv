// tb_execute_unit: checks the execute stage against its update rules.
// Each cycle the testbench drives random decoded fields, register read data,
// pc, load data, conflict and flush, predicts the next (result, dest, unit,
// ctr) from the instruction definitions (exec) and the counter sequencing,
// and compares after the clock edge. The counter is checked to run
// 2 -> 1 -> 0 after a taken branch and after flush.
`timescale 1ns/1ps
module tb_execute_unit;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0, conflict = 0;
  dec_t d;
  word_t ra_data, rb_data, r0_data, dm_rdata;
  mar_t pc, dm_raddr;
  ex_t e;
  int checks = 0, failures = 0;
  int n_taken = 0, n_conf = 0, n_flush = 0;

  execute_unit dut (.*);
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

  // expected state, kept as plain integers
  int eres, edest, eunit, ectr;

  initial begin
    d = '0; ra_data = '0; rb_data = '0; r0_data = '0; dm_rdata = '0; pc = '0;
    @(negedge clk);
    rst_n = 1;
    chk(e.unit == U_WAIT && e.ctr == 2, "reset state");
    // the first loop iteration passes one edge with idle inputs: 2 -> 1
    eres = 0; edest = 0; eunit = 4; ectr = 1;
    for (int n = 0; n < 20000; n++) begin
      int op, ra, rb, rc, ad, ipc;
      @(negedge clk);
      op = $urandom_range(0, 7); ra = $urandom_range(0, 7); rb = $urandom_range(0, 7);
      rc = $urandom_range(0, 7); ad = $urandom_range(0, 255);
      d = '{opr: opcode_t'(op), ra: ri_t'(ra), rb: ri_t'(rb), rc: ri_t'(rc), address: mar_t'(ad)};
      ra_data = word_t'($urandom); rb_data = word_t'($urandom);
      r0_data = ($urandom_range(0, 1) == 1) ? '0 : word_t'($urandom);
      dm_rdata = word_t'($urandom); pc = mar_t'($urandom);
      conflict = ($urandom_range(0, 4) == 0);
      flush = ($urandom_range(0, 40) == 0);
      #1;
      chk(dm_raddr == mar_t'(ad), "dm_raddr");
      ipc = (eunit == 4) ? int'(pc) : (int'(pc) + 1) % 256;
      if (flush) begin
        eunit = 4; ectr = 2; n_flush++;
      end else if (ectr == 0 && conflict) begin
        eunit = 4; n_conf++;
      end else if (ectr == 0) begin
        case (op)
          0: begin eres = (int'(ra_data) + int'(rb_data)) % 65536; edest = rc; eunit = 0; end
          1: if (r0_data == 0) begin edest = (ipc + ad) % 256; eunit = 1; ectr = 2; n_taken++; end
             else eunit = 2;
          2: begin eres = int'(dm_rdata); edest = ra; eunit = 0; end
          3: begin eres = int'(ra_data); edest = ad; eunit = 3; end
          4: begin eres = ad; edest = ra; eunit = 0; end
          default: eunit = 2;
        endcase
      end else begin
        eunit = 4; ectr = ectr - 1;
      end
      @(posedge clk);
      #1;
      chk(int'(e.result) == eres && int'(e.dest) == edest && int'(e.unit) == eunit && int'(e.ctr) == ectr,
          $sformatf("got %0h %0h %0d %0d exp %0h %0h %0d %0d", e.result, e.dest, e.unit, e.ctr, eres, edest, eunit, ectr));
    end
    chk(n_taken > 0 && n_conf > 0 && n_flush > 0, "mechanisms");
    $display("taken %0d conflicts %0d flushes %0d", n_taken, n_conf, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
