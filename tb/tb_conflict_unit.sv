// tb_conflict_unit: exhaustive-by-sampling check of the hazard detector.
// Random decoded/executing instruction pairs, biased so that register
// indices and addresses often match, are compared with a reference written
// from the four hazard rules (branch after a write of r0, add after a write
// of ra or rb, store after a write of ra, load after a store to the same
// address).
`timescale 1ns/1ps
module tb_conflict_unit;
  import spm_pkg::*;

  dec_t d;
  ex_t  e;
  logic conflict;
  int checks = 0, failures = 0, hits = 0;

  conflict_unit dut (.d(d), .e(e), .conflict(conflict));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_conflict(int op, int ra, int rb, int addr,
                                      int unit, int dest);
    bit wreg;
    wreg = (unit == 0);                       // reg
    case (op)
      1: return wreg && (dest % 8) == 0;
      0: return wreg && ((dest % 8) == ra || (dest % 8) == rb);
      3: return wreg && (dest % 8) == ra;
      2: return unit == 3 && dest == addr;    // dmem
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int op, ra, rb, rc, addr, unit, dest, ctr;
      bit exp;
      op = $urandom_range(0, 7); ra = $urandom_range(0, 3); rb = $urandom_range(0, 3);
      rc = $urandom_range(0, 7);
      addr = $urandom_range(0, 3) + (($urandom_range(0, 1) == 1) ? 0 : 252);
      unit = $urandom_range(0, 4);
      dest = $urandom_range(0, 3) + (($urandom_range(0, 1) == 1) ? 0 : 248);
      ctr = $urandom_range(0, 3);
      d = '{opr: opcode_t'(op), ra: ri_t'(ra), rb: ri_t'(rb), rc: ri_t'(rc), address: mar_t'(addr)};
      e = '{result: word_t'($urandom), dest: mar_t'(dest), unit: unit_t'(unit), ctr: ctr_t'(ctr)};
      #1;
      exp = ref_conflict(op, ra, rb, addr, unit, dest);
      checks++;
      if (conflict !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d ra %0d rb %0d addr %0d unit %0d dest %0d: %0d", op, ra, rb, addr, unit, dest, conflict);
      end
      if (exp) hits++;
    end
    checks++;
    if (hits == 0) failures++;
    $display("conflicts seen %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
