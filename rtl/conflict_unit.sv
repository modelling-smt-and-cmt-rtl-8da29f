// conflict_unit: hazard detection between the decoded instruction and the
// instruction in the execute unit (combinational).
//
// The execute unit's result is committed at the end of the cycle, while the
// decoded instruction reads registers and data memory in the same cycle. The
// pipeline must therefore stall one cycle when:
//   - the decoded instruction is a branch and the executing one writes r0;
//   - it is an add and the executing one writes ra or rb;
//   - it is a store and the executing one writes ra;
//   - it is a load and the executing one stores to the address loaded.
// These four cases are the architecture's. Every register case is qualified
// with unit = reg (the executing instruction really writes a register); the
// architecture's formula states this only for the branch case, and without
// it a held wait state with a stale destination would stall for ever.
module conflict_unit
  import spm_pkg::*;
(
  input  dec_t d,
  input  ex_t  e,
  output logic conflict
);

  ri_t  wreg;
  logic wr_reg;

  always_comb begin
    wreg     = trim(e.dest);
    wr_reg   = (e.unit == U_REG);
    conflict = 1'b0;
    unique case (d.opr)
      OP_BRANCH: conflict = wr_reg && (wreg == '0);
      OP_ADD:    conflict = wr_reg && (wreg == d.ra || wreg == d.rb);
      OP_STORE:  conflict = wr_reg && (wreg == d.ra);
      OP_LOAD:   conflict = (e.unit == U_DMEM) && (e.dest == d.address);
      default:   conflict = 1'b0;
    endcase
  end

endmodule
