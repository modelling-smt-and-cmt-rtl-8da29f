// fetch_unit: instruction register and fetch program counter of one AC-P
// pipeline.
//
// Each cycle the unit does one of three things, in this priority:
//   - conflict: the pipeline stalls, ir and fpc hold;
//   - the execute unit holds a taken branch (unit = pc): fetch the branch
//     target, ir <= pm[dest], fpc <= dest + 1;
//   - otherwise fetch the next sequential instruction, ir <= pm[fpc],
//     fpc <= fpc + 1.
// These rules are the architecture's. The program memory is read
// combinationally through pm_addr / pm_rdata in the same cycle.
//
// This design's own additions: reset loads fpc with rst_pc, and the flush
// input (which empties the execute unit) reloads fpc with pc_next, the
// architectural pc after the instruction committing this cycle, so the
// pipeline refills from the first uncommitted instruction.
module fetch_unit
  import spm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mar_t  rst_pc,
  input  logic  flush,
  input  mar_t  pc_next,
  input  logic  conflict,
  input  unit_t ex_unit,
  input  mar_t  ex_dest,
  output mar_t  pm_addr,
  input  word_t pm_rdata,
  output ftch_t f
);

  assign pm_addr = (ex_unit == U_PC) ? ex_dest : f.fpc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f.ir  <= '0;
      f.fpc <= rst_pc;
    end else if (flush) begin
      f.fpc <= pc_next;
    end else if (!conflict) begin
      f.ir  <= pm_rdata;
      f.fpc <= pm_addr + mar_t'(1);
    end
  end

endmodule
