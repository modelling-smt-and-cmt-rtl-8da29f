// progcount_unit: architectural program counter of one AC-P pipeline.
//
// pc is the address of the next instruction to commit. Each cycle it takes
// the branch destination when the execute unit holds a taken branch
// (unit = pc), holds when the execute unit waits, and otherwise advances by
// one as the executing instruction commits (the architecture's rule).
// pc_next is the value pc takes at the next clock edge. Reset loads rst_pc
// (this design's choice).
module progcount_unit
  import spm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  mar_t rst_pc,
  input  ex_t  ex,
  output mar_t pc,
  output mar_t pc_next
);

  always_comb begin
    unique case (ex.unit)
      U_PC:    pc_next = ex.dest;
      U_WAIT:  pc_next = pc;
      default: pc_next = pc + mar_t'(1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= rst_pc;
    else        pc <= pc_next;
  end

endmodule
