// acp_pipeline: one AC-P pipeline, the processor core that AC-P2 duplicates.
//
// Four stages: fetch (instruction register, fetch pc), decode (instruction
// fields), execute (result, destination, action, counter) and commit, where
// the register unit, the program counter and the shared data memory take
// the execute unit's result at the clock edge. The conflict unit compares
// the decoded instruction with the executing one; on a read-after-write or
// store-to-load hazard fetch and decode hold for one cycle and the execute
// unit inserts a wait. A taken branch is resolved in execute and refetches
// from the target, discarding the two younger instructions.
//
// Timing: one instruction commits per cycle when the pipeline is full; the
// instruction after a hazard commits 2 cycles after its predecessor, the
// instruction at a taken branch's target 3 cycles after the branch, and the
// first instruction after reset or flush 4 cycles after it (the duration
// function given on dur).
//
// Interfaces: the program memory and the data memory are outside (shared);
// pm_addr/pm_rdata and dm_raddr/dm_rdata are combinational reads, dm_we,
// dm_waddr, dm_wdata a store committed at the clock edge. pc and regs are
// the architectural state. The stage rules are the architecture's; reset
// values, the flush input's refetch and the observation outputs are this
// design's choices.
module acp_pipeline
  import spm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  mar_t        rst_pc,
  output mar_t        pm_addr,
  input  word_t       pm_rdata,
  output mar_t        dm_raddr,
  input  word_t       dm_rdata,
  output logic        dm_we,
  output mar_t        dm_waddr,
  output word_t       dm_wdata,
  output mar_t        pc,
  output word_t       regs [NREGS],
  output ex_t         ex,
  output logic        stall,
  output logic        retire,
  output pipe_state_t pstate,
  output logic [2:0]  dur,
  output logic [31:0] retire_count
);

  ftch_t f;
  dec_t  d;
  mar_t  pc_next;
  word_t ra_data, rb_data, r0_data;

  conflict_unit u_conflict (.d(d), .e(ex), .conflict(stall));

  fetch_unit u_fetch (
    .clk, .rst_n, .rst_pc, .flush, .pc_next,
    .conflict(stall), .ex_unit(ex.unit), .ex_dest(ex.dest),
    .pm_addr, .pm_rdata, .f(f)
  );

  decode_unit u_decode (
    .clk, .rst_n, .conflict(stall), .ir(f.ir), .d(d)
  );

  execute_unit u_execute (
    .clk, .rst_n, .flush, .conflict(stall), .d(d),
    .ra_data, .rb_data, .r0_data, .pc,
    .dm_raddr, .dm_rdata, .e(ex)
  );

  register_unit u_registers (
    .clk, .rst_n, .ra(d.ra), .rb(d.rb),
    .ra_data, .rb_data, .r0_data, .ex(ex), .regs
  );

  progcount_unit u_progcount (
    .clk, .rst_n, .rst_pc, .ex(ex), .pc, .pc_next
  );

  pipe_state_monitor u_monitor (
    .clk, .rst_n, .ex(ex), .pstate, .dur, .retire, .retire_count
  );

  assign dm_we    = (ex.unit == U_DMEM);
  assign dm_waddr = ex.dest;
  assign dm_wdata = ex.result;

endmodule
