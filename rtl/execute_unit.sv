// execute_unit: execute stage of one AC-P pipeline.
//
// The unit holds (result, dest, unit, ctr): the result word, where it goes
// (register index or memory/branch address), what is done with it
// (reg, pc, incpc, dmem or wait) and a 2-bit counter that sequences the
// pipeline through its refill states. Per cycle, following the architecture:
//   - no conflict, ctr = 0: execute the decoded instruction (exec below);
//   - conflict, ctr = 0: (result, dest, wait, 0), the "after conflict" state;
//   - otherwise: (result, dest, wait, ctr - 1).
// exec produces
//   add    r[ra] + r[rb], pad(rc),   reg,   0
//   branch result,        pc + addr, pc,    2   when r0 = 0 (taken)
//          result,        dest,      incpc, 0   when r0 /= 0
//   load   dm[addr],      pad(ra),   reg,   0
//   store  r[ra],         addr,      dmem,  0
//   set    pad(addr),     pad(ra),   reg,   0
// so after a taken branch the unit passes through (wait,1) "after branch"
// and (wait,0) "after conflict" before the branch target executes.
//
// The address of the decoded instruction is pc + 1 while the unit holds an
// instruction (pc is that instruction's address) and pc while it waits.
// Undefined opcodes act as a no-operation that advances pc (this design's
// choice). flush and reset put the unit in the flushed state (wait, 2).
// The data memory is read combinationally at dm_raddr. An assertion checks
// the unit's invariant: only a taken branch (unit = pc) and wait states carry
// a non-zero counter, and a taken branch always carries 2.
module execute_unit
  import spm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  conflict,
  input  dec_t  d,
  input  word_t ra_data,
  input  word_t rb_data,
  input  word_t r0_data,
  input  mar_t  pc,
  output mar_t  dm_raddr,
  input  word_t dm_rdata,
  output ex_t   e
);

  ex_t  e_exec;
  mar_t ipc;

  assign dm_raddr = d.address;
  assign ipc      = (e.unit == U_WAIT) ? pc : pc + mar_t'(1);

  // exec
  always_comb begin
    e_exec = '{result: e.result, dest: e.dest, unit: U_INCPC, ctr: '0};
    unique case (d.opr)
      OP_ADD:    e_exec = '{result: ra_data + rb_data, dest: pad_ri(d.rc),
                            unit: U_REG, ctr: '0};
      OP_BRANCH: if (r0_data == '0)
                   e_exec = '{result: e.result, dest: ipc + d.address,
                              unit: U_PC, ctr: ctr_t'(2)};
      OP_LOAD:   e_exec = '{result: dm_rdata, dest: pad_ri(d.ra),
                            unit: U_REG, ctr: '0};
      OP_STORE:  e_exec = '{result: ra_data, dest: d.address,
                            unit: U_DMEM, ctr: '0};
      OP_SET:    e_exec = '{result: pad_mar(d.address), dest: pad_ri(d.ra),
                            unit: U_REG, ctr: '0};
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e <= '{result: '0, dest: '0, unit: U_WAIT, ctr: ctr_t'(2)};
    end else if (flush) begin
      e.unit <= U_WAIT;
      e.ctr  <= ctr_t'(2);
    end else if (e.ctr == '0) begin
      if (!conflict) e <= e_exec;
      else           e.unit <= U_WAIT;
    end else begin
      e.unit <= U_WAIT;
      e.ctr  <= e.ctr - ctr_t'(1);
    end
  end

  a_ctr_invariant: assert property (@(posedge clk) disable iff (!rst_n)
    (e.unit == U_PC) ? (e.ctr == ctr_t'(2)) : (e.unit == U_WAIT || e.ctr == '0));

endmodule
