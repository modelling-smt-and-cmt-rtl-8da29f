// spm_ref_pkg: instruction-level reference model of one SPM processor, for
// the testbenches.
//
// SpmModel executes one instruction per call of step() exactly as the
// instruction set defines it (no pipeline), on its own copy of the registers,
// pc and data memory. It also remembers what the last instruction wrote or
// whether it was a taken branch, so a testbench can predict the pipeline's
// commit spacing independently of the RTL:
//   after a taken branch                          3 cycles
//   after an instruction the next one depends on  2 cycles
//   otherwise                                     1 cycle
// Field positions: opcode [15:13], ra [12:10], address [7:0], rb [5:3],
// rc [2:0].
package spm_ref_pkg;

  typedef logic [15:0] w16_t;
  typedef logic [7:0]  a8_t;

  class SpmModel;
    w16_t r  [8];
    a8_t  pc;
    w16_t dm [256];
    // what the last executed instruction did
    bit   last_taken;
    bit   last_wreg;
    int   last_wreg_idx;
    bit   last_store;
    a8_t  last_store_addr;

    function new();
      foreach (r[i]) r[i] = '0;
      foreach (dm[i]) dm[i] = '0;
      pc = '0;
      clear_history();
    endfunction

    function void clear_history();
      last_taken = 0; last_wreg = 0; last_store = 0;
      last_wreg_idx = 0; last_store_addr = '0;
    endfunction

    // Commit spacing predicted for instruction ins following the last one.
    function int gap(w16_t ins);
      int op, ra, rb;
      a8_t ad;
      op = int'(ins[15:13]); ra = int'(ins[12:10]); rb = int'(ins[5:3]);
      ad = ins[7:0];
      if (last_taken) return 3;
      if (last_wreg) begin
        if (op == 0 && (last_wreg_idx == ra || last_wreg_idx == rb)) return 2;
        if (op == 3 && last_wreg_idx == ra) return 2;
        if (op == 1 && last_wreg_idx == 0) return 2;
      end
      if (last_store && op == 2 && last_store_addr == ad) return 2;
      return 1;
    endfunction

    // Whether ins would be a taken branch in the current state.
    function bit is_taken(w16_t ins);
      return ins[15:13] == 3'd1 && r[0] == 16'd0;
    endfunction

    function void step(w16_t ins);
      int op, ra, rb, rc;
      a8_t ad;
      op = int'(ins[15:13]); ra = int'(ins[12:10]);
      rb = int'(ins[5:3]);   rc = int'(ins[2:0]);
      ad = ins[7:0];
      clear_history();
      case (op)
        0: begin r[rc] = r[ra] + r[rb]; pc = pc + 8'd1;
                 last_wreg = 1; last_wreg_idx = rc; end
        1: if (r[0] == 16'd0) begin pc = pc + ad; last_taken = 1; end
           else pc = pc + 8'd1;
        2: begin r[ra] = dm[ad]; pc = pc + 8'd1;
                 last_wreg = 1; last_wreg_idx = ra; end
        3: begin dm[ad] = r[ra]; pc = pc + 8'd1;
                 last_store = 1; last_store_addr = ad; end
        4: begin r[ra] = {8'd0, ad}; pc = pc + 8'd1;
                 last_wreg = 1; last_wreg_idx = ra; end
        default: pc = pc + 8'd1;
      endcase
    endfunction
  endclass

endpackage
