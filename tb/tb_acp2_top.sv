// tb_acp2_top: end-to-end testbench of the dual-core AC-P2 processor at its
// default size (two cores, 8 registers, 256-word memories).
//
// Programs and data are loaded through the memory host ports while the
// cores are held in reset.
//
// Part A, directed, on the shared data memory:
//   core 0: set r1,5 ; store r1,200 ; set r2,77 ; store r2,210 ; halt
//   core 1: set r1,7 ; store r1,200 ; spin: load r0,210 ; branch spin
//           while r0 = 0 ; store r0,211 ; set r0,0 ; halt
// Both cores store to 200 in the same cycle (core 0's value must win) and
// core 1 waits on a flag written by core 0, then copies it. (halt is a
// branch to itself with r0 = 0.)
//
// Part B, random: each core runs a random program in its own half of the
// program memory, storing to its own data words and loading from those or
// from read-only shared words. Every commit of each core is replayed on an
// instruction-level model of that core; pc and registers are compared after
// each commit, the commit spacing against the model's prediction, and the
// data memory at the end. Both pipelines are flushed together at random.
// Each mechanism must occur: hazard stall, store-to-load stall, taken and
// not-taken branch, flush, both cores storing in one cycle, both cores
// committing in one cycle.
`timescale 1ns/1ps
module tb_acp2_top;
  import spm_pkg::*;
  import spm_ref_pkg::*;

  localparam int NC = 2;

  logic clk = 0, rst_n = 0, flush = 0;
  mar_t rst_pc [NC];
  logic pm_we = 0, dm_host_we = 0;
  mar_t pm_waddr = '0, dm_host_addr = '0;
  word_t pm_wdata = '0, dm_host_wdata = '0, dm_host_rdata;
  mar_t pc [NC];
  word_t regs [NC][NREGS];
  logic retire [NC];
  logic stall [NC];
  pipe_state_t pstate [NC];
  logic [2:0] dur [NC];
  logic [31:0] retire_count [NC];

  acp2_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_ldst = 0, n_taken = 0, n_nottaken = 0, n_flush = 0;
  int n_dual_store = 0, n_dual_retire = 0, n_same_addr = 0, n_handoff = 0;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  word_t pm_img [MEM_DEPTH];
  word_t dm_img [MEM_DEPTH];

  task automatic load_memories();
    for (int i = 0; i < MEM_DEPTH; i++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = mar_t'(i); pm_wdata = pm_img[i];
      dm_host_we = 1; dm_host_addr = mar_t'(i); dm_host_wdata = dm_img[i];
    end
    @(negedge clk);
    pm_we = 0; dm_host_we = 0;
  endtask

  task automatic host_read(input mar_t a, output word_t v);
    dm_host_addr = a;
    #1;
    v = dm_host_rdata;
  endtask

  // ---------------- random program generation ----------------
  function automatic word_t rand_ins(int core, mar_t here);
    int k;
    ri_t ra, rb, rc;
    mar_t ad, tgt;
    k  = $urandom_range(0, 99);
    ra = ri_t'($urandom_range(0, 3));
    rb = ri_t'($urandom_range(0, 3));
    rc = ri_t'($urandom_range(0, 3));
    // stores: own words core*16 .. core*16+7; loads also read 64..71
    ad = mar_t'(core * 16 + $urandom_range(0, 7));
    tgt = mar_t'(core * 128 + $urandom_range(0, 127));
    if (k < 25) return enc_add(ra, rb, rc);
    if (k < 35) return enc(OP_BRANCH, '0, tgt - here);
    if (k < 50) return enc(OP_LOAD, ra, ($urandom_range(0, 3) == 0) ? mar_t'(64 + $urandom_range(0, 7)) : ad);
    if (k < 70) return enc(OP_STORE, ra, ad);
    return enc(OP_SET, ra, ($urandom_range(0, 3) == 0) ? mar_t'(0) : mar_t'($urandom));
  endfunction

  SpmModel m [NC];
  int cyc, last_commit [NC], exp_gap [NC], n_retired [NC];
  bit prev_retire [NC];
  bit in_run = 0;

  // cycles in which both cores commit, and both commit a store
  always @(negedge clk) begin
    if (in_run && retire[0] && retire[1]) begin
      n_dual_retire++;
      if (pm_img[pc[0]][15:13] == 3'd3 && pm_img[pc[1]][15:13] == 3'd3) n_dual_store++;
    end
  end

  always @(negedge clk) begin
    if (in_run) begin
      cyc++;
      for (int c = 0; c < NC; c++) begin
        if (prev_retire[c]) begin
          check(pc[c] == m[c].pc, $sformatf("core %0d pc %0h model %0h", c, pc[c], m[c].pc));
          for (int i = 0; i < NREGS; i++)
            check(regs[c][i] == m[c].r[i],
                  $sformatf("core %0d r%0d %0h model %0h", c, i, regs[c][i], m[c].r[i]));
        end
        if (stall[c]) n_stall++;
        if (flush) begin
          m[c].clear_history();
          exp_gap[c] = 4;
          last_commit[c] = cyc - 1;
        end
        check(retire_count[c] == 32'(n_retired[c]), "retire_count");
        if (retire[c]) begin
          word_t ins;
          ins = pm_img[m[c].pc];
          check(pc[c] == m[c].pc, $sformatf("core %0d retiring pc %0h model %0h", c, pc[c], m[c].pc));
          check(cyc - last_commit[c] == exp_gap[c],
                $sformatf("core %0d commit spacing %0d expected %0d", c, cyc - last_commit[c], exp_gap[c]));
          check(dur[c] == 3'd1 && pstate[c] == PS_FULL, "state while committing");
          if (ins[15:13] == 3'd1) begin
            if (m[c].is_taken(ins)) n_taken++; else n_nottaken++;
          end
          if (ins[15:13] == 3'd2 && exp_gap[c] == 2) n_ldst++;
          m[c].step(ins);
          exp_gap[c] = m[c].gap(pm_img[m[c].pc]);
          last_commit[c] = cyc;
          n_retired[c]++;
        end
        prev_retire[c] = retire[c];
      end
      if (flush) n_flush++;
      flush <= ($urandom_range(0, 249) == 0);
    end
  end

  localparam word_t HALT = 16'h2000; // branch +0

  word_t v;

  initial begin
    // ---------------- part A ----------------
    foreach (pm_img[i]) pm_img[i] = HALT;
    foreach (dm_img[i]) dm_img[i] = '0;
    pm_img[0] = enc(OP_SET, 3'd1, 8'd5);
    pm_img[1] = enc(OP_STORE, 3'd1, 8'd200);
    pm_img[2] = enc(OP_SET, 3'd2, 8'd77);
    pm_img[3] = enc(OP_STORE, 3'd2, 8'd210);
    pm_img[4] = HALT;
    pm_img[128] = enc(OP_SET, 3'd1, 8'd7);
    pm_img[129] = enc(OP_STORE, 3'd1, 8'd200);
    pm_img[130] = enc(OP_LOAD, 3'd0, 8'd210);
    pm_img[131] = enc(OP_BRANCH, 3'd0, 8'hFF);   // back to 130 while r0 = 0
    pm_img[132] = enc(OP_STORE, 3'd0, 8'd211);
    pm_img[133] = enc(OP_SET, 3'd0, 8'd0);
    pm_img[134] = HALT;
    rst_pc[0] = 8'd0;
    rst_pc[1] = 8'd128;
    rst_n = 0;
    load_memories();
    rst_n = 1;
    begin : part_a_watch
      int same;
      same = 0;
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        if (retire[0] && retire[1] && pc[0] == 8'd1 && pc[1] == 8'd129) same++;
      end
      n_same_addr = same;
    end
    check(n_same_addr == 1, "both cores store to the same word in one cycle");
    host_read(8'd200, v);
    check(v == 16'd5, "same-cycle stores: core 0 keeps the word");
    host_read(8'd210, v);
    check(v == 16'd77, "flag written by core 0");
    host_read(8'd211, v);
    check(v == 16'd77, "core 1 copied the flag");
    if (v == 16'd77) n_handoff++;
    check(pc[0] == 8'd4 && pc[1] == 8'd134, "both cores halted");
    check(regs[1][0] == 16'd0 && regs[1][1] == 16'd7 && regs[0][2] == 16'd77, "registers after part A");

    // ---------------- part B ----------------
    for (int prog = 0; prog < 8; prog++) begin
      rst_n = 0;
      flush = 0;
      for (int c = 0; c < NC; c++)
        for (int a = 0; a < 128; a++)
          pm_img[c * 128 + a] = rand_ins(c, mar_t'(c * 128 + a));
      // end each half with a jump back into it, so no core runs into the
      // other's program
      for (int c = 0; c < NC; c++) begin
        pm_img[c * 128 + 126] = enc(OP_SET, 3'd0, 8'd0);
        pm_img[c * 128 + 127] = enc(OP_BRANCH, 3'd0, mar_t'($urandom_range(0, 120) - 127));
      end
      foreach (dm_img[i]) dm_img[i] = word_t'($urandom);
      // rst_pc must be steady while reset is held
      for (int c = 0; c < NC; c++) rst_pc[c] = mar_t'(c * 128 + $urandom_range(0, 127));
      load_memories();
      for (int c = 0; c < NC; c++) begin
        m[c] = new();
        m[c].pc = rst_pc[c];
        foreach (dm_img[i]) m[c].dm[i] = dm_img[i];
        exp_gap[c] = 4; last_commit[c] = 0; prev_retire[c] = 0; n_retired[c] = 0;
      end
      cyc = 0;
      rst_n = 1;
      in_run = 1;
      repeat (2000) @(negedge clk);
      @(posedge clk);
      #1;
      in_run = 0;
      $display("prog %0d retired %0d %0d", prog, n_retired[0], n_retired[1]);
      rst_n = 0;
      flush = 0;
      for (int i = 0; i < MEM_DEPTH; i++) begin
        word_t exp;
        exp = (i < 16) ? m[0].dm[i] : (i < 32) ? m[1].dm[i] : dm_img[i];
        host_read(mar_t'(i), v);
        check(v == exp, $sformatf("dm[%0d]", i));
      end
    end

    check(n_stall > 0, "no hazard stall");
    check(n_ldst > 0, "no store-to-load stall");
    check(n_taken > 0, "no taken branch");
    check(n_nottaken > 0, "no not-taken branch");
    check(n_flush > 0, "no flush");
    check(n_dual_store > 0, "no cycle with stores from both cores");
    check(n_dual_retire > 0, "no cycle with commits from both cores");
    $display("stalls=%0d ldst=%0d taken=%0d nottaken=%0d flush=%0d dual_store=%0d dual_retire=%0d same_addr=%0d handoff=%0d",
             n_stall, n_ldst, n_taken, n_nottaken, n_flush, n_dual_store, n_dual_retire, n_same_addr, n_handoff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
