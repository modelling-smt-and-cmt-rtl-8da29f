// tb_acp_pipeline: self-checking testbench for one AC-P pipeline.
//
// The testbench owns the program and data memories (plain arrays with
// combinational reads) and runs random programs on the pipeline. Each
// instruction the pipeline commits is replayed on the instruction-level
// reference model; after each commit the pipeline's pc and registers must
// equal the model's, and at the end of a program the data memory must too.
// The cycle spacing between commits is checked against the model's
// prediction (1 when full, 2 after a hazard, 3 after a taken branch, first
// commit on the 4th edge after reset or flush), and the dur output against
// the cycles actually left until the next commit. Flushes are applied at
// random times. Each mechanism (hazard stall, store-to-load stall, taken and
// not-taken branch, flush, every instruction) must occur at least once.
`timescale 1ns/1ps
module tb_acp_pipeline;
  import spm_pkg::*;
  import spm_ref_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  mar_t rst_pc;
  mar_t pm_addr, dm_raddr, dm_waddr, pc;
  word_t pm_rdata, dm_rdata, dm_wdata;
  logic dm_we, stall, retire;
  word_t regs [NREGS];
  ex_t ex;
  pipe_state_t pstate;
  logic [2:0] dur;
  logic [31:0] retire_count;

  word_t pm [MEM_DEPTH];
  word_t dm [MEM_DEPTH];

  acp_pipeline dut (.*);

  assign pm_rdata = pm[pm_addr];
  assign dm_rdata = dm[dm_raddr];
  always @(posedge clk) if (dm_we) dm[dm_waddr] <= dm_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_ldst_stall = 0, n_taken = 0, n_nottaken = 0, n_flush = 0;
  int n_op [8];
  int n_retired = 0;

  initial begin
    #2_000_000;
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

  function automatic word_t rand_ins();
    int k;
    ri_t ra, rb, rc;
    mar_t ad;
    k  = $urandom_range(0, 99);
    ra = ri_t'($urandom_range(0, 3));   // few registers: more hazards
    rb = ri_t'($urandom_range(0, 3));
    rc = ri_t'($urandom_range(0, 3));
    ad = mar_t'($urandom_range(0, 7)); // few addresses: more memory reuse
    if (k < 25) return enc_add(ra, rb, rc);
    if (k < 37) return enc(OP_BRANCH, '0, mar_t'($urandom_range(1, 6)));
    if (k < 39) return enc(OP_BRANCH, '0, mar_t'(-$urandom_range(1, 4)));
    if (k < 57) return enc(OP_LOAD, ra, ad);
    if (k < 72) return enc(OP_STORE, ra, ad);
    if (k < 97) return enc(OP_SET, ra, ($urandom_range(0, 3) == 0) ? mar_t'(0)
                                                                    : mar_t'($urandom));
    return {3'($urandom_range(5, 7)), 13'($urandom)};
  endfunction

  SpmModel m;
  int cyc, last_commit_cyc, exp_gap;
  bit prev_retire;
  int dur_hist [$];
  bit in_run;

  // Per-cycle checking at the falling edge.
  always @(negedge clk) begin
    if (in_run) begin
      cyc++;
      if (prev_retire) begin
        check(pc == m.pc, $sformatf("pc %0h model %0h", pc, m.pc));
        for (int i = 0; i < NREGS; i++)
          check(regs[i] == m.r[i], $sformatf("r%0d %0h model %0h", i, regs[i], m.r[i]));
      end
      if (stall) n_stall++;
      if (flush) begin
        // flush was applied at the last edge: the instruction that was in
        // execute committed there; the next one commits on the 4th edge
        n_flush++;
        m.clear_history();
        exp_gap = 4;
        last_commit_cyc = cyc - 1;
        dur_hist = {};
      end
      dur_hist.push_back(int'(dur));
      check(retire_count == 32'(n_retired), "retire_count");
      if (retire) begin
        word_t ins;
        ins = pm[m.pc];
        check(pc == m.pc, $sformatf("retiring pc %0h model %0h", pc, m.pc));
        check(cyc - last_commit_cyc == exp_gap,
              $sformatf("commit spacing %0d expected %0d (pc %0h)",
                        cyc - last_commit_cyc, exp_gap, m.pc));
        for (int j = 0; j < dur_hist.size(); j++)
          check(dur_hist[j] == dur_hist.size() - j,
                $sformatf("dur %0d expected %0d", dur_hist[j], dur_hist.size() - j));
        dur_hist = {};
        if (ins[15:13] == 3'd1) begin
          if (m.is_taken(ins)) n_taken++; else n_nottaken++;
        end
        n_op[ins[15:13]]++;
        // a load spaced 2 cycles from a store: store-to-load stall
        if (ins[15:13] == 3'd2 && exp_gap == 2) n_ldst_stall++;
        m.step(ins);
        exp_gap = m.gap(pm[m.pc]);
        last_commit_cyc = cyc;
        n_retired++;
      end
      prev_retire = retire;
      flush <= ($urandom_range(0, 199) == 0);
    end
  end

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    in_run = 0;
    for (int prog = 0; prog < 12; prog++) begin
      rst_n = 0;
      flush = 0;
      rst_pc = mar_t'($urandom);
      foreach (pm[i]) pm[i] = rand_ins();
      foreach (dm[i]) dm[i] = word_t'($urandom);
      m = new();
      m.pc = rst_pc;
      foreach (dm[i]) m.dm[i] = dm[i];
      repeat (2) @(negedge clk);
      rst_n = 1;
      cyc = 0; last_commit_cyc = 0; exp_gap = 4; prev_retire = 0;
      dur_hist = {};
      in_run = 1;
      repeat (1500) @(negedge clk);
      // stop the core right after the edge that commits the last
      // instruction the model has replayed
      @(posedge clk);
      #1;
      in_run = 0;
      rst_n = 0;
      flush = 0;
      for (int i = 0; i < MEM_DEPTH; i++)
        check(dm[i] == m.dm[i], $sformatf("dm[%0h] %0h model %0h", i, dm[i], m.dm[i]));
      n_retired = 0;
    end
    check(n_stall > 0, "no hazard stall seen");
    check(n_ldst_stall > 0, "no store-to-load stall seen");
    check(n_taken > 0, "no taken branch seen");
    check(n_nottaken > 0, "no not-taken branch seen");
    check(n_flush > 0, "no flush seen");
    for (int i = 0; i < 5; i++) check(n_op[i] > 0, $sformatf("opcode %0d never executed", i));
    $display("stalls=%0d ldst_stalls=%0d taken=%0d nottaken=%0d flushes=%0d add=%0d br=%0d ld=%0d st=%0d set=%0d",
             n_stall, n_ldst_stall, n_taken, n_nottaken, n_flush, n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
