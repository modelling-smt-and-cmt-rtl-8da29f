// tb_pipe_state_monitor: checks the state classes and the duration function
// (full 1, after conflict 2, after branch 3, flushed 4), the retire strobe
// and the retired-instruction counter for random execute-unit states.
`timescale 1ns/1ps
module tb_pipe_state_monitor;
  import spm_pkg::*;

  logic clk = 0, rst_n = 0;
  ex_t ex;
  pipe_state_t pstate;
  logic [2:0] dur;
  logic retire;
  logic [31:0] retire_count;
  int checks = 0, failures = 0, cnt = 0;
  int seen [4];

  pipe_state_monitor dut (.*);
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

  initial begin
    foreach (seen[i]) seen[i] = 0;
    ex = '{result: '0, dest: '0, unit: U_WAIT, ctr: 2'd2};
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      int u, c, ed, es;
      @(negedge clk);
      u = $urandom_range(0, 4);
      c = (u == 1) ? 2 : (u == 4) ? $urandom_range(0, 2) : 0;
      ex = '{result: word_t'($urandom), dest: mar_t'($urandom), unit: unit_t'(u), ctr: ctr_t'(c)};
      #1;
      if (u != 4) begin ed = 1; es = 0; end
      else begin ed = c + 2; es = c + 1; end
      seen[es]++;
      chk(int'(dur) == ed && int'(pstate) == es && retire == (u != 4),
          $sformatf("unit %0d ctr %0d: dur %0d state %0d", u, c, dur, pstate));
      chk(retire_count == 32'(cnt), "count");
      if (u != 4) cnt++;
    end
    for (int i = 0; i < 4; i++) chk(seen[i] > 0, "all states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
