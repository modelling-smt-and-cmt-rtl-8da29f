// tb_data_memory: checks the shared data memory. Random stores from the
// two core ports and the host port are applied together with random reads;
// a testbench copy applies the same writes with the rule that core 0 beats
// core 1 beats the host on the same address, and both core reads and the
// host read are compared every cycle.
`timescale 1ns/1ps
module tb_data_memory;
  import spm_pkg::*;

  logic clk = 0;
  mar_t raddr [2];
  word_t rdata [2];
  logic we [2];
  mar_t waddr [2];
  word_t wdata [2];
  logic host_we = 0;
  mar_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  word_t model [256];
  int checks = 0, failures = 0, same = 0, dual = 0;

  data_memory dut (.*);
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
    we[0] = 0; we[1] = 0; raddr[0] = '0; raddr[1] = '0;
    waddr[0] = '0; waddr[1] = '0; wdata[0] = '0; wdata[1] = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = mar_t'(i); host_wdata = word_t'($urandom);
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // small address range: collisions are frequent
      for (int p = 0; p < 2; p++) begin
        we[p] = $urandom_range(0, 1);
        waddr[p] = mar_t'($urandom_range(0, 7));
        wdata[p] = word_t'($urandom);
        raddr[p] = mar_t'($urandom_range(0, 7));
      end
      host_we = ($urandom_range(0, 3) == 0);
      host_addr = mar_t'($urandom_range(0, 7));
      host_wdata = word_t'($urandom);
      #1;
      chk(rdata[0] == model[raddr[0]] && rdata[1] == model[raddr[1]], "core reads");
      chk(host_rdata == model[host_addr], "host read");
      if (host_we) model[host_addr] = host_wdata;
      if (we[1]) model[waddr[1]] = wdata[1];
      if (we[0]) model[waddr[0]] = wdata[0];
      if (we[0] && we[1]) begin
        dual++;
        if (waddr[0] == waddr[1]) same++;
      end
      @(posedge clk);
      #1;
      for (int a = 0; a < 8; a++) begin
        host_we = 0;
        host_addr = mar_t'(a);
        #1;
        chk(host_rdata == model[a], $sformatf("word %0d", a));
      end
    end
    chk(dual > 0 && same > 0, "simultaneous stores");
    $display("dual stores %0d same address %0d", dual, same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
