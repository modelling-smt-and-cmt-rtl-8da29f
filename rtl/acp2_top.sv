// acp2_top: AC-P2, a chip-level multithreaded (multi-core) processor made of
// NCORES copies of the AC-P pipeline that share one program memory and one
// data memory.
//
// Every pipeline has its own fetch, decode and execute units, register file
// and program counter; only the memories are shared, and the data memory is
// the only state through which the cores interact. To software each core
// is a separate SPM processor whose instruction stream advances on its own
// clock (its retire strobe), so the order in which the cores' loads and
// stores meet in the data memory is decided by the pipelines' timing: stalls
// and branch refills of one core shift its memory accesses relative to the
// other's.
//
// Ports: clk, asynchronous active-low rst_n, and flush, which empties both
// pipelines together (so neither keeps writing to the shared memory while
// the other refills). rst_pc gives each core its start address. The program
// memory has a load port (pm_*) and the data memory a host port (dm_host_*).
// Per core the top brings out the architectural pc and registers, the
// retire and stall strobes, the pipeline state class, the duration function
// and the retired-instruction count.
//
// The default of two cores is the architecture's; the memory ports for a
// host, the per-core start address and the flush input are this design's.
module acp2_top
  import spm_pkg::*;
#(
  parameter int unsigned NCORES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  mar_t        rst_pc       [NCORES],
  input  logic        pm_we,
  input  mar_t        pm_waddr,
  input  word_t       pm_wdata,
  input  logic        dm_host_we,
  input  mar_t        dm_host_addr,
  input  word_t       dm_host_wdata,
  output word_t       dm_host_rdata,
  output mar_t        pc           [NCORES],
  output word_t       regs         [NCORES][NREGS],
  output logic        retire       [NCORES],
  output logic        stall        [NCORES],
  output pipe_state_t pstate       [NCORES],
  output logic [2:0]  dur          [NCORES],
  output logic [31:0] retire_count [NCORES]
);

  mar_t  pm_addr  [NCORES];
  word_t pm_rdata [NCORES];
  mar_t  dm_raddr [NCORES];
  word_t dm_rdata [NCORES];
  logic  dm_we    [NCORES];
  mar_t  dm_waddr [NCORES];
  word_t dm_wdata [NCORES];
  ex_t   ex       [NCORES];

  program_memory #(.NPORTS(NCORES)) u_pm (
    .clk, .raddr(pm_addr), .rdata(pm_rdata),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata)
  );

  data_memory #(.NPORTS(NCORES)) u_dm (
    .clk, .raddr(dm_raddr), .rdata(dm_rdata),
    .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .host_we(dm_host_we), .host_addr(dm_host_addr),
    .host_wdata(dm_host_wdata), .host_rdata(dm_host_rdata)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    acp_pipeline u_pipe (
      .clk, .rst_n, .flush, .rst_pc(rst_pc[c]),
      .pm_addr(pm_addr[c]), .pm_rdata(pm_rdata[c]),
      .dm_raddr(dm_raddr[c]), .dm_rdata(dm_rdata[c]),
      .dm_we(dm_we[c]), .dm_waddr(dm_waddr[c]), .dm_wdata(dm_wdata[c]),
      .pc(pc[c]), .regs(regs[c]), .ex(ex[c]),
      .stall(stall[c]), .retire(retire[c]), .pstate(pstate[c]),
      .dur(dur[c]), .retire_count(retire_count[c])
    );
  end

endmodule
