// data_memory: data memory [MAR -> Word] shared by the cores; the only
// state the cores share.
//
// Each core has a combinational read port (loads) and a write port (stores
// committed by its execute unit). Stores from several cores in one cycle
// are all written; when two go to the same address the lower-numbered core's
// value is kept. The architecture leaves that case open, so the rule is this
// design's. A host port reads combinationally and writes at the clock edge
// with the lowest priority; it is this design's addition for loading data
// and observing results.
module data_memory
  import spm_pkg::*;
#(
  parameter int unsigned NPORTS = 2
) (
  input  logic  clk,
  input  mar_t  raddr [NPORTS],
  output word_t rdata [NPORTS],
  input  logic  we    [NPORTS],
  input  mar_t  waddr [NPORTS],
  input  word_t wdata [NPORTS],
  input  logic  host_we,
  input  mar_t  host_addr,
  input  word_t host_wdata,
  output word_t host_rdata
);

  word_t mem [MEM_DEPTH];

  always_comb begin
    for (int p = 0; p < NPORTS; p++) rdata[p] = mem[raddr[p]];
  end
  assign host_rdata = mem[host_addr];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    // Highest index first, so a lower-numbered core overrides.
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (we[p]) mem[waddr[p]] <= wdata[p];
    end
  end

endmodule
