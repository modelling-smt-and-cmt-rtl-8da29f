// program_memory: instruction memory [MAR -> Word] shared by the cores.
//
// NPORTS combinational read ports, one per pipeline's fetch unit; the
// processor never writes it. A single load port (we, waddr, wdata), written
// at the clock edge, lets a host place programs before the cores run; it is
// this design's addition.
module program_memory
  import spm_pkg::*;
#(
  parameter int unsigned NPORTS = 2
) (
  input  logic  clk,
  input  mar_t  raddr [NPORTS],
  output word_t rdata [NPORTS],
  input  logic  we,
  input  mar_t  waddr,
  input  word_t wdata
);

  word_t mem [MEM_DEPTH];

  always_comb begin
    for (int p = 0; p < NPORTS; p++) rdata[p] = mem[raddr[p]];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
