// register_unit: register file [RI -> Word] of one AC-P pipeline.
//
// Three combinational read ports serve the execute stage: ra and rb (add
// operands, store data) and r0 (the branch condition). The write port takes
// the execute unit's state: when unit = reg the result is written to
// register trim(dest) at the clock edge (the architecture's rule). The
// whole file is also brought out on regs so the architectural state can be
// observed. Reset clears every register (this design's choice).
module register_unit
  import spm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ri_t   ra,
  input  ri_t   rb,
  output word_t ra_data,
  output word_t rb_data,
  output word_t r0_data,
  input  ex_t   ex,
  output word_t regs [NREGS]
);

  word_t r [NREGS];

  assign ra_data = r[ra];
  assign rb_data = r[rb];
  assign r0_data = r[0];
  assign regs    = r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (ex.unit == U_REG) begin
      r[trim(ex.dest)] <= ex.result;
    end
  end

endmodule
