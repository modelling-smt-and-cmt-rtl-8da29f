// decode_unit: decode stage of one AC-P pipeline.
//
// When the pipeline stalls (conflict) the decoded fields hold; otherwise the
// instruction register from the fetch unit is split into opcode, register
// indices ra, rb, rc and the address/immediate field, one cycle later.
// The behaviour is the architecture's; the bit positions of the fields are
// this design's choice (see spm_pkg). Reset clears the fields; the execute
// unit is then in its flushed state, so they are never executed.
module decode_unit
  import spm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  conflict,
  input  word_t ir,
  output dec_t  d
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0;
    end else if (!conflict) begin
      d.opr     <= op_of(ir);
      d.ra      <= ra_of(ir);
      d.rb      <= rb_of(ir);
      d.rc      <= rc_of(ir);
      d.address <= addr_of(ir);
    end
  end

endmodule
