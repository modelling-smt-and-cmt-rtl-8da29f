// pipe_state_monitor: pipeline state class, duration function and
// instruction-retirement clock of one AC-P pipeline.
//
// From the execute unit's (unit, ctr) the monitor classifies the pipeline
// into the four legal states of the architecture and gives the duration
// function dur, the number of cycles until the next instruction has
// committed:
//   full            unit /= wait          dur = 1
//   after conflict  unit = wait, ctr = 0  dur = 2
//   after branch    unit = wait, ctr = 1  dur = 3
//   flushed         unit = wait, ctr = 2  dur = 4
// A taken branch in the execute unit (unit = pc, ctr = 2) commits at the
// next edge and is classed as full (this design's choice). The architecture
// defines the states by comparing with a flushed and refilled copy of the
// pipeline; in hardware only the (unit, ctr) part of that test is made.
// retire is high in each cycle whose clock edge commits an instruction;
// retire_count counts those edges, i.e. it is the pipeline's own
// instruction clock. Its 32-bit width is this design's choice.
module pipe_state_monitor
  import spm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ex_t         ex,
  output pipe_state_t pstate,
  output logic [2:0]  dur,
  output logic        retire,
  output logic [31:0] retire_count
);

  always_comb begin
    if (ex.unit != U_WAIT) begin
      pstate = PS_FULL;
      dur    = 3'd1;
    end else begin
      unique case (ex.ctr)
        2'd0:    begin pstate = PS_AFTER_CONFLICT; dur = 3'd2; end
        2'd1:    begin pstate = PS_AFTER_BRANCH;   dur = 3'd3; end
        default: begin pstate = PS_FLUSHED;        dur = 3'd4; end
      endcase
    end
  end

  assign retire = (ex.unit != U_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      retire_count <= '0;
    else if (retire) retire_count <= retire_count + 32'd1;
  end

endmodule
