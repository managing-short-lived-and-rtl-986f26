// schedule_ctrl: modulo-schedule sequencer.
//
// A modulo-scheduled loop restarts its schedule every II (initiation
// interval) cycles; one pass through the schedule is a wave. This block
// produces the phase number, 0 .. II-1, that indexes every configuration
// memory of the array, and counts completed waves. While 'run' is low the
// phase stays at 0 and the wave count at 0. While 'run' is high the phase
// advances by one each clock and wraps after II-1; 'last' is high during
// the final phase of a wave and 'waves' increments at the wrap. 'ii' is
// sampled continuously; values 0 and 1 both give a one-phase schedule.
// The existence of a phase signal and of waves follows the architecture;
// the run/ii interface is this design's choice.
module schedule_ctrl
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_II,
  parameter int unsigned WAVEW = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic [$clog2(DEPTH):0]   ii,
  output logic [$clog2(DEPTH)-1:0] phase,
  output logic                     last,
  output logic [WAVEW-1:0]         waves
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [PW:0] last_ph;

  always_comb begin
    if (ii == '0)                        last_ph = '0;
    else if (ii > (PW+1)'(DEPTH))        last_ph = (PW+1)'(DEPTH - 1);
    else                                 last_ph = ii - 1'b1;
  end

  assign last = ({1'b0, phase} == last_ph);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      waves <= '0;
    end else if (!run) begin
      phase <= '0;
      waves <= '0;
    end else if (last) begin
      phase <= '0;
      waves <= waves + 1'b1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

endmodule
