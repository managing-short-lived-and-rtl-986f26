// config_mem: configuration memory of one configurable unit.
//
// Holds one configuration word per phase of the modulo schedule (the grey
// configuration cells of the storage structures) plus one static word that is
// fixed for the whole run. The per-phase word is read combinationally at the
// current phase, so the unit it steers changes behaviour every cycle as the
// schedule advances. While 'en' (schedule running) is low the word is all
// zeros, which leaves the unit idle: no register loads, no writes, nothing
// routed, so loading the configuration has no side effects. Words are written over the tile's configuration bus: a
// write is taken when cfg.we is set and cfg.unit equals UNIT; cfg.is_static
// selects the static word instead of the phase word at cfg.addr; a static
// write whose top data bit is set is a constant load meant for the unit's
// register file (decoded by the unit's owner) and leaves the static word
// alone. Writes take
// effect at the next clock edge. Reset clears every word, which configures
// every unit to do nothing harmful (no writes, no enables).
// Keeping the configuration in a small phase-indexed memory follows the
// architecture; the bus format and the static word are this design's choice.
module config_mem
  import cgra_pkg::*;
#(
  parameter int unsigned W     = 8,      // per-phase word width
  parameter int unsigned SW    = 1,      // static word width
  parameter int unsigned DEPTH = MAX_II,
  parameter logic [3:0]  UNIT  = 4'd0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_wr_t                  cfg,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] phase,
  output logic [W-1:0]             word,
  output logic [SW-1:0]            stat
);

  logic [W-1:0] mem [DEPTH];
  logic         hit;

  assign hit = cfg.we && (cfg.unit == UNIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      stat <= '0;
    end else if (hit) begin
      if (cfg.is_static) begin
        if (!cfg.data[CFG_W-1]) stat <= cfg.data[SW-1:0];
      end
      else               mem[cfg.addr[$clog2(DEPTH)-1:0]] <= cfg.data[W-1:0];
    end
  end

  assign word = en ? mem[phase] : '0;

endmodule
