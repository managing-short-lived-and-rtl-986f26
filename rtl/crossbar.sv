// crossbar: scheduled full crossbar of a cluster.
//
// Every output picks any one of the NIN inputs; the choice comes from the
// per-phase configuration word 'sel' (SELW bits per output, output o in
// sel[o*SELW +: SELW]), so the routing changes every cycle with the modulo
// schedule. Select value s = 1..NIN routes input s-1; s = 0 (the reset
// value of a configuration word) and values above NIN drive zero, so an
// unconfigured crossbar connects nothing. Purely combinational.
// The cluster uses one 32-bit instance for the datapath and one 1-bit
// instance for the control path, as the architecture describes; the select
// encoding is this design's choice.
module crossbar #(
  parameter int unsigned NIN  = 11,
  parameter int unsigned NOUT = 15,
  parameter int unsigned W    = 32,
  parameter int unsigned SELW = $clog2(NIN + 1)
) (
  input  logic [NIN-1:0][W-1:0]  in,
  input  logic [NOUT*SELW-1:0]   sel,
  output logic [NOUT-1:0][W-1:0] out
);

  always_comb begin
    for (int o = 0; o < int'(NOUT); o++) begin
      logic [SELW-1:0] s;
      s      = sel[o*SELW +: SELW];
      out[o] = '0;
      for (int i = 0; i < int'(NIN); i++)
        if (s == SELW'(i + 1)) out[o] = in[i];
    end
  end

endmodule
