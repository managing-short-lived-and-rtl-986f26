// rotating_rf: rotating (Cydra-style) register file with a constant region.
//
// A normal register file addressed by a static schedule can keep a value for
// at most II cycles, because the same write in the next wave clobbers it.
// This file adds a wave counter whose value is added to every read and write
// address, renaming logical to physical entries once per wave, so a value
// written in wave w at logical entry l is found in wave w+k at logical entry
// l-k. The counter is advanced by the per-phase control 'wave_inc' (normally
// set in one phase of each wave).
//
// rot_entries (set once at configuration time) splits the file: logical
// entries below rot_entries rotate (physical = (l + wave) mod rot_entries),
// entries at or above it are addressed directly and keep constants or any
// other value that must not move. rot_entries = 0 turns the file into a plain
// register file. The wave counter counts modulo rot_entries.
//
// Timing: reads are combinational from the current contents; a write, and a
// wave-counter step, take effect at the clock edge, and a write in the same
// cycle as a wave step uses the address mapping before the step. Reading an
// entry that is written in the same cycle returns the old value.
// Interface: one write port, NRD read ports (1 for a large file, 2 for the
// private register block of a functional unit). The rotation and the RAM/ROM
// split follow the architecture; the modulo arithmetic, reset to zero and
// the read-during-write behaviour are this design's choices.
module rotating_rf #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned W       = 32,
  parameter int unsigned NRD     = 1,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [AW:0]             rot_entries,
  input  logic                    wave_inc,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [W-1:0]            wdata,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][W-1:0]   rdata,
  output logic [AW-1:0]           wave
);

  logic [W-1:0] regs [ENTRIES];
  logic [AW:0]  rot;   // effective rotating region size

  assign rot = (rot_entries > (AW+1)'(ENTRIES)) ? (AW+1)'(ENTRIES) : rot_entries;

  function automatic logic [AW-1:0] phys(input logic [AW-1:0] l,
                                         input logic [AW-1:0] w,
                                         input logic [AW:0]   nrot);
    logic [AW+1:0] sum;
    if ({1'b0, l} >= nrot) return l;
    sum = {2'b00, l} + {2'b00, w};
    if (sum >= {1'b0, nrot}) sum = sum - {1'b0, nrot};
    return sum[AW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) regs[i] <= '0;
      wave <= '0;
    end else begin
      if (we) regs[phys(waddr, wave, rot)] <= wdata;
      if (wave_inc) begin
        if ({1'b0, wave} + 1'b1 >= rot) wave <= '0;
        else                            wave <= wave + 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) rdata[p] = regs[phys(raddr[p], wave, rot)];
  end

endmodule
