// data_mem: embedded data memory of a cluster.
//
// Storage managed explicitly by the application, not by the register
// allocator, so it acts as a plain producer and consumer of values. One
// address and one write-data input arrive from the crossbar; per-phase
// controls 'we' and 're' come from the schedule. A write stores wdata at
// addr at the clock edge; a read captures mem[addr] at the clock edge and
// presents it on rdata from the next cycle until the next read (synchronous
// read, like a compiled SRAM). Only the low $clog2(WORDS) address bits are
// used. The memory's presence and role follow the architecture; its size,
// the read latency and the single shared port are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic         re,
  input  logic [W-1:0] addr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[addr[AW-1:0]];
  end

endmodule
