// switchbox: scheduled switchbox joining a cluster to the grid interconnect.
//
// Each tile of the array pairs a cluster with a switchbox on the global grid.
// The switchbox drives one 32-bit word track and one 1-bit track towards each
// of the four neighbours (N, E, S, W). Per phase, every outgoing track picks
// its source: one of the four incoming tracks (so values can pass straight
// through a tile), one of the two values the cluster hands to the switchbox,
// its own previous value (hold) or zero. Outgoing tracks are registered, so a
// hop from one tile to the next takes one clock. Incoming tracks also go
// directly into the cluster's crossbars (done by the tile wiring).
// The switchbox holds its own configuration memory (unit U_SB); while 'en'
// is low its word is zero, which routes the north track to every output. The existence
// of a switchbox per tile follows the architecture; the track count, the
// source set and the output register are this design's choices.
module switchbox
  import cgra_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  cfg_wr_t                      cfg,
  input  logic                         en,
  input  logic [PHW-1:0]               phase,
  input  logic [N_DIR-1:0][W-1:0]      in_word,
  input  logic [N_DIR-1:0]             in_bit,
  input  logic [N_TO_SB-1:0][W-1:0]    cl_word,
  input  logic [N_TO_SB-1:0]           cl_bit,
  output logic [N_DIR-1:0][W-1:0]      out_word,
  output logic [N_DIR-1:0]             out_bit
);

  sb_cfg_t sc;
  logic    unused_stat;

  config_mem #(.W($bits(sb_cfg_t)), .SW(1), .UNIT(U_SB)) u_cfg (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(sc), .stat(unused_stat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_word <= '0;
      out_bit  <= '0;
    end else begin
      for (int d = 0; d < int'(N_DIR); d++) begin
        case (sc.wsel[d])
          3'd0, 3'd1, 3'd2, 3'd3: out_word[d] <= in_word[sc.wsel[d][1:0]];
          3'd4, 3'd5:             out_word[d] <= cl_word[sc.wsel[d][0]];
          3'd6:                   out_word[d] <= out_word[d];
          default:                out_word[d] <= '0;
        endcase
        case (sc.bsel[d])
          3'd0, 3'd1, 3'd2, 3'd3: out_bit[d] <= in_bit[sc.bsel[d][1:0]];
          3'd4, 3'd5:             out_bit[d] <= cl_bit[sc.bsel[d][0]];
          3'd6:                   out_bit[d] <= out_bit[d];
          default:                out_bit[d] <= 1'b0;
        endcase
      end
    end
  end

endmodule
