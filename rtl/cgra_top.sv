// cgra_top: coarse-grained reconfigurable array.
//
// A ROWS x COLS grid of tiles; each tile is a compute cluster plus a
// switchbox. Switchboxes of neighbouring tiles are joined by one registered
// 32-bit track and one registered 1-bit track in each direction; tracks at
// the array edge are the array's stream inputs and outputs (edge_in_* /
// edge_out_*, indexed [column] on the north and south edges and [row] on the
// east and west edges).
//
// One schedule_ctrl drives the common phase of every configuration memory.
// The array is loaded while 'run' is low through the configuration port:
// cfg_we writes cfg_data into unit cfg_unit of tile cfg_tile (tile index
// row*COLS + col), at phase cfg_addr, or into the unit's static word when
// cfg_static is set; while 'run' is low every unit is idle. Then 'run' is raised and the loaded modulo schedule
// repeats every 'ii' cycles; 'phase' and 'waves' report progress.
// The tiled structure follows the architecture; the grid size, the single
// track per direction and the configuration port are this design's choices.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS     = 2,
  parameter int unsigned COLS     = 2,
  parameter int unsigned DM_WORDS = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // schedule control
  input  logic                   run,
  input  logic [PHW:0]           ii,
  output logic [PHW-1:0]         phase,
  output logic [15:0]            waves,
  // configuration port
  input  logic                   cfg_we,
  input  logic                   cfg_static,
  input  logic [7:0]             cfg_tile,
  input  logic [3:0]             cfg_unit,
  input  logic [PHW-1:0]         cfg_addr,
  input  logic [CFG_W-1:0]       cfg_data,
  // edge streams
  input  logic [COLS-1:0][DW-1:0] edge_in_word_n,
  input  logic [COLS-1:0][DW-1:0] edge_in_word_s,
  input  logic [ROWS-1:0][DW-1:0] edge_in_word_e,
  input  logic [ROWS-1:0][DW-1:0] edge_in_word_w,
  input  logic [COLS-1:0]         edge_in_bit_n,
  input  logic [COLS-1:0]         edge_in_bit_s,
  input  logic [ROWS-1:0]         edge_in_bit_e,
  input  logic [ROWS-1:0]         edge_in_bit_w,
  output logic [COLS-1:0][DW-1:0] edge_out_word_n,
  output logic [COLS-1:0][DW-1:0] edge_out_word_s,
  output logic [ROWS-1:0][DW-1:0] edge_out_word_e,
  output logic [ROWS-1:0][DW-1:0] edge_out_word_w,
  output logic [COLS-1:0]         edge_out_bit_n,
  output logic [COLS-1:0]         edge_out_bit_s,
  output logic [ROWS-1:0]         edge_out_bit_e,
  output logic [ROWS-1:0]         edge_out_bit_w
);

  logic last_unused;

  schedule_ctrl #(.DEPTH(MAX_II), .WAVEW(16)) u_sched (
    .clk(clk), .rst_n(rst_n), .run(run), .ii(ii),
    .phase(phase), .last(last_unused), .waves(waves));

  // switchbox outputs and the tracks each tile receives
  logic [N_DIR-1:0][DW-1:0] sb_out_w [ROWS][COLS];
  logic [N_DIR-1:0]         sb_out_b [ROWS][COLS];
  logic [N_DIR-1:0][DW-1:0] tin_w    [ROWS][COLS];
  logic [N_DIR-1:0]         tin_b    [ROWS][COLS];

  for (genvar rr = 0; rr < ROWS; rr++) begin : g_row
    for (genvar cc = 0; cc < COLS; cc++) begin : g_col
      cfg_wr_t                   tcfg;
      logic [N_TO_SB-1:0][DW-1:0] cl_w;
      logic [N_TO_SB-1:0]         cl_b;

      always_comb begin
        tcfg.we        = cfg_we && (cfg_tile == 8'(rr*COLS + cc));
        tcfg.is_static = cfg_static;
        tcfg.unit      = cfg_unit;
        tcfg.addr      = cfg_addr;
        tcfg.data      = cfg_data;
      end

      // incoming tracks: from the neighbour's opposite-side output, or the edge
      if (rr == 0) begin : g_n_edge
        assign tin_w[rr][cc][DIR_N] = edge_in_word_n[cc];
        assign tin_b[rr][cc][DIR_N] = edge_in_bit_n[cc];
        assign edge_out_word_n[cc]  = sb_out_w[rr][cc][DIR_N];
        assign edge_out_bit_n[cc]   = sb_out_b[rr][cc][DIR_N];
      end else begin : g_n
        assign tin_w[rr][cc][DIR_N] = sb_out_w[rr-1][cc][DIR_S];
        assign tin_b[rr][cc][DIR_N] = sb_out_b[rr-1][cc][DIR_S];
      end
      if (rr == ROWS-1) begin : g_s_edge
        assign tin_w[rr][cc][DIR_S] = edge_in_word_s[cc];
        assign tin_b[rr][cc][DIR_S] = edge_in_bit_s[cc];
        assign edge_out_word_s[cc]  = sb_out_w[rr][cc][DIR_S];
        assign edge_out_bit_s[cc]   = sb_out_b[rr][cc][DIR_S];
      end else begin : g_s
        assign tin_w[rr][cc][DIR_S] = sb_out_w[rr+1][cc][DIR_N];
        assign tin_b[rr][cc][DIR_S] = sb_out_b[rr+1][cc][DIR_N];
      end
      if (cc == COLS-1) begin : g_e_edge
        assign tin_w[rr][cc][DIR_E] = edge_in_word_e[rr];
        assign tin_b[rr][cc][DIR_E] = edge_in_bit_e[rr];
        assign edge_out_word_e[rr]  = sb_out_w[rr][cc][DIR_E];
        assign edge_out_bit_e[rr]   = sb_out_b[rr][cc][DIR_E];
      end else begin : g_e
        assign tin_w[rr][cc][DIR_E] = sb_out_w[rr][cc+1][DIR_W];
        assign tin_b[rr][cc][DIR_E] = sb_out_b[rr][cc+1][DIR_W];
      end
      if (cc == 0) begin : g_w_edge
        assign tin_w[rr][cc][DIR_W] = edge_in_word_w[rr];
        assign tin_b[rr][cc][DIR_W] = edge_in_bit_w[rr];
        assign edge_out_word_w[rr]  = sb_out_w[rr][cc][DIR_W];
        assign edge_out_bit_w[rr]   = sb_out_b[rr][cc][DIR_W];
      end else begin : g_w
        assign tin_w[rr][cc][DIR_W] = sb_out_w[rr][cc-1][DIR_E];
        assign tin_b[rr][cc][DIR_W] = sb_out_b[rr][cc-1][DIR_E];
      end

      cluster #(.DM_WORDS(DM_WORDS)) u_cluster (
        .clk(clk), .rst_n(rst_n), .cfg(tcfg), .en(run), .phase(phase),
        .net_in_word(tin_w[rr][cc]), .net_in_bit(tin_b[rr][cc]),
        .to_sb_word(cl_w), .to_sb_bit(cl_b));

      switchbox #(.W(DW)) u_sb (
        .clk(clk), .rst_n(rst_n), .cfg(tcfg), .en(run), .phase(phase),
        .in_word(tin_w[rr][cc]), .in_bit(tin_b[rr][cc]),
        .cl_word(cl_w), .cl_bit(cl_b),
        .out_word(sb_out_w[rr][cc]), .out_bit(sb_out_b[rr][cc]));
    end
  end

endmodule
