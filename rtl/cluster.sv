// cluster: compute cluster of the CGRA (optimized storage organisation).
//
// 32-bit datapath: four functional units, each with enabled input registers,
// a feedback register and a private 8-entry rotating register block that can
// also hold constants; one 16-entry large rotating register file for
// long-lived values; two embedded data memories; and a scheduled 32-bit
// crossbar joining them with the incoming grid tracks and the two values
// handed to the switchbox. 1-bit control path: two 3-LUTs, a 16-entry 1-bit
// large rotating register file and a scheduled 1-bit crossbar that also
// carries each FU's condition input and output.
//
// Every unit is steered by its own phase-indexed configuration memory, all
// written over 'cfg' (unit numbers U_* in cgra_pkg) and all read at the
// common schedule 'phase'; while 'en' is low every unit is idle. Static words give the rotating size of each
// register file (entries above it are not rotated and hold constants); a
// static write with data[CST_FLAG] set loads a constant into entry 'addr' of
// the addressed FU's register block or of a large register file.
//
// Crossbar numbering (cgra_pkg): 32-bit sources FU R0..3, large RRF read,
// memory read data 0..1, incoming N/E/S/W; sinks FU i A/B, large RRF write
// data, memory j address/write data, two values to the switchbox. 1-bit
// sources FU cout 0..3, LUT 0..1, 1-bit RRF read, incoming N/E/S/W; sinks
// FU cin 0..3, LUT inputs, 1-bit RRF write data, two bits to the switchbox.
//
// Timing: crossbars, ALUs and LUTs are combinational, so a value read from a
// register, a memory or an incoming track can cross the crossbar, be
// operated on and be captured in a register in the same cycle. Because a FU
// may bypass its input registers, the netlist contains combinational paths
// crossbar -> FU -> crossbar (and crossbar -> LUT -> crossbar). They are
// loops only in the netlist: a schedule never routes a unit's combinational
// output back to its own bypassed input in one phase, which is the rule a
// mapper must keep (as for any scheduled crossbar).
// The unit mix (4 FUs, 2 memories, 1 large RRF, 2 LUTs, private 8-entry RRF
// blocks, no shared register blocks) follows the optimized architecture;
// the port numbering, one read port on the large files and the memory
// addressing are this design's choices.
module cluster
  import cgra_pkg::*;
#(
  parameter int unsigned DM_WORDS   = 1024,
  parameter int unsigned RB_ENTRIES = cgra_pkg::DEF_RB_ENTRIES,
  parameter int unsigned LRF_ENTRIES = cgra_pkg::DEF_LRF_ENTRIES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cfg_wr_t                   cfg,
  input  logic                      en,
  input  logic [PHW-1:0]            phase,
  input  logic [N_DIR-1:0][DW-1:0]  net_in_word,
  input  logic [N_DIR-1:0]          net_in_bit,
  output logic [N_TO_SB-1:0][DW-1:0] to_sb_word,
  output logic [N_TO_SB-1:0]        to_sb_bit
);

  localparam int unsigned RBAW = $clog2(RB_ENTRIES);
  localparam int unsigned LAW  = $clog2(LRF_ENTRIES);

  logic [XW_NIN-1:0][DW-1:0]  xw_in;
  logic [XW_NOUT-1:0][DW-1:0] xw_out;
  logic [XB_NIN-1:0]          xb_in;
  logic [XB_NOUT-1:0]         xb_out;
  logic [XW_NOUT*XW_SELW-1:0] xw_sel;
  logic [XB_NOUT*XB_SELW-1:0] xb_sel;
  logic                       xw_stat_unused, xb_stat_unused;

  // ---- crossbars -----------------------------------------------------------
  config_mem #(.W(XW_NOUT*XW_SELW), .SW(1), .UNIT(U_XW)) u_cfg_xw (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(xw_sel), .stat(xw_stat_unused));
  config_mem #(.W(XB_NOUT*XB_SELW), .SW(1), .UNIT(U_XB)) u_cfg_xb (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(xb_sel), .stat(xb_stat_unused));

  crossbar #(.NIN(XW_NIN), .NOUT(XW_NOUT), .W(DW), .SELW(XW_SELW)) u_xw (
    .in(xw_in), .sel(xw_sel), .out(xw_out));
  crossbar #(.NIN(XB_NIN), .NOUT(XB_NOUT), .W(1), .SELW(XB_SELW)) u_xb (
    .in(xb_in), .sel(xb_sel), .out(xb_out));

  for (genvar d = 0; d < N_DIR; d++) begin : g_net
    assign xw_in[XWS_NET+d] = net_in_word[d];
    assign xb_in[XBS_NET+d] = net_in_bit[d];
  end
  for (genvar k = 0; k < N_TO_SB; k++) begin : g_sb
    assign to_sb_word[k] = xw_out[XWD_SB+k];
    assign to_sb_bit[k]  = xb_out[XBD_SB+k];
  end

  // ---- functional units ------------------------------------------------------
  for (genvar i = 0; i < N_FU; i++) begin : g_fu
    fu_cfg_t         fc;
    logic [STAT_W-1:0] st;
    config_mem #(.W($bits(fu_cfg_t)), .SW(STAT_W), .UNIT(U_FU0 + 4'(i))) u_cfg (
      .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(fc), .stat(st));
    func_unit #(.W(DW), .RB_ENTRIES(RB_ENTRIES)) u_fu (
      .clk   (clk),
      .rst_n (rst_n),
      .cfg   (fc),
      .rb_rot(st[RBAW:0]),
      .cst_we(cfg.we && cfg.is_static && cfg.data[CST_FLAG] && cfg.unit == U_FU0 + 4'(i)),
      .cst_addr(cfg.addr[RBAW-1:0]),
      .cst_data(cfg.data[DW-1:0]),
      .a     (xw_out[XWD_FU+2*i]),
      .b     (xw_out[XWD_FU+2*i+1]),
      .cin   (xb_out[XBD_FU+i]),
      .r     (xw_in[XWS_FU+i]),
      .cout  (xb_in[XBS_FU+i])
    );
  end

  // ---- large rotating register files (32-bit and 1-bit) ------------------------------
  lrf_cfg_t          lc, lc1;
  logic [STAT_W-1:0] lst, lst1;
  logic [LAW-1:0]    lwave_unused, lwave1_unused;
  logic [0:0][LAW-1:0] lraddr, lraddr1;

  config_mem #(.W($bits(lrf_cfg_t)), .SW(STAT_W), .UNIT(U_LRF)) u_cfg_lrf (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(lc), .stat(lst));
  config_mem #(.W($bits(lrf_cfg_t)), .SW(STAT_W), .UNIT(U_LRF1)) u_cfg_lrf1 (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(lc1), .stat(lst1));

  // constant loads into the large files at configuration time
  logic lcst_we, lcst1_we;
  assign lcst_we  = cfg.we && cfg.is_static && cfg.data[CST_FLAG] && (cfg.unit == U_LRF);
  assign lcst1_we = cfg.we && cfg.is_static && cfg.data[CST_FLAG] && (cfg.unit == U_LRF1);

  assign lraddr[0]  = lc.raddr[LAW-1:0];
  assign lraddr1[0] = lc1.raddr[LAW-1:0];

  rotating_rf #(.ENTRIES(LRF_ENTRIES), .W(DW), .NRD(1)) u_lrf (
    .clk(clk), .rst_n(rst_n), .rot_entries(lst[LAW:0]), .wave_inc(lc.wave_inc),
    .we(lc.we | lcst_we),
    .waddr(lcst_we ? cfg.addr[LAW-1:0] : lc.waddr[LAW-1:0]),
    .wdata(lcst_we ? cfg.data[DW-1:0] : xw_out[XWD_LRF]),
    .raddr(lraddr), .rdata(xw_in[XWS_LRF +: 1]), .wave(lwave_unused));

  rotating_rf #(.ENTRIES(LRF_ENTRIES), .W(1), .NRD(1)) u_lrf1 (
    .clk(clk), .rst_n(rst_n), .rot_entries(lst1[LAW:0]), .wave_inc(lc1.wave_inc),
    .we(lc1.we | lcst1_we),
    .waddr(lcst1_we ? cfg.addr[LAW-1:0] : lc1.waddr[LAW-1:0]),
    .wdata(lcst1_we ? cfg.data[0] : xb_out[XBD_LRF]),
    .raddr(lraddr1), .rdata(xb_in[XBS_LRF +: 1]), .wave(lwave1_unused));

  // ---- data memories -----------------------------------------------------------
  for (genvar j = 0; j < N_DMEM; j++) begin : g_dm
    dm_cfg_t dc;
    logic    st_unused;
    config_mem #(.W($bits(dm_cfg_t)), .SW(1), .UNIT(U_DM0 + 4'(j))) u_cfg (
      .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(dc), .stat(st_unused));
    data_mem #(.WORDS(DM_WORDS), .W(DW)) u_dm (
      .clk(clk), .rst_n(rst_n), .we(dc.we), .re(dc.re),
      .addr(xw_out[XWD_DM+2*j]), .wdata(xw_out[XWD_DM+2*j+1]),
      .rdata(xw_in[XWS_DM+j]));
  end

  // ---- 3-LUTs ----------------------------------------------------------------
  for (genvar k = 0; k < N_LUT; k++) begin : g_lut
    logic [7:0] tbl;
    logic       st_unused;
    config_mem #(.W(8), .SW(1), .UNIT(U_LUT0 + 4'(k))) u_cfg (
      .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(tbl), .stat(st_unused));
    lut3 u_lut (
      .in (xb_out[XBD_LUT+3*k +: 3]),
      .tbl(tbl),
      .out(xb_in[XBS_LUT+k]));
  end

endmodule
