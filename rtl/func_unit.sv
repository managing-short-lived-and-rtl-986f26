// func_unit: functional unit with enabled input registers, local feedback
// and a private rotating register block (the unit of the optimized
// architecture).
//
// Three ideas keep short- and medium-lived values next to the ALU instead of
// sending them round the cluster crossbar:
//  * Input retiming registers A_reg and B_reg load only when their per-phase
//    enable is set, so they can hold an operand for several cycles or keep an
//    early operand while a later one arrives. Each ALU operand can also take
//    A or B directly (bypass).
//  * A feedback register, loaded from the ALU result under a per-phase
//    enable, hands a result to the next operation on the same unit.
//  * A private rotating register block (RB_ENTRIES entries, two read ports,
//    one write port). Entries at or above the configured rotating size do not
//    rotate and hold constants loaded at configuration time.
// Each cycle the per-phase word 'cfg' selects the ALU operation, the two ALU
// operands (A, A_reg, B, B_reg, feedback, RB port 0, RB port 1, zero), the
// register enables, the RB write (source ALU/A/B/feedback) and read
// addresses, and the source of the unit's result R (ALU, feedback, RB port 0,
// RB port 1). 'rb_rot' is the static rotating size of the register block.
// Constants are placed in the ROM region at configuration time through
// cst_we/cst_addr/cst_data, which take over the register block's write port
// for that cycle (an entry at or above rb_rot is never renamed, so it keeps
// the constant for the whole run).
//
// Timing: R and cout are combinational from A, B, cin and the stored state,
// so operands arriving from the crossbar can be used in the same cycle; the
// registers and the register block update at the clock edge.
// The structure (enabled input registers, registered feedback, private
// 2-read 1-write RRF with a constant region) follows the architecture. The
// operand and result multiplexer choices are read from its figures; the
// exact multiplexer inputs, the RB write sources and the ALU operation set
// are this design's choices.
module func_unit
  import cgra_pkg::*;
#(
  parameter int unsigned W          = DW,
  parameter int unsigned RB_ENTRIES = cgra_pkg::DEF_RB_ENTRIES,
  localparam int unsigned RBAW      = $clog2(RB_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fu_cfg_t       cfg,
  input  logic [RBAW:0] rb_rot,
  input  logic          cst_we,
  input  logic [RBAW-1:0] cst_addr,
  input  logic [W-1:0]  cst_data,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          cin,
  output logic [W-1:0]  r,
  output logic          cout
);

  logic [W-1:0] a_q, b_q, fb_q;
  logic [W-1:0] x, y, alu_r, rb_wdata;
  logic [1:0][W-1:0]    rb_rdata;
  logic [1:0][RBAW-1:0] rb_raddr;
  logic [RBAW-1:0]      rb_wave;

  // enabled input retiming registers and feedback register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      fb_q <= '0;
    end else begin
      if (cfg.a_en)  a_q  <= a;
      if (cfg.b_en)  b_q  <= b;
      if (cfg.fb_en) fb_q <= alu_r;
    end
  end

  function automatic logic [W-1:0] pick(input opnd_sel_e s,
                                        input logic [W-1:0] va, vaq, vb, vbq, vfb, v0, v1);
    case (s)
      SRC_A:    return va;
      SRC_AREG: return vaq;
      SRC_B:    return vb;
      SRC_BREG: return vbq;
      SRC_FB:   return vfb;
      SRC_RB0:  return v0;
      SRC_RB1:  return v1;
      default:  return '0;
    endcase
  endfunction

  assign x = pick(cfg.xsel, a, a_q, b, b_q, fb_q, rb_rdata[0], rb_rdata[1]);
  assign y = pick(cfg.ysel, a, a_q, b, b_q, fb_q, rb_rdata[0], rb_rdata[1]);

  alu #(.W(W)) u_alu (
    .op  (cfg.op),
    .x   (x),
    .y   (y),
    .cin (cin),
    .r   (alu_r),
    .cout(cout)
  );

  always_comb begin
    case (cfg.rb_wsrc)
      WS_ALU:  rb_wdata = alu_r;
      WS_A:    rb_wdata = a;
      WS_B:    rb_wdata = b;
      default: rb_wdata = fb_q;
    endcase
  end

  assign rb_raddr[0] = cfg.rb_raddr0[RBAW-1:0];
  assign rb_raddr[1] = cfg.rb_raddr1[RBAW-1:0];

  rotating_rf #(.ENTRIES(RB_ENTRIES), .W(W), .NRD(2)) u_rb (
    .clk        (clk),
    .rst_n      (rst_n),
    .rot_entries(rb_rot),
    .wave_inc   (cfg.rb_wave_inc),
    .we         (cfg.rb_we | cst_we),
    .waddr      (cst_we ? cst_addr : cfg.rb_waddr[RBAW-1:0]),
    .wdata      (cst_we ? cst_data : rb_wdata),
    .raddr      (rb_raddr),
    .rdata      (rb_rdata),
    .wave       (rb_wave)
  );

  always_comb begin
    case (cfg.out_sel)
      OUT_ALU: r = alu_r;
      OUT_FB:  r = fb_q;
      OUT_RB0: r = rb_rdata[0];
      default: r = rb_rdata[1];
    endcase
  end

endmodule
