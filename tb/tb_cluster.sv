// tb_cluster: runs a small modulo-scheduled loop (II = 4) on one cluster and
// checks its results wave by wave against values computed in the testbench.
//
// Each wave w a word x[w] and a bit p[w] arrive on the north track. The loop
// computes
//   y[w] = x[w] * C + x[w-2]         (C: constant in FU0's private block)
//   c[w] = (y[w] < T)                 (T: constant in FU3's private block)
//   q[w] = c[w] ^ p[w] ^ c[w-1]       (3-LUT, c[w-1] from the 1-bit large RRF)
// and stores y[w] at address w of data memory 0 (address counted by FU2's
// feedback register, increment 1 from its private block), reading it back in
// the next wave. x[w-2] is held in the large rotating register file for 8
// cycles (2*II), which needs the wave-counter renaming; x[w] is held in FU0's
// enabled input register from phase 0 to phase 1; FU1 holds x[w-2] in its B
// register from phase 0 to phase 2.
// Checked: to_sb_word[0] = y[w] in phase 3, to_sb_word[1] = y[w-1] in
// phase 2 (memory read-back), to_sb_bit[0] = q[w] in phase 3.
module tb_cluster;
  import cgra_pkg::*;
  localparam int II = 4, WAVES = 40;
  logic clk = 0, rst_n = 0, en = 0;
  cfg_wr_t cfg;
  logic [PHW-1:0] phase;
  logic [N_DIR-1:0][31:0] net_in_word;
  logic [N_DIR-1:0] net_in_bit;
  logic [N_TO_SB-1:0][31:0] to_sb_word;
  logic [N_TO_SB-1:0] to_sb_bit;
  logic [31:0] xs [WAVES], ys [WAVES];
  logic ps [WAVES], cs [WAVES];
  logic [31:0] C, T;
  int checks = 0, failures = 0;

  cluster #(.DM_WORDS(64)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase),
    .net_in_word(net_in_word), .net_in_bit(net_in_bit),
    .to_sb_word(to_sb_word), .to_sb_bit(to_sb_bit));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] unit, input int addr, input logic [63:0] data, input logic st);
    cfg = '{we: 1'b1, is_static: st, unit: unit, addr: PHW'(addr), data: data};
    @(negedge clk);
    cfg = '0;
  endtask

  // per-phase words
  fu_cfg_t  fu [N_FU][II];
  lrf_cfg_t lrf [II], lrf1 [II];
  dm_cfg_t  dm0 [II];
  logic [7:0] lut0 [II];
  logic [XW_NOUT*XW_SELW-1:0] xw [II];
  logic [XB_NOUT*XB_SELW-1:0] xb [II];

  task automatic route_w(input int p, input int sink, input int src);
    xw[p][sink*XW_SELW +: XW_SELW] = XW_SELW'(src + 1);
  endtask
  task automatic route_b(input int p, input int sink, input int src);
    xb[p][sink*XB_SELW +: XB_SELW] = XB_SELW'(src + 1);
  endtask

  task automatic build_program();
    for (int p = 0; p < II; p++) begin
      for (int i = 0; i < N_FU; i++) fu[i][p] = '0;
      lrf[p] = '0; lrf1[p] = '0; dm0[p] = '0; lut0[p] = '0;
      xw[p] = '0; xb[p] = '0;   // every sink unrouted (drives zero)
    end
    // phase 0: capture x[w], store it in the large RRF, fetch x[w-2]
    route_w(0, XWD_FU + 0, XWS_NET + DIR_N);
    route_w(0, XWD_LRF,    XWS_NET + DIR_N);
    route_w(0, XWD_FU + 3, XWS_LRF);          // FU1 input B
    fu[0][0].a_en = 1;
    fu[1][0].b_en = 1;
    lrf[0].we = 1; lrf[0].waddr = 4'd2; lrf[0].raddr = 4'd0;
    // phase 1: FU0 fb = A_reg * C ; FU2 gives address w-1 for the read-back
    fu[0][1].op = OP_MUL; fu[0][1].xsel = SRC_AREG; fu[0][1].ysel = SRC_RB1;
    fu[0][1].rb_raddr1 = 4'd7; fu[0][1].fb_en = 1;
    fu[2][1].op = OP_SUB; fu[2][1].xsel = SRC_FB; fu[2][1].ysel = SRC_RB1; fu[2][1].rb_raddr1 = 4'd7;
    route_w(1, XWD_DM + 0, XWS_FU + 2);
    dm0[1].re = 1;
    // phase 2: FU0 fb = fb + x[w-2] (FU1 forwards its held B register)
    fu[1][2].op = OP_PASSY; fu[1][2].ysel = SRC_BREG;
    route_w(2, XWD_FU + 1, XWS_FU + 1);        // FU0 input B
    fu[0][2].op = OP_ADD; fu[0][2].xsel = SRC_FB; fu[0][2].ysel = SRC_B; fu[0][2].fb_en = 1;
    route_w(2, XWD_SB + 1, XWS_DM + 0);
    // phase 3: emit y[w], store it, compare, LUT, advance waves
    fu[0][3].out_sel = OUT_FB;
    route_w(3, XWD_SB + 0, XWS_FU + 0);
    route_w(3, XWD_DM + 1, XWS_FU + 0);        // memory 0 write data
    route_w(3, XWD_DM + 0, XWS_FU + 2);        // memory 0 address
    route_w(3, XWD_FU + 6, XWS_FU + 0);        // FU3 input A
    fu[2][3].op = OP_ADD; fu[2][3].xsel = SRC_FB; fu[2][3].ysel = SRC_RB1;
    fu[2][3].rb_raddr1 = 4'd7; fu[2][3].fb_en = 1; fu[2][3].out_sel = OUT_FB;
    dm0[3].we = 1;
    fu[3][3].op = OP_LTU; fu[3][3].xsel = SRC_A; fu[3][3].ysel = SRC_RB1; fu[3][3].rb_raddr1 = 4'd7;
    lrf[3].wave_inc = 1;
    route_b(3, XBD_LUT + 0, XBS_FU + 3);
    route_b(3, XBD_LUT + 1, XBS_NET + DIR_N);
    route_b(3, XBD_LUT + 2, XBS_LRF);
    route_b(3, XBD_LRF,     XBS_FU + 3);
    route_b(3, XBD_SB + 0,  XBS_LUT + 0);
    lut0[3] = 8'b1001_0110;                    // 3-input XOR
    lrf1[3].we = 1; lrf1[3].waddr = 4'd1; lrf1[3].raddr = 4'd0; lrf1[3].wave_inc = 1;
  endtask

  task automatic load_program();
    for (int p = 0; p < II; p++) begin
      for (int i = 0; i < N_FU; i++) wr(U_FU0 + 4'(i), p, 64'(fu[i][p]), 0);
      wr(U_LRF, p, 64'(lrf[p]), 0);
      wr(U_LRF1, p, 64'(lrf1[p]), 0);
      wr(U_DM0, p, 64'(dm0[p]), 0);
      wr(U_LUT0, p, 64'(lut0[p]), 0);
      wr(U_XW, p, 64'(xw[p]), 0);
      wr(U_XB, p, 64'(xb[p]), 0);
    end
    // static: rotating sizes and constants
    for (int i = 0; i < N_FU; i++) wr(U_FU0 + 4'(i), 0, 64'd4, 1);
    wr(U_LRF, 0, 64'd16, 1);
    wr(U_LRF1, 0, 64'd16, 1);
    wr(U_FU0 + 0, 7, {1'b1, 31'd0, C}, 1);
    wr(U_FU0 + 2, 7, {1'b1, 31'd0, 32'd1}, 1);
    wr(U_FU0 + 3, 7, {1'b1, 31'd0, T}, 1);
  endtask

  initial begin
    cfg = '0; phase = '0; net_in_word = '0; net_in_bit = '0;
    C = 32'($urandom_range(2, 1000)); T = 32'h8000_0000;
    for (int w = 0; w < WAVES; w++) begin
      xs[w] = $urandom; ps[w] = 1'($urandom);
      ys[w] = xs[w] * C + ((w >= 2) ? xs[w-2] : 32'd0);
      cs[w] = ys[w] < T;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    build_program();
    load_program();
    en = 1;
    for (int w = 0; w < WAVES; w++) begin
      for (int p = 0; p < II; p++) begin
        phase = PHW'(p);
        net_in_word[DIR_N] = xs[w];
        net_in_bit[DIR_N]  = ps[w];
        #1;
        if (p == 3) begin
          checks += 2;
          if (to_sb_word[0] !== ys[w]) begin failures++; $display("FAIL y[%0d] %h exp %h", w, to_sb_word[0], ys[w]); end
          if (to_sb_bit[0] !== (cs[w] ^ ps[w] ^ ((w > 0) ? cs[w-1] : 1'b0))) begin
            failures++; $display("FAIL q[%0d]", w);
          end
        end
        if (p == 2 && w >= 1) begin
          checks++;
          if (to_sb_word[1] !== ys[w-1]) begin failures++; $display("FAIL read-back y[%0d] %h exp %h", w-1, to_sb_word[1], ys[w-1]); end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
