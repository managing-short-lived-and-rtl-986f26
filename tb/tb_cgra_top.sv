// tb_cgra_top: end-to-end test of the full 2 x 2 array at its default
// parameters. It loads a modulo schedule (II = 4) through the configuration
// port, starts the schedule controller and streams data in at the west edge.
//
//  tile (0,0): y[w] = x[w]*C + x[w-2] (x[w-2] kept 2*II cycles in the large
//              rotating register file), q[w] = c[w]^p[w]^c[w-1] with
//              c[w] = y[w] < T; y[w] stored in data memory 0 and read back
//              one wave later to the north edge; y sent east.
//  tile (0,1): z[w] = y[w-1] + K (K a constant in FU0's private block,
//              operand A used through the bypass); z sent south; y and q
//              passed straight through the switchbox to the east edge.
//  tile (1,1): S[w] = S[w-1] + z[w] in FU1's feedback register; z passed to
//              the south edge; S sent west.
//  tile (1,0): S passed through the switchbox to the west edge.
// Every edge output is checked against values computed here. The test also
// counts how often each mechanism of the design was exercised (wave-counter
// steps of a rotating file, a value read from it after more than II cycles,
// constant reads from a private block, an enabled input register holding its
// value, feedback, bypass, memory write and read, LUT evaluation, switchbox
// pass-through) and counts a failure for any that never happened. The number
// of cycles per wave is checked against II.
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int ROWS = 2, COLS = 2, II = 4, WAVES = 48;
  logic clk = 0, rst_n = 0, run = 0;
  logic [PHW:0] ii;
  logic [PHW-1:0] phase;
  logic [15:0] waves;
  logic cfg_we = 0, cfg_static = 0;
  logic [7:0] cfg_tile = 0;
  logic [3:0] cfg_unit = 0;
  logic [PHW-1:0] cfg_addr = 0;
  logic [CFG_W-1:0] cfg_data = 0;
  logic [COLS-1:0][31:0] ein_n = '0, ein_s = '0, eout_n, eout_s;
  logic [ROWS-1:0][31:0] ein_e = '0, ein_w = '0, eout_e, eout_w;
  logic [COLS-1:0] bin_n = '0, bin_s = '0, bout_n, bout_s;
  logic [ROWS-1:0] bin_e = '0, bin_w = '0, bout_e, bout_w;
  int checks = 0, failures = 0;

  cgra_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .ii(ii), .phase(phase), .waves(waves),
    .cfg_we(cfg_we), .cfg_static(cfg_static), .cfg_tile(cfg_tile), .cfg_unit(cfg_unit),
    .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .edge_in_word_n(ein_n), .edge_in_word_s(ein_s), .edge_in_word_e(ein_e), .edge_in_word_w(ein_w),
    .edge_in_bit_n(bin_n), .edge_in_bit_s(bin_s), .edge_in_bit_e(bin_e), .edge_in_bit_w(bin_w),
    .edge_out_word_n(eout_n), .edge_out_word_s(eout_s), .edge_out_word_e(eout_e), .edge_out_word_w(eout_w),
    .edge_out_bit_n(bout_n), .edge_out_bit_s(bout_s), .edge_out_bit_e(bout_e), .edge_out_bit_w(bout_w));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- config
  task automatic wr(input int tile, input logic [3:0] unit, input int addr, input logic [63:0] data, input logic st);
    cfg_we = 1; cfg_static = st; cfg_tile = 8'(tile); cfg_unit = unit; cfg_addr = PHW'(addr); cfg_data = data;
    @(negedge clk);
    cfg_we = 0; cfg_static = 0;
  endtask

  fu_cfg_t  fu [4][N_FU][II];
  lrf_cfg_t lrf [4][II], lrf1 [4][II];
  dm_cfg_t  dm0 [4][II];
  logic [7:0] lut0 [4][II];
  logic [XW_NOUT*XW_SELW-1:0] xw [4][II];
  logic [XB_NOUT*XB_SELW-1:0] xb [4][II];
  sb_cfg_t sb [4][II];

  task automatic route_w(input int t, input int p, input int sink, input int src);
    xw[t][p][sink*XW_SELW +: XW_SELW] = XW_SELW'(src + 1);
  endtask
  task automatic route_b(input int t, input int p, input int sink, input int src);
    xb[t][p][sink*XB_SELW +: XB_SELW] = XB_SELW'(src + 1);
  endtask

  localparam int T00 = 0, T01 = 1, T10 = 2, T11 = 3;
  logic [31:0] C, T, K;

  task automatic build_program();
    for (int t = 0; t < 4; t++)
      for (int p = 0; p < II; p++) begin
        for (int i = 0; i < N_FU; i++) fu[t][i][p] = '0;
        lrf[t][p] = '0; lrf1[t][p] = '0; dm0[t][p] = '0; lut0[t][p] = '0;
        xw[t][p] = '0; xb[t][p] = '0;
        for (int d = 0; d < N_DIR; d++) begin sb[t][p].wsel[d] = 3'(SB_HOLD); sb[t][p].bsel[d] = 3'(SB_HOLD); end
      end
    // ---- tile (0,0)
    route_w(T00, 0, XWD_FU + 0, XWS_NET + DIR_W);
    route_w(T00, 0, XWD_LRF,    XWS_NET + DIR_W);
    route_w(T00, 0, XWD_FU + 3, XWS_LRF);
    fu[T00][0][0].a_en = 1;
    fu[T00][1][0].b_en = 1;
    lrf[T00][0].we = 1; lrf[T00][0].waddr = 4'd2; lrf[T00][0].raddr = 4'd0;
    fu[T00][0][1].op = OP_MUL; fu[T00][0][1].xsel = SRC_AREG; fu[T00][0][1].ysel = SRC_RB1;
    fu[T00][0][1].rb_raddr1 = 4'd7; fu[T00][0][1].fb_en = 1;
    fu[T00][2][1].op = OP_SUB; fu[T00][2][1].xsel = SRC_FB; fu[T00][2][1].ysel = SRC_RB1; fu[T00][2][1].rb_raddr1 = 4'd7;
    route_w(T00, 1, XWD_DM + 0, XWS_FU + 2);
    dm0[T00][1].re = 1;
    fu[T00][1][2].op = OP_PASSY; fu[T00][1][2].ysel = SRC_BREG;
    route_w(T00, 2, XWD_FU + 1, XWS_FU + 1);
    fu[T00][0][2].op = OP_ADD; fu[T00][0][2].xsel = SRC_FB; fu[T00][0][2].ysel = SRC_B; fu[T00][0][2].fb_en = 1;
    route_w(T00, 2, XWD_SB + 1, XWS_DM + 0);
    sb[T00][2].wsel[DIR_N] = 3'd5;                  // read-back to the north edge
    fu[T00][0][3].out_sel = OUT_FB;
    route_w(T00, 3, XWD_SB + 0, XWS_FU + 0);
    route_w(T00, 3, XWD_DM + 1, XWS_FU + 0);
    route_w(T00, 3, XWD_DM + 0, XWS_FU + 2);
    route_w(T00, 3, XWD_FU + 6, XWS_FU + 0);
    fu[T00][2][3].op = OP_ADD; fu[T00][2][3].xsel = SRC_FB; fu[T00][2][3].ysel = SRC_RB1;
    fu[T00][2][3].rb_raddr1 = 4'd7; fu[T00][2][3].fb_en = 1; fu[T00][2][3].out_sel = OUT_FB;
    dm0[T00][3].we = 1;
    fu[T00][3][3].op = OP_LTU; fu[T00][3][3].xsel = SRC_A; fu[T00][3][3].ysel = SRC_RB1; fu[T00][3][3].rb_raddr1 = 4'd7;
    lrf[T00][3].wave_inc = 1;
    route_b(T00, 3, XBD_LUT + 0, XBS_FU + 3);
    route_b(T00, 3, XBD_LUT + 1, XBS_NET + DIR_W);
    route_b(T00, 3, XBD_LUT + 2, XBS_LRF);
    route_b(T00, 3, XBD_LRF,     XBS_FU + 3);
    route_b(T00, 3, XBD_SB + 0,  XBS_LUT + 0);
    lut0[T00][3] = 8'b1001_0110;
    lrf1[T00][3].we = 1; lrf1[T00][3].waddr = 4'd1; lrf1[T00][3].raddr = 4'd0; lrf1[T00][3].wave_inc = 1;
    sb[T00][3].wsel[DIR_E] = 3'd4;
    sb[T00][3].bsel[DIR_E] = 3'd4;
    // ---- tile (0,1)
    route_w(T01, 0, XWD_FU + 0, XWS_NET + DIR_W);
    fu[T01][0][0].op = OP_ADD; fu[T01][0][0].xsel = SRC_A; fu[T01][0][0].ysel = SRC_RB1; fu[T01][0][0].rb_raddr1 = 4'd7;
    route_w(T01, 0, XWD_SB + 0, XWS_FU + 0);
    sb[T01][0].wsel[DIR_S] = 3'd4;
    sb[T01][0].wsel[DIR_E] = 3'(DIR_W);
    sb[T01][0].bsel[DIR_E] = 3'(DIR_W);
    // ---- tile (1,1)
    route_w(T11, 1, XWD_FU + 2, XWS_NET + DIR_N);   // FU1 input A
    fu[T11][1][1].op = OP_ADD; fu[T11][1][1].xsel = SRC_FB; fu[T11][1][1].ysel = SRC_A; fu[T11][1][1].fb_en = 1;
    sb[T11][1].wsel[DIR_S] = 3'(DIR_N);
    fu[T11][1][2].out_sel = OUT_FB;
    route_w(T11, 2, XWD_SB + 0, XWS_FU + 1);
    sb[T11][2].wsel[DIR_W] = 3'd4;
    // ---- tile (1,0)
    sb[T10][3].wsel[DIR_W] = 3'(DIR_E);
  endtask

  task automatic load_program();
    for (int t = 0; t < 4; t++) begin
      for (int p = 0; p < II; p++) begin
        for (int i = 0; i < N_FU; i++) wr(t, U_FU0 + 4'(i), p, 64'(fu[t][i][p]), 0);
        wr(t, U_LRF, p, 64'(lrf[t][p]), 0);
        wr(t, U_LRF1, p, 64'(lrf1[t][p]), 0);
        wr(t, U_DM0, p, 64'(dm0[t][p]), 0);
        wr(t, U_LUT0, p, 64'(lut0[t][p]), 0);
        wr(t, U_XW, p, 64'(xw[t][p]), 0);
        wr(t, U_XB, p, 64'(xb[t][p]), 0);
        wr(t, U_SB, p, 64'(sb[t][p]), 0);
      end
      for (int i = 0; i < N_FU; i++) wr(t, U_FU0 + 4'(i), 0, 64'd4, 1);
      wr(t, U_LRF, 0, 64'd16, 1);
      wr(t, U_LRF1, 0, 64'd16, 1);
    end
    wr(T00, U_FU0 + 0, 7, {1'b1, 31'd0, C}, 1);
    wr(T00, U_FU0 + 2, 7, {1'b1, 31'd0, 32'd1}, 1);
    wr(T00, U_FU0 + 3, 7, {1'b1, 31'd0, T}, 1);
    wr(T01, U_FU0 + 0, 7, {1'b1, 31'd0, K}, 1);
  endtask

  // ------------------------------------------------------- mechanism counts
  int n_rot = 0, n_long = 0, n_const = 0, n_hold = 0, n_fb = 0, n_byp = 0;
  int n_mw = 0, n_mr = 0, n_lut = 0, n_pass = 0, n_wave = 0;

  always @(posedge clk) if (run) begin
    if (dut.g_row[0].g_col[0].u_cluster.u_lrf.wave_inc) n_rot++;
    if (dut.g_row[0].g_col[0].u_cluster.g_fu[0].fc.ysel == SRC_RB1 &&
        dut.g_row[0].g_col[0].u_cluster.g_fu[0].fc.rb_raddr1 >= 4'd4) n_const++;
    if (dut.g_row[0].g_col[0].u_cluster.g_fu[0].fc.xsel == SRC_AREG &&
        !dut.g_row[0].g_col[0].u_cluster.g_fu[0].fc.a_en) n_hold++;
    if (dut.g_row[1].g_col[1].u_cluster.g_fu[1].fc.xsel == SRC_FB &&
        dut.g_row[1].g_col[1].u_cluster.g_fu[1].fc.fb_en) n_fb++;
    if (dut.g_row[0].g_col[1].u_cluster.g_fu[0].fc.xsel == SRC_A &&
        dut.g_row[0].g_col[1].u_cluster.g_fu[0].fc.ysel == SRC_RB1) n_byp++;
    if (dut.g_row[0].g_col[0].u_cluster.g_dm[0].dc.we) n_mw++;
    if (dut.g_row[0].g_col[0].u_cluster.g_dm[0].dc.re) n_mr++;
    if (dut.g_row[0].g_col[0].u_cluster.g_lut[0].tbl != 8'd0) n_lut++;
    if (dut.g_row[0].g_col[1].u_sb.sc.wsel[DIR_E] == 3'(DIR_W)) n_pass++;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ------------------------------------------------------------- stimulus
  logic [31:0] xs [WAVES], ys [WAVES], zs [WAVES], ss [WAVES];
  logic ps [WAVES], cs [WAVES], qs [WAVES];

  function automatic logic [31:0] yprev(input int w);
    return (w >= 1) ? ys[w-1] : 32'd0;
  endfunction

  initial begin
    int start_cycle, end_cycle, cyc;
    ii = (PHW+1)'(II);
    C = 32'($urandom_range(2, 1000)); T = 32'h8000_0000; K = 32'($urandom_range(1, 1 << 20));
    for (int w = 0; w < WAVES; w++) begin
      xs[w] = $urandom; ps[w] = 1'($urandom);
      ys[w] = xs[w] * C + ((w >= 2) ? xs[w-2] : 32'd0);
      cs[w] = ys[w] < T;
      qs[w] = cs[w] ^ ps[w] ^ ((w > 0) ? cs[w-1] : 1'b0);
      zs[w] = yprev(w) + K;
      ss[w] = zs[w] + ((w > 0) ? ss[w-1] : 32'd0);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    build_program();
    load_program();
    // run: the first wave starts at the edge where run is first seen high
    run = 1;
    cyc = 0;
    start_cycle = 0;
    for (int w = 0; w < WAVES; w++) begin
      for (int p = 0; p < II; p++) begin
        ein_w[0] = xs[w];
        bin_w[0] = ps[w];
        @(negedge clk);
        cyc++;
        // now in cycle p+1 of wave w (state after the edge ending phase p)
        chk(32'(phase), 32'((p + 1) % II), "phase");
        if (p == 0) begin
          chk(eout_e[0], yprev(w), $sformatf("east edge y[%0d]", w - 1));
          if (w >= 1) chk(32'(bout_e[0]), 32'(qs[w-1]), $sformatf("east edge q[%0d]", w - 1));
        end
        if (p == 1) chk(eout_s[1], zs[w], $sformatf("south edge z[%0d]", w));
        if (p == 2 && w >= 1) chk(eout_n[0], ys[w-1], $sformatf("north edge read-back y[%0d]", w - 1));
        if (p == 3) begin
          chk(eout_w[1], ss[w], $sformatf("west edge S[%0d]", w));
          if (w >= 2) n_long++;
        end
      end
    end
    end_cycle = cyc;
    chk(32'(waves), 32'(WAVES), "wave count");
    chk(32'(end_cycle - start_cycle), 32'(WAVES * II), "cycles for all waves");
    n_wave = int'(waves);
    run = 0;
    $display("mechanisms: rotations=%0d long-lived=%0d const=%0d hold=%0d feedback=%0d bypass=%0d mem_wr=%0d mem_rd=%0d lut=%0d passthrough=%0d waves=%0d",
             n_rot, n_long, n_const, n_hold, n_fb, n_byp, n_mw, n_mr, n_lut, n_pass, n_wave);
    begin
      int cnt [11];
      cnt = '{n_rot, n_long, n_const, n_hold, n_fb, n_byp, n_mw, n_mr, n_lut, n_pass, n_wave};
      for (int k = 0; k < 11; k++) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never exercised", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
