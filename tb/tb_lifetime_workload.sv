// tb_lifetime_workload: value-lifetime workload on one cluster.
//
// Loop values fall into three lifetime classes: short (a few cycles), medium
// (about II cycles) and long (several II). This test runs a loop whose
// every wave combines all three:
//   out[w] = x[w-D] + x[w-1] + K
// with x[w] arriving on the north track in wave w:
//   * x[w-D] lives D*II cycles in the large rotating register file (written
//     at logical entry D, read at logical entry 0);
//   * x[w-1] lives II cycles in FU1's private rotating block;
//   * K is a constant in FU0's private block (non-rotating region);
//   * the partial sum is kept in FU0's enabled input registers and feedback
//     register for one to two cycles.
// It runs for several II and D, including D*II = 24 cycles at II = 4,
// which is the average lifetime of the long-lived tail of values in the
// studied benchmarks, and D = 15 (60 cycles). A last run sets the large
// file's rotating size to 0, making it a plain register file: read and
// written at the same logical entry it can only return the value from one
// wave earlier, never one from D waves back, and the test checks exactly that.
// The lifetime figures come from the architecture study; the loop itself,
// its mapping and the chosen II/D values are this design's own test choices.
module tb_lifetime_workload;
  import cgra_pkg::*;
  localparam int WAVES = 40;
  logic clk = 0, rst_n = 0, en = 0;
  cfg_wr_t cfg;
  logic [PHW-1:0] phase;
  logic [N_DIR-1:0][31:0] net_in_word;
  logic [N_DIR-1:0] net_in_bit;
  logic [N_TO_SB-1:0][31:0] to_sb_word;
  logic [N_TO_SB-1:0] to_sb_bit;
  int checks = 0, failures = 0;

  cluster dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase),
    .net_in_word(net_in_word), .net_in_bit(net_in_bit),
    .to_sb_word(to_sb_word), .to_sb_bit(to_sb_bit));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] unit, input int addr, input logic [63:0] data, input logic st);
    cfg = '{we: 1'b1, is_static: st, unit: unit, addr: PHW'(addr), data: data};
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic route(inout logic [XW_NOUT*XW_SELW-1:0] v, input int sink, input int src);
    v[sink*XW_SELW +: XW_SELW] = XW_SELW'(src + 1);
  endtask

  // ii: schedule length (>= 3); d: lag in waves; plain: large file not rotating
  task automatic run_case(input int ii, input int d, input bit plain);
    fu_cfg_t  f0, f1;
    lrf_cfg_t l;
    logic [XW_NOUT*XW_SELW-1:0] xw;
    logic [31:0] xs [WAVES];
    logic [31:0] k, exp;
    int cyc;
    rst_n = 0; cfg = '0; phase = '0; en = 0;
    @(negedge clk);
    rst_n = 1;
    k = $urandom;
    for (int w = 0; w < WAVES; w++) xs[w] = $urandom;
    for (int p = 0; p < ii; p++) begin
      f0 = '0; f1 = '0; l = '0; xw = '0;
      if (p == 0) begin
        route(xw, XWD_LRF, XWS_NET + DIR_N);
        route(xw, XWD_FU + 2, XWS_NET + DIR_N);     // FU1 A
        route(xw, XWD_FU + 0, XWS_LRF);             // FU0 A
        route(xw, XWD_FU + 1, XWS_FU + 1);          // FU0 B <- FU1 R
        l.we = 1; l.waddr = plain ? 4'd5 : RFAW'(d); l.raddr = plain ? 4'd5 : 4'd0;
        f1.rb_we = 1; f1.rb_wsrc = WS_A; f1.rb_waddr = 4'd1; f1.rb_raddr0 = 4'd0; f1.out_sel = OUT_RB0;
        f0.a_en = 1; f0.b_en = 1;
      end
      if (p == 1) begin
        f0.op = OP_ADD; f0.xsel = SRC_AREG; f0.ysel = SRC_BREG; f0.fb_en = 1;
      end
      if (p == 2) begin
        f0.op = OP_ADD; f0.xsel = SRC_FB; f0.ysel = SRC_RB1; f0.rb_raddr1 = 4'd7;
        route(xw, XWD_SB + 0, XWS_FU + 0);
      end
      if (p == ii - 1) begin
        l.wave_inc = 1; f1.rb_wave_inc = 1;
      end
      wr(U_FU0 + 0, p, 64'(f0), 0);
      wr(U_FU0 + 1, p, 64'(f1), 0);
      wr(U_LRF, p, 64'(l), 0);
      wr(U_XW, p, 64'(xw), 0);
    end
    wr(U_LRF, 0, plain ? 64'd0 : 64'd16, 1);
    wr(U_FU0 + 0, 0, 64'd4, 1);
    wr(U_FU0 + 1, 0, 64'd4, 1);
    wr(U_FU0 + 0, 7, {1'b1, 31'd0, k}, 1);
    cyc = 0;
    en = 1;
    for (int w = 0; w < WAVES; w++) begin
      for (int p = 0; p < ii; p++) begin
        phase = PHW'(p);
        net_in_word[DIR_N] = xs[w];
        #1;
        if (p == 2) begin
          if (plain) exp = ((w >= 1) ? xs[w-1] : 32'd0) * 2 + k;
          else       exp = ((w >= d) ? xs[w-d] : 32'd0) + ((w >= 1) ? xs[w-1] : 32'd0) + k;
          checks++;
          if (to_sb_word[0] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL ii=%0d d=%0d plain=%0d w=%0d got %h exp %h", ii, d, plain, w, to_sb_word[0], exp);
          end
        end
        @(negedge clk);
        cyc++;
      end
    end
    checks++;
    if (cyc != WAVES * ii) failures++;
    $display("ii=%0d lag=%0d waves (%0d cycles) plain=%0d done", ii, d, d * ii, plain);
  endtask

  initial begin
    cfg = '0; phase = '0; net_in_word = '0; net_in_bit = '0;
    run_case(4, 6, 0);    // 24-cycle lifetime
    run_case(4, 2, 0);
    run_case(4, 15, 0);   // 60 cycles, the longest the 16-entry file allows
    run_case(3, 8, 0);
    run_case(7, 4, 0);
    run_case(4, 6, 1);    // plain register file
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
