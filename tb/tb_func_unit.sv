// tb_func_unit: random-configuration test of the functional unit against a
// cycle-level reference model kept in the testbench (operand selection,
// ALU, enabled input registers, feedback register, and the private register
// block seen as a logical view that shifts down one entry per wave inside the
// rotating region). Every cycle a random configuration word and random
// inputs are applied and R and cout are compared before the clock edge.
// Directed parts check that a disabled input register holds its value for
// several cycles and that a constant written above the rotating region is
// still read back after many wave steps.
module tb_func_unit;
  import cgra_pkg::*;
  localparam int unsigned RBN = 8;
  logic clk = 0, rst_n = 0;
  fu_cfg_t cfg;
  logic [3:0] rb_rot;
  logic [31:0] a, b, r;
  logic cin, cout;
  logic cst_we = 0;
  logic [2:0] cst_addr = 0;
  logic [31:0] cst_data = 0;
  // reference state
  logic [31:0] m_a, m_b, m_fb;
  logic [31:0] m_rb [RBN];
  int checks = 0, failures = 0;

  func_unit #(.W(32), .RB_ENTRIES(RBN)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .rb_rot(rb_rot),
    .cst_we(cst_we), .cst_addr(cst_addr), .cst_data(cst_data),
    .a(a), .b(b), .cin(cin), .r(r), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] alu_ref(input int op, input logic [31:0] x, y, input logic ci);
    logic [31:0] res; logic c;
    res = 0; c = 0;
    case (op)
      0: res = x + y;   1: res = x - y;   2: res = 32'(64'(x) * 64'(y));
      3: res = x & y;   4: res = x | y;   5: res = x ^ y;
      6: res = x << (y % 32);  7: res = x >> (y % 32);
      8: res = 32'($signed(x) >>> (y % 32));
      9: c = (x == y);  10: c = (x != y);
      11: c = ($signed(x) < $signed(y));  12: c = (x < y);
      13: res = ci ? x : y;  14: res = x;  default: res = y;
    endcase
    if (op >= 9 && op <= 12) res = 32'(c);
    return {c, res};
  endfunction

  function automatic logic [31:0] pick(input int s);
    case (s)
      0: return a;  1: return m_a;  2: return b;  3: return m_b;
      4: return m_fb;  5: return m_rb[cfg.rb_raddr0 % RBN];  6: return m_rb[cfg.rb_raddr1 % RBN];
      default: return 0;
    endcase
  endfunction

  // compare, clock, update the model
  task automatic cycle(input string what);
    logic [32:0] ar;
    logic [31:0] exp_r, wd;
    logic [31:0] tmp [RBN];
    int rot;
    ar = alu_ref(int'(cfg.op), pick(int'(cfg.xsel)), pick(int'(cfg.ysel)), cin);
    case (int'(cfg.out_sel))
      0: exp_r = ar[31:0];  1: exp_r = m_fb;
      2: exp_r = m_rb[cfg.rb_raddr0 % RBN];  default: exp_r = m_rb[cfg.rb_raddr1 % RBN];
    endcase
    #1;
    checks++;
    if (r !== exp_r || cout !== ar[32]) begin
      failures++;
      if (failures < 10) $display("FAIL %s: r=%h exp %h cout=%b exp %b cfg=%p", what, r, exp_r, cout, ar[32], cfg);
    end
    case (int'(cfg.rb_wsrc))
      0: wd = ar[31:0];  1: wd = a;  2: wd = b;  default: wd = m_fb;
    endcase
    @(negedge clk);
    if (cfg.a_en)  m_a  = a;
    if (cfg.b_en)  m_b  = b;
    if (cfg.fb_en) m_fb = ar[31:0];
    if (cfg.rb_we) m_rb[cfg.rb_waddr % RBN] = wd;
    rot = (rb_rot > RBN) ? RBN : int'(rb_rot);
    if (cfg.rb_wave_inc && rot > 0) begin
      for (int l = 0; l < RBN; l++) tmp[l] = m_rb[l];
      for (int l = 0; l < rot; l++) m_rb[l] = tmp[(l + 1) % rot];
    end
  endtask

  task automatic rand_cfg();
    cfg = fu_cfg_t'($bits(fu_cfg_t)'({$urandom, $urandom}));
    cfg.rb_waddr  = cfg.rb_waddr  % RBN;
    cfg.rb_raddr0 = cfg.rb_raddr0 % RBN;
    cfg.rb_raddr1 = cfg.rb_raddr1 % RBN;
    a = $urandom; b = $urandom; cin = 1'($urandom);
  endtask

  initial begin
    cfg = '0; a = 0; b = 0; cin = 0; rb_rot = 4'd6;
    m_a = 0; m_b = 0; m_fb = 0;
    for (int l = 0; l < RBN; l++) m_rb[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random operation
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) begin
        // a new rotating size is a new configuration: reset, then change it
        rst_n = 0; rb_rot = 4'd8; cfg = '0;
        #1 rst_n = 1;
        m_a = 0; m_b = 0; m_fb = 0;
        for (int l = 0; l < RBN; l++) m_rb[l] = 0;
      end
      rand_cfg();
      cycle($sformatf("random %0d", n));
    end
    // enabled input register holds A for 5 cycles while A changes
    cfg = '0; cfg.a_en = 1; a = 32'h1234_5678; cfg.op = OP_PASSX; cfg.xsel = SRC_AREG;
    cycle("load A reg");
    cfg.a_en = 0;
    for (int k = 0; k < 5; k++) begin
      a = $urandom;
      cycle("hold A reg");
      checks++;
      if (r !== 32'h1234_5678) begin failures++; $display("FAIL A reg did not hold"); end
    end
    // constant in the non-rotating region survives wave steps
    rst_n = 0; rb_rot = 4'd4; cfg = '0;
    #1 rst_n = 1;
    m_a = 0; m_b = 0; m_fb = 0;
    for (int l = 0; l < RBN; l++) m_rb[l] = 0;
    cfg = '0; cfg.rb_we = 1; cfg.rb_wsrc = WS_B; cfg.rb_waddr = 4'd6; b = 32'd1000;
    cycle("write constant");
    // configuration-time constant load into entry 7 (overrides the scheduled write)
    cfg = '0; cfg.rb_we = 1; cfg.rb_waddr = 4'd7; cst_we = 1; cst_addr = 3'd7; cst_data = 32'd77;
    #1 checks++;
    @(negedge clk);
    cst_we = 0; m_rb[7] = 32'd77;
    cfg = '0; cfg.out_sel = OUT_RB0; cfg.rb_raddr0 = 4'd7;
    #1 if (r !== 32'd77) begin failures++; $display("FAIL constant load"); end
    cfg = '0; cfg.rb_wave_inc = 1; cfg.op = OP_ADD; cfg.xsel = SRC_A; cfg.ysel = SRC_RB1; cfg.rb_raddr1 = 4'd6;
    for (int k = 0; k < 10; k++) begin
      a = 32'(k);
      cycle("constant read");
      checks++;
      if (r !== 32'(1000 + k)) begin failures++; $display("FAIL constant operand k=%0d r=%0d", k, r); end
    end
    // feedback accumulation: r = fb + A each cycle
    cfg = '0; cfg.fb_en = 1; cfg.op = OP_ADD; cfg.xsel = SRC_FB; cfg.ysel = SRC_A;
    cfg.op = OP_PASSY; a = 0; cycle("clear fb");
    cfg.op = OP_ADD;
    for (int k = 1; k <= 10; k++) begin a = 32'(k); cycle("accumulate"); end
    cfg.fb_en = 0; cfg.out_sel = OUT_FB;
    cycle("read fb");
    checks++;
    if (r !== 32'd55) begin failures++; $display("FAIL feedback sum %0d", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
