// tb_switchbox: loads a random per-phase routing into the switchbox's
// configuration memory, then steps through the phases with random incoming
// tracks and cluster values and checks every registered outgoing track one
// cycle later, including hold and zero selections.
module tb_switchbox;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic [PHW-1:0] phase;
  logic [N_DIR-1:0][31:0] in_word, out_word;
  logic [N_DIR-1:0] in_bit, out_bit;
  logic [N_TO_SB-1:0][31:0] cl_word;
  logic [N_TO_SB-1:0] cl_bit;
  sb_cfg_t prog [MAX_II];
  int checks = 0, failures = 0;

  switchbox dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .en(1'b1), .phase(phase),
                 .in_word(in_word), .in_bit(in_bit), .cl_word(cl_word), .cl_bit(cl_bit),
                 .out_word(out_word), .out_bit(out_bit));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_DIR-1:0][31:0] ew;
    logic [N_DIR-1:0] eb;
    cfg = '0; phase = '0; in_word = '0; in_bit = '0; cl_word = '0; cl_bit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < MAX_II; p++) begin
      prog[p] = sb_cfg_t'($urandom);
      cfg = '{we: 1'b1, is_static: 1'b0, unit: U_SB, addr: PHW'(p), data: 64'(prog[p])};
      @(negedge clk);
    end
    cfg = '0;
    ew = out_word; eb = out_bit;
    for (int n = 0; n < 400; n++) begin
      phase = PHW'(n % MAX_II);
      for (int d = 0; d < N_DIR; d++) begin in_word[d] = $urandom; in_bit[d] = 1'($urandom); end
      for (int k = 0; k < N_TO_SB; k++) begin cl_word[k] = $urandom; cl_bit[k] = 1'($urandom); end
      for (int d = 0; d < N_DIR; d++) begin
        int sw, sb;
        sw = int'(prog[n % MAX_II].wsel[d]);
        sb = int'(prog[n % MAX_II].bsel[d]);
        ew[d] = (sw < 4) ? in_word[sw] : (sw < 6) ? cl_word[sw-4] : (sw == 6) ? ew[d] : 32'd0;
        eb[d] = (sb < 4) ? in_bit[sb]  : (sb < 6) ? cl_bit[sb-4]  : (sb == 6) ? eb[d] : 1'b0;
      end
      @(negedge clk);
      for (int d = 0; d < N_DIR; d++) begin
        checks++;
        if (out_word[d] !== ew[d] || out_bit[d] !== eb[d]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d dir %0d: %h/%b exp %h/%b", n, d, out_word[d], out_bit[d], ew[d], eb[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
