// tb_config_mem: self-checking test of the phase-indexed configuration memory.
// Writes random words to every phase of the addressed unit, checks that writes
// to another unit are ignored, that the static word is kept apart, and that
// each phase reads back the word written for it.
module tb_config_mem;
  import cgra_pkg::*;
  localparam int unsigned W = 20;
  logic clk = 0, rst_n = 0, en = 1;
  cfg_wr_t cfg;
  logic [PHW-1:0] phase;
  logic [W-1:0] word;
  logic [4:0] stat;
  logic [W-1:0] model [MAX_II];
  int checks = 0, failures = 0;

  config_mem #(.W(W), .SW(5), .DEPTH(MAX_II), .UNIT(4'd3)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .en(en), .phase(phase), .word(word), .stat(stat));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    cfg = '0; phase = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < MAX_II; p++) begin chk(64'(word), 0, "reset"); phase = PHW'(p+1); #1; end
    @(negedge clk);
    for (int p = 0; p < MAX_II; p++) begin
      model[p] = W'($urandom);
      cfg = '{we: 1'b1, is_static: 1'b0, unit: 4'd3, addr: PHW'(p), data: 64'(model[p])};
      @(negedge clk);
      // write to another unit must not land
      cfg = '{we: 1'b1, is_static: 1'b0, unit: 4'd5, addr: PHW'(p), data: '1};
      @(negedge clk);
    end
    cfg = '{we: 1'b1, is_static: 1'b1, unit: 4'd3, addr: '0, data: 64'd21};
    @(negedge clk);
    cfg = '0;
    chk(64'(stat), 21, "static");
    for (int p = 0; p < MAX_II; p++) begin
      phase = PHW'(p);
      #1 chk(64'(word), 64'(model[p]), $sformatf("phase %0d", p));
    end
    // not running: the word reads as zero whatever the phase
    en = 0;
    for (int p = 0; p < MAX_II; p++) begin
      phase = PHW'(p);
      #1 chk(64'(word), 0, "idle word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
