// tb_schedule_ctrl: checks the modulo-schedule phase counter. For several
// initiation intervals it runs a number of waves and compares phase, 'last'
// and the wave count each cycle with a reference counter, and checks that
// dropping 'run' returns the phase to 0.
module tb_schedule_ctrl;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [PHW:0] ii;
  logic [PHW-1:0] phase;
  logic last;
  logic [15:0] waves;
  int checks = 0, failures = 0;

  schedule_ctrl dut (.clk(clk), .rst_n(rst_n), .run(run), .ii(ii),
                     .phase(phase), .last(last), .waves(waves));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int iis[5] = '{1, 2, 4, 7, 16};
    ii = 5'd4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (iis[k]) begin
      int cycles;
      ii = (PHW+1)'(iis[k]);
      run = 0;
      @(negedge clk);
      chk(phase, 0, "idle phase");
      run = 1;
      cycles = 0;
      for (int c = 0; c < 5 * iis[k]; c++) begin
        chk(phase, c % iis[k], $sformatf("ii=%0d phase c=%0d", iis[k], c));
        chk(last, (c % iis[k]) == iis[k] - 1, "last");
        chk(waves, c / iis[k], "waves");
        @(negedge clk);
        cycles++;
      end
      // five complete waves took exactly 5*II cycles
      chk(waves, 5, "wave count after 5*II cycles");
    end
    run = 0;
    @(negedge clk);
    chk(phase, 0, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
