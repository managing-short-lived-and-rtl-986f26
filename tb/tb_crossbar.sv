// tb_crossbar: drives random inputs and random selects (including select 0
// and out-of-range selects, which must give zero) and checks every output.
module tb_crossbar;
  localparam int unsigned NIN = 11, NOUT = 15, W = 32, SELW = 4;
  logic [NIN-1:0][W-1:0]  in;
  logic [NOUT*SELW-1:0]   sel;
  logic [NOUT-1:0][W-1:0] out;
  int checks = 0, failures = 0;

  crossbar #(.NIN(NIN), .NOUT(NOUT), .W(W), .SELW(SELW)) dut (.in(in), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int s [NOUT];
      for (int i = 0; i < NIN; i++) in[i] = $urandom;
      for (int o = 0; o < NOUT; o++) begin
        s[o] = (n < 16) ? ((o + n) % 16) : int'($urandom_range(0, 15));
        sel[o*SELW +: SELW] = SELW'(s[o]);
      end
      #1;
      for (int o = 0; o < NOUT; o++) begin
        logic [W-1:0] exp;
        exp = (s[o] >= 1 && s[o] <= NIN) ? in[s[o] - 1] : '0;
        checks++;
        if (out[o] !== exp) begin failures++; $display("FAIL out%0d sel %0d", o, s[o]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
