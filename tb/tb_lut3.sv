// tb_lut3: checks every input combination of the 3-LUT for random truth tables.
module tb_lut3;
  logic [2:0] in;
  logic [7:0] tbl;
  logic out;
  int checks = 0, failures = 0;

  lut3 dut (.in(in), .tbl(tbl), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      tbl = (t == 0) ? 8'b1110_1000 : 8'($urandom);  // t==0: majority function
      for (int i = 0; i < 8; i++) begin
        logic exp;
        in = 3'(i);
        exp = (t == 0) ? ((in[0] + in[1] + in[2]) >= 2) : ((tbl >> i) & 1);
        #1;
        checks++;
        if (out !== exp) begin failures++; $display("FAIL tbl=%b in=%0d out=%b", tbl, i, out); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
