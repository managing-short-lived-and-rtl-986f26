// tb_alu: random-vector test of every ALU operation against a reference
// computed in the testbench.
module tb_alu;
  import cgra_pkg::*;
  alu_op_e op;
  logic [31:0] x, y, r, er;
  logic cin, cout, ec;
  int checks = 0, failures = 0;

  alu dut (.op(op), .x(x), .y(y), .cin(cin), .r(r), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op  = alu_op_e'(n % 16);
      x   = $urandom;
      y   = (n % 7 == 0) ? x : $urandom;
      cin = 1'($urandom);
      ec  = 1'b0;
      case (n % 16)
        0:  er = x + y;
        1:  er = x - y;
        2:  er = 32'(64'(x) * 64'(y));
        3:  er = x & y;
        4:  er = x | y;
        5:  er = x ^ y;
        6:  er = x << (y % 32);
        7:  er = x >> (y % 32);
        8:  er = 32'($signed(x) >>> (y % 32));
        9:  ec = (x == y);
        10: ec = (x != y);
        11: ec = ($signed(x) < $signed(y));
        12: ec = (x < y);
        13: er = cin ? x : y;
        14: er = x;
        default: er = y;
      endcase
      if (n % 16 inside {9, 10, 11, 12}) er = 32'(ec);
      #1;
      checks++;
      if (r !== er || cout !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d x=%h y=%h r=%h/%h c=%b/%b", n % 16, x, y, r, er, cout, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
