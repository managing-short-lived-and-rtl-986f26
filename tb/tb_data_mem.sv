// tb_data_mem: random writes and reads against an associative reference;
// checks the one-cycle read latency and that rdata holds while re is low.
module tb_data_mem;
  localparam int unsigned WORDS = 64;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk(clk), .rst_n(rst_n), .we(we), .re(re),
                                 .addr(addr), .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill every word
    for (int a = 0; a < WORDS; a++) begin
      we = 1; addr = 32'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 400; n++) begin
      int a;
      logic [31:0] exp;
      a = $urandom_range(0, WORDS-1);
      if ($urandom_range(0, 2) == 0) begin
        we = 1; re = 0; addr = 32'(a) | 32'h100; wdata = $urandom; model[a] = wdata;  // upper bits ignored
        @(negedge clk);
        we = 0;
      end else begin
        re = 1; addr = 32'(a); exp = model[a];
        @(negedge clk);
        re = 0;
        chk(rdata, exp, "read after one cycle");
        addr = 32'($urandom_range(0, WORDS-1));
        @(negedge clk);
        chk(rdata, exp, "rdata held while re low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
