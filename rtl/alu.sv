// alu: 32-bit arithmetic and logic unit of a functional unit.
//
// Purely combinational. Takes two operands x and y, a 1-bit condition input
// cin from the control path, and an operation code; returns a word result and
// a 1-bit condition output cout. Comparisons write their outcome to cout (and
// as 0/1 to the result); OP_SEL picks x when cin is 1 and y otherwise, which
// lets the 1-bit control path steer data. The architecture specifies only an
// arithmetic/logic unit; this operation set is this design's choice.
module alu
  import cgra_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  alu_op_e      op,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] r,
  output logic         cout
);

  localparam int unsigned SHW = $clog2(W);

  always_comb begin
    r    = '0;
    cout = 1'b0;
    unique case (op)
      OP_ADD:   r = x + y;
      OP_SUB:   r = x - y;
      OP_MUL:   r = x * y;
      OP_AND:   r = x & y;
      OP_OR:    r = x | y;
      OP_XOR:   r = x ^ y;
      OP_SHL:   r = x << y[SHW-1:0];
      OP_SHR:   r = x >> y[SHW-1:0];
      OP_SRA:   r = $signed(x) >>> y[SHW-1:0];
      OP_EQ:    cout = (x == y);
      OP_NE:    cout = (x != y);
      OP_LT:    cout = ($signed(x) < $signed(y));
      OP_LTU:   cout = (x < y);
      OP_SEL:   r = cin ? x : y;
      OP_PASSX: r = x;
      OP_PASSY: r = y;
      default:  r = '0;
    endcase
    if (op inside {OP_EQ, OP_NE, OP_LT, OP_LTU}) r = {{(W-1){1'b0}}, cout};
  end

endmodule
