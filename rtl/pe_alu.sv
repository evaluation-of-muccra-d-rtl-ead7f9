// pe_alu: the arithmetic logic unit of a MuCCRA-D processing element.
//
// Purely combinational: two 26-bit operands (24 data bits, 2 carry bits) and
// a 4-bit operation in, one 26-bit result out. Unlike the earlier island-style
// array, whose multipliers sat on the array edge, every MuCCRA-D ALU can
// multiply; MUL returns the low 24 bits and MULH the high 24 bits of the
// signed 48-bit product. The opcode set, the signedness of the multiply and
// the meaning of the two carry bits are this design's choices:
//   carry[0]  carry out of ADD/ADDC, borrow out of SUB/SUBB
//   carry[1]  condition flag: the compare result for EQ/LT/LTU, otherwise
//             "result is zero"
// ADDC and SUBB take their carry/borrow in from operand A's carry[0].
// The result is registered by the PE (every PE output has a register), so
// this unit adds no cycle of its own.
module pe_alu
  import muccra_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic signed [2*DATA_W-1:0] prod;
  logic [DATA_W:0]            sum;
  logic [DATA_W-1:0]          r;
  logic                       c;
  logic                       flag;
  logic                       is_cmp;

  assign prod = $signed(a.data) * $signed(b.data);

  always_comb begin
    sum    = '0;
    r      = '0;
    c      = 1'b0;
    flag   = 1'b0;
    is_cmp = 1'b0;
    unique case (op)
      ALU_PASS: r = a.data;
      ALU_ADD:  begin sum = {1'b0, a.data} + {1'b0, b.data};               r = sum[DATA_W-1:0]; c = sum[DATA_W]; end
      ALU_ADDC: begin sum = {1'b0, a.data} + {1'b0, b.data} + DATA_W'(a.carry[0]); r = sum[DATA_W-1:0]; c = sum[DATA_W]; end
      ALU_SUB:  begin sum = {1'b0, a.data} - {1'b0, b.data};               r = sum[DATA_W-1:0]; c = sum[DATA_W]; end
      ALU_SUBB: begin sum = {1'b0, a.data} - {1'b0, b.data} - DATA_W'(a.carry[0]); r = sum[DATA_W-1:0]; c = sum[DATA_W]; end
      ALU_MUL:  r = prod[DATA_W-1:0];
      ALU_MULH: r = prod[2*DATA_W-1:DATA_W];
      ALU_AND:  r = a.data & b.data;
      ALU_OR:   r = a.data | b.data;
      ALU_XOR:  r = a.data ^ b.data;
      ALU_ANDN: r = a.data & ~b.data;
      ALU_EQ:   begin is_cmp = 1'b1; flag = (a.data == b.data); r = DATA_W'(flag); end
      ALU_LT:   begin is_cmp = 1'b1; flag = ($signed(a.data) < $signed(b.data)); r = DATA_W'(flag); end
      ALU_LTU:  begin is_cmp = 1'b1; flag = (a.data < b.data); r = DATA_W'(flag); end
      ALU_MIN:  r = ($signed(a.data) < $signed(b.data)) ? a.data : b.data;
      ALU_MAX:  r = ($signed(a.data) < $signed(b.data)) ? b.data : a.data;
      default:  r = a.data;
    endcase
    if (!is_cmp) flag = (r == '0);
  end

  assign y = '{carry: {flag, c}, data: r};

endmodule
