// tb_pe_alu: self-checking test of the PE ALU.
// Applies random and corner-case operands to every operation and compares
// data, carry and flag bits with a reference written here with 64-bit
// integer arithmetic.
module tb_pe_alu;
  import muccra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu_op_e op;
  word_t   a, b, y;
  int checks = 0, failures = 0;

  pe_alu dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(input logic [23:0] v);
    return longint'($signed(v));
  endfunction

  task automatic check_one(input alu_op_e o, input logic [25:0] av, input logic [25:0] bv);
    longint ua, ub, r, p;
    logic [23:0] er;
    logic ec, ef, cmp;
    op = o; a = word_t'(av); b = word_t'(bv);
    #1;
    ua = longint'(a.data); ub = longint'(b.data);
    ec = 1'b0; cmp = 1'b0; ef = 1'b0;
    case (o)
      ALU_PASS: r = ua;
      ALU_ADD:  begin r = ua + ub; ec = r[24]; end
      ALU_ADDC: begin r = ua + ub + longint'(a.carry[0]); ec = r[24]; end
      ALU_SUB:  begin r = ua - ub; ec = (ua < ub); end
      ALU_SUBB: begin r = ua - ub - longint'(a.carry[0]); ec = (ua < ub + longint'(a.carry[0])); end
      ALU_MUL:  begin p = sx(a.data) * sx(b.data); r = p; end
      ALU_MULH: begin p = sx(a.data) * sx(b.data); r = p >>> 24; end
      ALU_AND:  r = ua & ub;
      ALU_OR:   r = ua | ub;
      ALU_XOR:  r = ua ^ ub;
      ALU_ANDN: r = ua & ~ub;
      ALU_EQ:   begin cmp = 1; ef = (ua == ub); r = longint'(ef); end
      ALU_LT:   begin cmp = 1; ef = (sx(a.data) < sx(b.data)); r = longint'(ef); end
      ALU_LTU:  begin cmp = 1; ef = (ua < ub); r = longint'(ef); end
      ALU_MIN:  r = (sx(a.data) < sx(b.data)) ? ua : ub;
      ALU_MAX:  r = (sx(a.data) < sx(b.data)) ? ub : ua;
      default:  r = ua;
    endcase
    er = r[23:0];
    if (!cmp) ef = (er == 24'd0);
    checks++;
    if (y.data !== er || y.carry[1] !== ef || y.carry[0] !== ec) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%b exp %h/%b%b", o.name(), av, bv,
               y.data, y.carry, er, ef, ec);
    end
  endtask

  initial begin
    alu_op_e o;
    logic [25:0] corner [6] = '{26'h0, 26'h1, 26'hFFFFFF, 26'h800000, 26'h7FFFFF, 26'h3000001};
    for (int k = 0; k < 16; k++) begin
      o = alu_op_e'(k);
      foreach (corner[i]) foreach (corner[j]) check_one(o, corner[i], corner[j]);
      repeat (300) check_one(o, 26'($urandom), 26'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
