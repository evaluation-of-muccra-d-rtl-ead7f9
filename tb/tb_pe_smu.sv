// tb_pe_smu: self-checking test of the Shift & Mask Unit.
// Every operation with random operands, all shift amounts and random
// immediates, compared with a reference model written here.
module tb_pe_smu;
  import muccra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  smu_op_e     op;
  word_t       x, y;
  logic [4:0]  sa;
  logic [15:0] imm;
  int checks = 0, failures = 0;

  pe_smu dut (.op(op), .x(x), .sa(sa), .imm(imm), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] ref_smu(input smu_op_e o, input logic [23:0] v,
                                          input int s, input logic [15:0] im);
    logic [47:0] dbl;
    int rs;
    logic [23:0] se;
    se = {{8{im[15]}}, im};
    case (o)
      SMU_PASS: return v;
      SMU_SLL:  return (s >= 24) ? 24'd0 : v << s;
      SMU_SRL:  return (s >= 24) ? 24'd0 : v >> s;
      SMU_SRA:  return (s >= 24) ? {24{v[23]}} : 24'($signed(v) >>> s);
      SMU_ROL:  begin rs = s % 24; dbl = {v, v}; return dbl[47-rs -: 24]; end
      SMU_MASK: return v & se;
      SMU_LDI:  return se;
      SMU_LDHI: return {im, v[7:0]};
      default:  return v;
    endcase
  endfunction

  initial begin
    logic [23:0] e;
    for (int k = 0; k < 8; k++) begin
      for (int s = 0; s < 32; s++) begin
        repeat (20) begin
          op = smu_op_e'(k); sa = 5'(s); imm = 16'($urandom);
          x = word_t'(26'($urandom));
          #1;
          e = ref_smu(op, x.data, s, imm);
          checks++;
          if (y.data !== e || y.carry !== x.carry) begin
            failures++;
            $display("FAIL op=%s x=%h sa=%0d imm=%h got %h exp %h", op.name(), x.data, s, imm, y.data, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
