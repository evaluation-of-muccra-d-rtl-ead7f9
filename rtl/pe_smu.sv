// pe_smu: the Shift & Mask Unit (data manipulator) of a MuCCRA-D PE.
//
// Combinational. One 26-bit operand, a 3-bit operation, a 5-bit shift amount
// and the 16-bit immediate of the PE context in; one 26-bit word out. The
// document names the unit and its role (shifting and masking data) but not
// its operation set, which is this design's choice:
//   PASS  x                      SLL/SRL/SRA  logical/arithmetic shifts by sa
//   ROL   rotate left by sa      MASK  x & sign-extended imm
//   LDI   sign-extended imm (constant generation)
//   LDHI  {imm, x[7:0]} (builds the upper 16 bits of a 24-bit constant)
// Shift amounts of 24..31 are taken modulo 24 for ROL and saturate the
// shifts. The carry bits of the operand pass through unchanged.
module pe_smu
  import muccra_pkg::*;
(
  input  smu_op_e     op,
  input  word_t       x,
  input  logic [4:0]  sa,
  input  logic [15:0] imm,
  output word_t       y
);

  logic [DATA_W-1:0] r;
  logic [4:0]        rot;
  logic [DATA_W-1:0] simm;

  assign simm = {{(DATA_W-16){imm[15]}}, imm};
  assign rot  = (sa >= 5'(DATA_W)) ? sa - 5'(DATA_W) : sa;

  always_comb begin
    unique case (op)
      SMU_PASS: r = x.data;
      SMU_SLL:  r = x.data << sa;
      SMU_SRL:  r = x.data >> sa;
      SMU_SRA:  r = DATA_W'($signed(x.data) >>> sa);
      SMU_ROL:  r = (x.data << rot) | (x.data >> (5'(DATA_W) - rot));
      SMU_MASK: r = x.data & simm;
      SMU_LDI:  r = simm;
      SMU_LDHI: r = {imm, x.data[7:0]};
      default:  r = x.data;
    endcase
  end

  assign y = '{carry: x.carry, data: r};

endmodule
