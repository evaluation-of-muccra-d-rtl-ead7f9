// muccra_pkg: types and constants shared by the MuCCRA-D array.
//
// The datapath word is 24 data bits plus 2 carry bits, as in the MuCCRA family
// (all functional units and channels carry 24-bit data plus a 2-bit carry).
// In this design carry[0] is the arithmetic carry/borrow and carry[1] is the
// condition flag that compare instructions produce and the branch logic reads;
// that split of the two carry bits is this design's choice.
//
// A PE context word is 64 bits wide (the document's width); its field layout
// below is this design's own encoding. Output-channel numbering of the
// inner-PE switch: channel 3*dir+fu goes to neighbour `dir` (N,E,S,W) and lands
// on its functional unit `fu` (ALU,SMU,RF); channel 12 is the horizontal
// one-hop-distant channel, 13 the vertical one, 15 means "not transferred".
package muccra_pkg;

  localparam int unsigned DATA_W   = 24;   // data bits of a word
  localparam int unsigned CTX_W    = 64;   // PE context word
  localparam int unsigned CTX_N    = 64;   // contexts per context memory
  localparam int unsigned CP_W     = 6;    // context pointer width
  localparam int unsigned RF_N     = 8;    // register file entries
  localparam int unsigned MEM_N    = 256;  // distributed memory entries
  localparam int unsigned MEMCTX_W = 16;   // distributed-memory context word
  localparam int unsigned SEQ_W    = 16;   // controller context word

  typedef struct packed {
    logic [1:0]        carry;  // [1] condition flag, [0] carry/borrow
    logic [DATA_W-1:0] data;
  } word_t;

  // Three parallel channels between nearest neighbours, one per functional
  // unit of the receiving PE.
  typedef struct packed {
    word_t alu;
    word_t smu;
    word_t rf;
  } link_t;

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // Operand source for ALU and SMU, and write source for the register file.
  // ALU/SMU: codes 0..5 are the network inputs, 6 and 7 the local units.
  typedef enum logic [2:0] {
    SRC_N = 3'd0, SRC_E = 3'd1, SRC_S = 3'd2, SRC_W = 3'd3,
    SRC_HD = 3'd4, SRC_VD = 3'd5, SRC_LOC0 = 3'd6, SRC_LOC1 = 3'd7
  } src_e;
  // SRC_LOC0 = SMU output register (for ALU operands) / immediate (for SMU)
  // SRC_LOC1 = register file read port
  // For the RF write mux: SRC_LOC0 = ALU result, SRC_LOC1 = SMU result.

  typedef enum logic [3:0] {
    ALU_PASS = 4'd0,  ALU_ADD = 4'd1,  ALU_ADDC = 4'd2,  ALU_SUB = 4'd3,
    ALU_SUBB = 4'd4,  ALU_MUL = 4'd5,  ALU_MULH = 4'd6,  ALU_AND = 4'd7,
    ALU_OR   = 4'd8,  ALU_XOR = 4'd9,  ALU_ANDN = 4'd10, ALU_EQ  = 4'd11,
    ALU_LT   = 4'd12, ALU_LTU = 4'd13, ALU_MIN  = 4'd14, ALU_MAX = 4'd15
  } alu_op_e;

  typedef enum logic [2:0] {
    SMU_PASS = 3'd0, SMU_SLL = 3'd1, SMU_SRL = 3'd2, SMU_SRA = 3'd3,
    SMU_ROL  = 3'd4, SMU_MASK = 3'd5, SMU_LDI = 3'd6, SMU_LDHI = 3'd7
  } smu_op_e;

  localparam logic [3:0] DST_NONE = 4'd0;
  localparam logic [3:0] DST_HD   = 4'd13;
  localparam logic [3:0] DST_VD   = 4'd14;
  // destination code of neighbour `dir`, functional unit `fu` (0 ALU,1 SMU,2 RF)
  function automatic logic [3:0] dst_nb(input dir_e dir, input int unsigned fu);
    dst_nb = 4'(3 * int'(dir) + fu + 1);
  endfunction

  // PE context word, 64 bits, MSB first.
  typedef struct packed {
    logic [3:0]  rsvd;      // [63:60]
    logic [15:0] imm;       // [59:44] immediate for SMU LDI/LDHI/MASK
    logic [3:0]  rf_dst;    // [43:40] switch destination of RF output register
    logic [3:0]  smu_dst;   // [39:36] switch destination of SMU output register
    logic [3:0]  alu_dst;   // [35:32] switch destination of ALU output register
    logic [2:0]  rf_raddr;  // [31:29] register file read address
    src_e        rf_wsel;   // [28:26] register file write source
    logic [2:0]  rf_waddr;  // [25:23]
    logic        rf_we;     // [22]
    logic [4:0]  smu_sa;    // [21:17] shift / rotate amount
    src_e        smu_sel;   // [16:14]
    smu_op_e     smu_op;    // [13:11]
    src_e        alu_b_sel; // [10:8]
    src_e        alu_a_sel; // [7:5]
    alu_op_e     alu_op;    // [4:1]
    logic        alu_keep;  // [0] hold the ALU output register (no update)
  } pe_ctx_t;

  // Distributed-memory context word, 16 bits. PE "a" is the left one of the
  // two PEs a memory serves, PE "b" the right one. A channel select picks
  // which of the three channels (0 ALU, 1 SMU, 2 RF) of that PE's link carries
  // the address or data.
  typedef struct packed {
    logic [1:0] rsvd;       // [15:14]
    logic       rd_en_a;    // [13] read for PE a (address on PE a's channel)
    logic [1:0] rd_ch_a;    // [12:11]
    logic       rd_en_b;    // [10]
    logic [1:0] rd_ch_b;    // [9:8]
    logic       copy;       // [7] send one read result to both PEs
    logic       copy_src;   // [6] which PE supplies the copy address (0 a, 1 b)
    logic       wr_en;      // [5]
    logic       wr_addr_pe; // [4] PE giving the write address (0 a, 1 b); the other gives data
    logic [1:0] wr_addr_ch; // [3:2]
    logic [1:0] wr_data_ch; // [1:0]
  } mem_ctx_t;

  // Controller context word, 16 bits: what follows each context.
  typedef struct packed {
    logic [6:0]      rsvd;      // [15:9]
    logic            halt;      // [8] last context of the program
    logic            br_en;     // [7] conditional branch after this context
    logic            br_pol;    // [6] branch when flag == br_pol
    logic [CP_W-1:0] br_target; // [5:0]
  } seq_ctx_t;

  function automatic word_t mkword(input logic [DATA_W-1:0] d);
    mkword = '{carry: 2'b00, data: d};
  endfunction

  function automatic logic [DATA_W-1:0] chsel(input link_t l, input logic [1:0] ch);
    unique case (ch)
      2'd0:    chsel = l.alu.data;
      2'd1:    chsel = l.smu.data;
      default: chsel = l.rf.data;
    endcase
  endfunction

endpackage
