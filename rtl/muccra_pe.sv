// muccra_pe: one processing element of the MuCCRA-D array.
//
// A PE is a PE core (ALU with multiplier, Shift & Mask Unit, 8-entry register
// file), a 64 x 64-bit context memory and an inner-PE switch. The broadcast
// context pointer `cp` selects the context word, which sets every operand
// multiplexer, operation and switch destination for that cycle.
//
// Inputs: three channels from each nearest neighbour (N, E, S, W; one per
// functional unit of this PE) and one channel each from the horizontal and
// vertical one-hop-distant PEs. As in the document:
//   ALU operands  one of: 4 neighbours, 2 distant PEs, local SMU, local RF
//   SMU operand   one of: 4 neighbours, 2 distant PEs, local RF
//   RF write data one of: local ALU, local SMU, or a connected PE
// A distant channel can feed any of the three units.
//
// Timing: every functional-unit output is captured in an output register at
// the end of the cycle, together with the switch destination of the context
// that computed it. In the next cycle the inner-PE switch drives the stored
// word onto the chosen channel, and the receiving PE consumes it in that same
// cycle. So a value moves one PE per cycle and no combinational path crosses a
// PE boundary. The register-file output register captures the word at
// rf_raddr. A register-file write from the local ALU or SMU takes the result
// computed in the same cycle; the ALU's "local SMU" operand is the SMU output
// register (previous cycle's SMU result). While `run` is low (array idle) the
// PE does nothing: no register-file write, output registers hold, nothing is
// switched out. Those two timing details, the
// context-word layout (muccra_pkg::pe_ctx_t), the zero value for the unused
// SMU source code, and the `flag` output (condition bit of the ALU output
// register, used by the controller for branches) are this design's choices.
module muccra_pe
  import muccra_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CP_W-1:0] cp,
  input  logic            run,      // array executing; when low the PE holds its state
  // configuration write port
  input  logic            cfg_we,
  input  logic [CP_W-1:0] cfg_addr,
  input  logic [CTX_W-1:0] cfg_data,
  // direct interconnection
  input  link_t           nb_in  [4],
  input  word_t           hd_in,
  input  word_t           vd_in,
  output link_t           nb_out [4],
  output word_t           hd_out,
  output word_t           vd_out,
  output logic            flag
);

  logic [CTX_W-1:0] ctx_raw;
  pe_ctx_t          ctx;

  ctx_mem #(.W(CTX_W), .N(CTX_N)) u_ctx (
    .clk(clk), .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_data), .cp(cp), .ctx(ctx_raw)
  );
  assign ctx = run ? pe_ctx_t'(ctx_raw) : '0;

  // output registers
  word_t      alu_q, smu_q, rf_q;
  logic [3:0] alu_dst_q, smu_dst_q, rf_dst_q;

  word_t rf_rd, alu_a, alu_b, smu_x, rf_wd, alu_y, smu_y;

  function automatic word_t net_in(input src_e s, input int unsigned fu,
                                   input link_t nb [4], input word_t hd, input word_t vd);
    word_t w;
    unique case (s)
      SRC_N, SRC_E, SRC_S, SRC_W: begin
        unique case (fu)
          0:       w = nb[int'(s)].alu;
          1:       w = nb[int'(s)].smu;
          default: w = nb[int'(s)].rf;
        endcase
      end
      SRC_HD:  w = hd;
      SRC_VD:  w = vd;
      default: w = '0;
    endcase
    return w;
  endfunction

  assign alu_a = (ctx.alu_a_sel == SRC_LOC0) ? smu_q :
                 (ctx.alu_a_sel == SRC_LOC1) ? rf_rd : net_in(ctx.alu_a_sel, 0, nb_in, hd_in, vd_in);
  assign alu_b = (ctx.alu_b_sel == SRC_LOC0) ? smu_q :
                 (ctx.alu_b_sel == SRC_LOC1) ? rf_rd : net_in(ctx.alu_b_sel, 0, nb_in, hd_in, vd_in);
  assign smu_x = (ctx.smu_sel == SRC_LOC0) ? '0 :
                 (ctx.smu_sel == SRC_LOC1) ? rf_rd : net_in(ctx.smu_sel, 1, nb_in, hd_in, vd_in);
  assign rf_wd = (ctx.rf_wsel == SRC_LOC0) ? alu_y :
                 (ctx.rf_wsel == SRC_LOC1) ? smu_y : net_in(ctx.rf_wsel, 2, nb_in, hd_in, vd_in);

  pe_alu u_alu (.op(ctx.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  pe_smu u_smu (.op(ctx.smu_op), .x(smu_x), .sa(ctx.smu_sa), .imm(ctx.imm), .y(smu_y));

  pe_rfile #(.N(RF_N)) u_rf (
    .clk(clk), .rst_n(rst_n), .we(ctx.rf_we), .waddr(ctx.rf_waddr), .wdata(rf_wd),
    .raddr(ctx.rf_raddr), .rdata(rf_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alu_q     <= '0;
      smu_q     <= '0;
      rf_q      <= '0;
      alu_dst_q <= DST_NONE;
      smu_dst_q <= DST_NONE;
      rf_dst_q  <= DST_NONE;
    end else if (!run) begin
      alu_dst_q <= DST_NONE;
      smu_dst_q <= DST_NONE;
      rf_dst_q  <= DST_NONE;
    end else begin
      if (!ctx.alu_keep) alu_q <= alu_y;
      smu_q     <= smu_y;
      rf_q      <= rf_rd;
      alu_dst_q <= ctx.alu_dst;
      smu_dst_q <= ctx.smu_dst;
      rf_dst_q  <= ctx.rf_dst;
    end
  end

  inner_pe_switch u_sw (
    .clk(clk),
    .alu_q(alu_q), .alu_dst(alu_dst_q),
    .smu_q(smu_q), .smu_dst(smu_dst_q),
    .rf_q(rf_q),   .rf_dst(rf_dst_q),
    .nb_out(nb_out), .hd_out(hd_out), .vd_out(vd_out)
  );

  assign flag = alu_q.carry[1];

endmodule
