// inner_pe_switch: the output switch of a MuCCRA-D PE.
//
// The three output registers of a PE (ALU, SMU, RF) each carry a destination
// code taken from the context that produced them. The switch drives 14
// output channels: three to each of the four nearest neighbours (landing on
// that neighbour's ALU, SMU or RF input respectively) and one each to the
// horizontal and vertical one-hop-distant PEs. Each output goes to exactly one
// channel (no broadcast), and the three outputs may go out at the same time
// as long as they use different channels. A channel that nothing selects
// carries zero. Two outputs naming the same channel is a configuration error
// (flagged by an assertion); the ALU then wins over the SMU, the SMU over the
// RF. Combinational; the destination codes are listed in muccra_pkg.
module inner_pe_switch
  import muccra_pkg::*;
(
  input  logic        clk,
  input  word_t       alu_q,
  input  logic [3:0]  alu_dst,
  input  word_t       smu_q,
  input  logic [3:0]  smu_dst,
  input  word_t       rf_q,
  input  logic [3:0]  rf_dst,
  output link_t       nb_out [4],   // to N, E, S, W neighbours
  output word_t       hd_out,       // to horizontal one-hop-distant PE
  output word_t       vd_out        // to vertical one-hop-distant PE
);

  word_t ch [16];

  always_comb begin
    for (int k = 0; k < 16; k++) ch[k] = '0;
    ch[rf_dst]  = rf_q;
    ch[smu_dst] = smu_q;
    ch[alu_dst] = alu_q;
  end

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      nb_out[d].alu = ch[3*d + 1];
      nb_out[d].smu = ch[3*d + 2];
      nb_out[d].rf  = ch[3*d + 3];
    end
  end

  assign hd_out = ch[DST_HD];
  assign vd_out = ch[DST_VD];

  // No two outputs may be switched onto the same channel.
  a_no_conflict: assert property (@(posedge clk)
      !((alu_dst != DST_NONE && alu_dst != 4'd15 && (alu_dst == smu_dst || alu_dst == rf_dst)) ||
        (smu_dst != DST_NONE && smu_dst != 4'd15 && smu_dst == rf_dst)))
    else $error("inner_pe_switch: two outputs routed to channel %0d/%0d/%0d", alu_dst, smu_dst, rf_dst);

endmodule
