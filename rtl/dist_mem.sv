// dist_mem: a distributed memory of the MuCCRA-D array.
//
// 256 words of 24 bits (the document's size), two read ports and one write
// port, shared by the two PEs next to it (PE a and PE b; for the memories on
// top of the array those are the two PEs below, for the bottom ones the two
// PEs above). Each PE reaches the memory through the three channels it would
// otherwise send to a neighbour on that side, and receives the memory's
// output on all three of its input channels from that side. The memory stores
// 24 data bits only: carry bits of written words are dropped and words read
// out carry zeros.
//
// Per context, from the memory's own context memory (layout in
// muccra_pkg::mem_ctx_t; having a separate context memory is this design's
// choice):
//   * each PE may read at the address on one of its channels;
//   * in copy mode one address (from the PE chosen by copy_src) is read and
//     the word goes to both PEs, since the two reads may not use one address;
//   * one write per cycle: one PE supplies the address, the other the data.
// Reads are synchronous: the address arrives in cycle t and the word is on
// the PE's input channels in cycle t+1, matching the one-cycle hop of the PE
// output registers. A read of the address being written returns the old word.
// A host port (host_*) gives the outside access to the array while it is
// idle; a host write wins over an array write in the same cycle.
module dist_mem
  import muccra_pkg::*;
#(
  parameter int unsigned N = MEM_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CP_W-1:0]      cp,
  input  logic                 run,        // array executing: context active
  input  logic                 cfg_we,
  input  logic [CP_W-1:0]      cfg_addr,
  input  logic [MEMCTX_W-1:0]  cfg_data,
  input  link_t                in_a,       // channels from PE a
  input  link_t                in_b,       // channels from PE b
  output link_t                out_a,      // to PE a (same word on all three)
  output link_t                out_b,
  input  logic                 host_we,
  input  logic [$clog2(N)-1:0] host_addr,
  input  logic [DATA_W-1:0]    host_wdata,
  output logic [DATA_W-1:0]    host_rdata
);

  localparam int unsigned AW = $clog2(N);

  logic [MEMCTX_W-1:0] ctx_raw;
  mem_ctx_t            ctx;

  ctx_mem #(.W(MEMCTX_W), .N(CTX_N)) u_ctx (
    .clk(clk), .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_data), .cp(cp), .ctx(ctx_raw)
  );
  assign ctx = run ? mem_ctx_t'(ctx_raw) : '0;

  logic [DATA_W-1:0] mem [N];
  logic [DATA_W-1:0] rd_a_q, rd_b_q;
  logic [AW-1:0]     ra, rb, wa;
  logic [DATA_W-1:0] wd;
  logic              rea, reb, we;

  always_comb begin
    ra  = AW'(chsel(in_a, ctx.rd_ch_a));
    rb  = AW'(chsel(in_b, ctx.rd_ch_b));
    rea = ctx.rd_en_a;
    reb = ctx.rd_en_b;
    if (ctx.copy) begin
      ra  = ctx.copy_src ? AW'(chsel(in_b, ctx.rd_ch_b)) : AW'(chsel(in_a, ctx.rd_ch_a));
      rb  = ra;
      rea = 1'b1;
      reb = 1'b1;
    end
    if (ctx.wr_addr_pe) begin
      wa = AW'(chsel(in_b, ctx.wr_addr_ch));
      wd = chsel(in_a, ctx.wr_data_ch);
    end else begin
      wa = AW'(chsel(in_a, ctx.wr_addr_ch));
      wd = chsel(in_b, ctx.wr_data_ch);
    end
    we = ctx.wr_en;
    if (host_we) begin
      we = 1'b1;
      wa = host_addr;
      wd = host_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_a_q <= '0;
      rd_b_q <= '0;
    end else begin
      rd_a_q <= rea ? mem[ra] : '0;
      rd_b_q <= reb ? mem[rb] : '0;
    end
  end

  assign out_a = '{alu: mkword(rd_a_q), smu: mkword(rd_a_q), rf: mkword(rd_a_q)};
  assign out_b = '{alu: mkword(rd_b_q), smu: mkword(rd_b_q), rf: mkword(rd_b_q)};
  assign host_rdata = mem[host_addr];

  // Two PEs reading separately must not use the same address (use copy).
  a_no_same_addr: assert property (@(posedge clk) disable iff (!rst_n)
      !(run && !ctx.copy && ctx.rd_en_a && ctx.rd_en_b && ra == rb))
    else $error("dist_mem: both PEs read address %0d without copy", ra);

endmodule
