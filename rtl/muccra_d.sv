// muccra_d: the MuCCRA-D dynamically reconfigurable processor array.
//
// A 4 x 4 array of PEs joined by direct links instead of an island-style
// routing fabric, two 256 x 24-bit distributed memories above the array and
// two below it, and a central controller that broadcasts the context pointer.
//
// Links (all registered at the sending PE, so every transfer takes one cycle
// and the clock period does not depend on the application):
//   * nearest neighbours: three independent channels in each direction, one
//     per functional unit (ALU, SMU, RF) of the receiving PE;
//   * one-hop-distant PEs: one channel to the PE two columns away in the same
//     row and one to the PE two rows away in the same column;
//   * the east/west neighbour links of the edge columns wrap around the row,
//     and the one-hop-distant links are taken modulo the array size, so that
//     every PE reaches every other PE of its row in one transfer;
//   * the north links of the top row and the south links of the bottom row go
//     to the distributed memories, each memory serving two adjacent PEs.
// The document gives the neighbour channels, the one-hop-distant channels and
// the memory placement; the wrap-around and modulo wiring, and the choice of
// the two distant partners, are this design's reading of "connected to the
// other PEs in the same row and same column".
//
// Configuration: before a run, context words are written through cfg_*.
// cfg_sel is a bit mask of destinations (bits 0..15 PE row*4+col, 16..17 the
// top memories left to right, 18..19 the bottom memories, 20 the controller)
// so one word can be multicast to many elements in a cycle. Memories and the
// controller take cfg_data[15:0]. The document uses its own multicast
// configuration network for this; the mask bus stands in for it.
// Host access: host_mem_* reads and writes one distributed memory (index as in
// cfg_sel minus 16) while the array is idle; reads are combinational.
// Execution: pulse start with the first context in start_cp; done pulses
// after the halting context. Branch conditions come from PE (BR_ROW, COLS-1).
module muccra_d
  import muccra_pkg::*;
#(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned COLS   = 4,
  parameter int unsigned BR_ROW = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration
  input  logic                      cfg_we,
  input  logic [ROWS*COLS+COLS:0]   cfg_sel,
  input  logic [CP_W-1:0]           cfg_addr,
  input  logic [CTX_W-1:0]          cfg_data,
  // execution control
  input  logic                      start,
  input  logic [CP_W-1:0]           start_cp,
  output logic                      busy,
  output logic                      done,
  output logic [CP_W-1:0]           cp,
  output logic                      branch_taken,
  // host access to the distributed memories
  input  logic [$clog2(COLS)-1:0]   host_mem_sel,
  input  logic                      host_mem_we,
  input  logic [$clog2(MEM_N)-1:0]  host_mem_addr,
  input  logic [DATA_W-1:0]         host_mem_wdata,
  output logic [DATA_W-1:0]         host_mem_rdata
);

  localparam int unsigned NPE  = ROWS * COLS;
  localparam int unsigned NMEM = COLS;        // COLS/2 on top, COLS/2 below

  link_t nbo [ROWS][COLS][4];
  link_t nbi [ROWS][COLS][4];
  word_t hdo [ROWS][COLS];
  word_t vdo [ROWS][COLS];
  logic  flg [ROWS][COLS];
  link_t mem_out [NMEM][2];
  logic [DATA_W-1:0] mem_host_rd [NMEM];
  logic run;

  muccra_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we && cfg_sel[NPE+NMEM]), .cfg_addr(cfg_addr), .cfg_data(cfg_data[SEQ_W-1:0]),
    .start(start), .start_cp(start_cp), .flag(flg[BR_ROW][COLS-1]),
    .cp(cp), .run(run), .done(done), .branch_taken(branch_taken)
  );
  assign busy = run;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      localparam int CE = (c + 1) % int'(COLS);
      localparam int CW = (c + int'(COLS) - 1) % int'(COLS);
      localparam int CH = (c + int'(COLS) - 2) % int'(COLS);
      localparam int RV = (r + int'(ROWS) - 2) % int'(ROWS);

      if (r == 0) begin : g_top
        assign nbi[r][c][DIR_N] = mem_out[c / 2][c % 2];
      end else begin : g_in_n
        assign nbi[r][c][DIR_N] = nbo[r-1][c][DIR_S];
      end
      if (r == int'(ROWS) - 1) begin : g_bot
        assign nbi[r][c][DIR_S] = mem_out[int'(COLS) / 2 + c / 2][c % 2];
      end else begin : g_in_s
        assign nbi[r][c][DIR_S] = nbo[r+1][c][DIR_N];
      end
      assign nbi[r][c][DIR_E] = nbo[r][CE][DIR_W];
      assign nbi[r][c][DIR_W] = nbo[r][CW][DIR_E];

      muccra_pe u_pe (
        .clk(clk), .rst_n(rst_n), .cp(cp), .run(run),
        .cfg_we(cfg_we && cfg_sel[r*int'(COLS)+c]), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
        .nb_in(nbi[r][c]), .hd_in(hdo[r][CH]), .vd_in(vdo[RV][c]),
        .nb_out(nbo[r][c]), .hd_out(hdo[r][c]), .vd_out(vdo[r][c]),
        .flag(flg[r][c])
      );
    end
  end

  for (genvar m = 0; m < int'(NMEM); m++) begin : g_mem
    localparam bit TOP = (m < int'(COLS) / 2);
    localparam int R   = TOP ? 0 : int'(ROWS) - 1;
    localparam int CA  = 2 * (m % (int'(COLS) / 2));
    localparam dir_e D = TOP ? DIR_N : DIR_S;

    dist_mem #(.N(MEM_N)) u_mem (
      .clk(clk), .rst_n(rst_n), .cp(cp), .run(run),
      .cfg_we(cfg_we && cfg_sel[NPE+m]), .cfg_addr(cfg_addr), .cfg_data(cfg_data[MEMCTX_W-1:0]),
      .in_a(nbo[R][CA][D]), .in_b(nbo[R][CA+1][D]),
      .out_a(mem_out[m][0]), .out_b(mem_out[m][1]),
      .host_we(host_mem_we && !run && host_mem_sel == m),
      .host_addr(host_mem_addr), .host_wdata(host_mem_wdata), .host_rdata(mem_host_rd[m])
    );
  end

  assign host_mem_rdata = mem_host_rd[host_mem_sel];

endmodule
