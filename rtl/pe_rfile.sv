// pe_rfile: the 8-entry register file of a MuCCRA-D PE.
//
// Eight 26-bit entries (24 data bits + 2 carry bits), as in the document.
// One combinational read port and one synchronous write port; a write is
// visible to reads in the following cycle. Contents are cleared by reset
// (reset behaviour is this design's choice).
module pe_rfile
  import muccra_pkg::*;
#(
  parameter int unsigned N = RF_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  word_t                wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output word_t                rdata
);

  word_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
