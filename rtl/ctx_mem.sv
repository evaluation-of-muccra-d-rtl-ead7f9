// ctx_mem: the context memory of a reconfigurable element.
//
// Every PE holds 64 configuration words of 64 bits (the document's size);
// the distributed memories and the controller use the same module at their
// own widths. Configuration is written through a simple write port before
// execution. During execution the broadcast context pointer selects the word,
// and the read is combinational, so a new context takes effect in the same
// cycle the pointer changes: a one-cycle context switch. The write port and
// the combinational read are this design's choices.
module ctx_mem #(
  parameter int unsigned W = 64,
  parameter int unsigned N = 64
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(N)-1:0] cp,
  output logic [W-1:0]         ctx
);

  logic [W-1:0] mem [N];

  // Start cleared so an unconfigured context is all zeros.
  initial for (int i = 0; i < int'(N); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign ctx = mem[cp];

endmodule
