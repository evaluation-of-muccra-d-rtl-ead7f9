// tb_ctx_mem: self-checking test of the context memory.
// Loads random 64-bit context words into all 64 entries, then checks that
// the word selected by the context pointer appears in the same cycle
// (one-cycle context switch) for random pointer sequences.
module tb_ctx_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we;
  logic [5:0]  waddr, cp;
  logic [63:0] wdata, ctx;
  logic [63:0] shadow [64];
  int checks = 0, failures = 0;

  ctx_mem #(.W(64), .N(64)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .cp(cp), .ctx(ctx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; cp = 0;
    @(negedge clk);
    checks++;
    if (ctx !== 64'd0) begin failures++; $display("FAIL initial context not zero"); end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (500) begin
      @(negedge clk);
      cp = 6'($urandom);
      #1;
      checks++;
      if (ctx !== shadow[cp]) begin failures++; $display("FAIL cp=%0d got %h exp %h", cp, ctx, shadow[cp]); end
    end
    // rewrite one entry while another is selected
    @(negedge clk); we = 1; waddr = 6'd5; wdata = 64'h0123_4567_89AB_CDEF; shadow[5] = wdata; cp = 6'd9;
    @(negedge clk); we = 0; #1;
    checks++;
    if (ctx !== shadow[9]) begin failures++; $display("FAIL write disturbed entry 9"); end
    cp = 6'd5; #1;
    checks++;
    if (ctx !== 64'h0123_4567_89AB_CDEF) begin failures++; $display("FAIL rewrite of entry 5"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
