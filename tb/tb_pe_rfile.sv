// tb_pe_rfile: self-checking test of the PE register file.
// Random writes and reads against a shadow array; checks reset clearing,
// that a write is visible from the next cycle, and that we=0 writes nothing.
module tb_pe_rfile;
  import muccra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge so the asynchronous reset acts
  always #5 clk = ~clk;

  logic       we;
  logic [2:0] waddr, raddr;
  word_t      wdata, rdata;
  word_t      shadow [8];
  int checks = 0, failures = 0;

  pe_rfile dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL reset entry %0d = %h", i, rdata); end
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = word_t'(26'($urandom));
      raddr = 3'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++; $display("FAIL read %0d got %h exp %h", raddr, rdata, shadow[raddr]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
