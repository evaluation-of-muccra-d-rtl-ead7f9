// tb_dist_mem: self-checking test of a distributed memory.
// Preloads the memory through the host port, programs four contexts
// (two independent reads, copy, write with address from PE a, write with
// address from PE b plus a read), then runs random context pointers and
// random channel values, comparing both read outputs one cycle later with a
// shadow copy of the memory. Also checks that nothing is read or written while
// the array is idle.
module tb_dist_mem;
  import muccra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge so the asynchronous reset acts
  always #5 clk = ~clk;

  logic [5:0]  cp, cfg_addr;
  logic        run, cfg_we, host_we;
  logic [15:0] cfg_data;
  link_t       in_a, in_b, out_a, out_b;
  logic [7:0]  host_addr;
  logic [23:0] host_wdata, host_rdata;
  logic [23:0] shadow [256];
  int checks = 0, failures = 0;
  int n_copy = 0, n_write = 0, n_dual = 0;

  dist_mem dut (.clk(clk), .rst_n(rst_n), .cp(cp), .run(run), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                .cfg_data(cfg_data), .in_a(in_a), .in_b(in_b), .out_a(out_a), .out_b(out_b),
                .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] pick(input link_t l, input logic [1:0] ch);
    return (ch == 0) ? l.alu.data : (ch == 1) ? l.smu.data : l.rf.data;
  endfunction

  mem_ctx_t ctxs [4];

  task automatic expect_out(input logic [23:0] ea, input logic [23:0] eb, input string what);
    checks++;
    if (out_a.alu.data !== ea || out_a.smu.data !== ea || out_a.rf.data !== ea ||
        out_b.alu.data !== eb || out_b.rf.data !== eb) begin
      failures++;
      $display("FAIL %s: got a=%h b=%h exp a=%h b=%h", what, out_a.alu.data, out_b.alu.data, ea, eb);
    end
  endtask

  initial begin
    mem_ctx_t c;
    logic [23:0] ea, eb, wa, wd;
    logic        dowr;
    run = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0; cp = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    in_a = '0; in_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // preload
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(i); host_wdata = 24'($urandom); shadow[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 256; i += 17) begin
      host_addr = 8'(i); #1; checks++;
      if (host_rdata !== shadow[i]) begin failures++; $display("FAIL host read %0d", i); end
    end
    // contexts
    ctxs[0] = '0; ctxs[0].rd_en_a = 1; ctxs[0].rd_ch_a = 0; ctxs[0].rd_en_b = 1; ctxs[0].rd_ch_b = 2;
    ctxs[1] = '0; ctxs[1].copy = 1; ctxs[1].copy_src = 1; ctxs[1].rd_ch_b = 1;
    ctxs[2] = '0; ctxs[2].wr_en = 1; ctxs[2].wr_addr_pe = 0; ctxs[2].wr_addr_ch = 1; ctxs[2].wr_data_ch = 0;
                  ctxs[2].rd_en_a = 1; ctxs[2].rd_ch_a = 1;
    ctxs[3] = '0; ctxs[3].wr_en = 1; ctxs[3].wr_addr_pe = 1; ctxs[3].wr_addr_ch = 2; ctxs[3].wr_data_ch = 0;
                  ctxs[3].rd_en_b = 1; ctxs[3].rd_ch_b = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 6'(i); cfg_data = ctxs[i];
    end
    @(negedge clk); cfg_we = 0;
    // idle: inputs must have no effect, outputs zero
    in_a = '{alu: mkword(24'd3), smu: mkword(24'd3), rf: mkword(24'd3)}; in_b = in_a; cp = 6'd2;
    @(negedge clk);
    expect_out(24'd0, 24'd0, "idle output");
    run = 1;
    repeat (3000) begin
      cp = 6'($urandom_range(0, 3));
      c = ctxs[cp];
      in_a = link_t'({$urandom, $urandom, $urandom});
      in_b = link_t'({$urandom, $urandom, $urandom});
      if (cp == 0 && pick(in_a, 0)[7:0] == pick(in_b, 2)[7:0]) in_b.rf.data[7:0] = ~in_b.rf.data[7:0];
      // expected read results (old data on read-during-write)
      ea = 0; eb = 0; dowr = 0; wa = 0; wd = 0;
      if (c.copy) begin
        ea = shadow[8'(c.copy_src ? pick(in_b, c.rd_ch_b) : pick(in_a, c.rd_ch_a))]; eb = ea; n_copy++;
      end else begin
        if (c.rd_en_a) ea = shadow[8'(pick(in_a, c.rd_ch_a))];
        if (c.rd_en_b) eb = shadow[8'(pick(in_b, c.rd_ch_b))];
        if (c.rd_en_a && c.rd_en_b) n_dual++;
      end
      if (c.wr_en) begin
        dowr = 1; n_write++;
        wa = c.wr_addr_pe ? pick(in_b, c.wr_addr_ch) : pick(in_a, c.wr_addr_ch);
        wd = c.wr_addr_pe ? pick(in_a, c.wr_data_ch) : pick(in_b, c.wr_data_ch);
      end
      @(posedge clk);
      if (dowr) shadow[8'(wa)] = wd;
      @(negedge clk);
      expect_out(ea, eb, $sformatf("cp=%0d", cp));
    end
    run = 0;
    for (int i = 0; i < 256; i++) begin
      host_addr = 8'(i); #1; checks++;
      if (host_rdata !== shadow[i]) begin failures++; $display("FAIL final content %0d", i); end
    end
    if (n_copy == 0 || n_write == 0 || n_dual == 0) failures++;
    $display("copy=%0d write=%0d dual-read=%0d", n_copy, n_write, n_dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
