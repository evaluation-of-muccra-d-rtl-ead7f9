// tb_muccra_d: end-to-end test of the MuCCRA-D array at its default size.
//
// Runs an alpha-blend kernel, out[i] = (A[i]*alpha + B[i]*(256-alpha)) >> 8,
// written as context words for the 4 x 4 array, followed by a short epilogue.
// A[i] and B[i] live in the top-left memory (B at offset 128), results go to
// the bottom-left memory. Per element, eight contexts:
//   L+0  PE(0,0)/PE(0,1) send their addresses north; constants made by the SMU
//   L+1  top-left memory does two reads at once; address counters increment;
//        PE(0,3) increments the loop counter
//   L+2  PE(0,0) and PE(0,1) multiply the memory words by alpha / 256-alpha;
//        PE(0,3) compares counter < N (flag for the branch)
//   L+3  PE(1,0) stores one product from its north channel in its RF;
//        PE(1,1) forwards the other product west
//   L+4  PE(1,0) adds;  L+5 shifts right by 8 and sends it down two rows on
//        the vertical one-hop-distant channel
//   L+6  PE(3,0) sends data, PE(3,1) the address to the bottom-left memory
//   L+7  memory write; controller branches back to L+0 while the flag holds
// Epilogue: a copy-mode read of out[0] to both bottom-left PEs, which send it
// to PE(3,3) over the wrap-around west link and the horizontal distant link;
// PE(3,3) adds the two and the bottom-right memory stores it at address 5.
// Configuration words shared by several elements are multicast.
//
// Checks every result word, the epilogue word, the cycle count
// (2 + 8N + 5 contexts, one cycle each), and counts how often each mechanism
// was exercised; a mechanism that never happened counts as a failure.
module tb_muccra_d;
  import muccra_pkg::*;

  localparam int NPIX  = 24;
  localparam int ALPHA = 77;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge so the asynchronous reset acts
  always #5 clk = ~clk;

  logic            cfg_we, start, busy, done, branch_taken;
  logic [20:0]     cfg_sel;
  logic [5:0]      cfg_addr, start_cp, cp;
  logic [63:0]     cfg_data;
  logic [1:0]      host_mem_sel;
  logic            host_mem_we;
  logic [7:0]      host_mem_addr;
  logic [23:0]     host_mem_wdata, host_mem_rdata;

  muccra_d dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .start(start), .start_cp(start_cp), .busy(busy), .done(done), .cp(cp), .branch_taken(branch_taken),
    .host_mem_sel(host_mem_sel), .host_mem_we(host_mem_we), .host_mem_addr(host_mem_addr),
    .host_mem_wdata(host_mem_wdata), .host_mem_rdata(host_mem_rdata)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program image: 16 PEs, 4 memories, controller
  pe_ctx_t  pe_prog  [16][64];
  mem_ctx_t mem_prog [4][64];
  seq_ctx_t seq_prog [64];

  localparam int L = 2;   // first loop context
  localparam int E = 10;  // first epilogue context

  function automatic int pe(input int r, input int c);
    return r * 4 + c;
  endfunction

  task automatic build_program();
    foreach (pe_prog[i, j]) pe_prog[i][j] = '0;
    foreach (mem_prog[i, j]) mem_prog[i][j] = '0;
    foreach (seq_prog[j]) seq_prog[j] = '0;
    // ---- init: constants into register files (SMU LDI, RF written from SMU)
    pe_prog[pe(0,0)][0].smu_op = SMU_LDI; pe_prog[pe(0,0)][0].imm = 16'(ALPHA);
    pe_prog[pe(0,1)][0].smu_op = SMU_LDI; pe_prog[pe(0,1)][0].imm = 16'(256 - ALPHA);
    pe_prog[pe(0,3)][0].smu_op = SMU_LDI; pe_prog[pe(0,3)][0].imm = 16'(NPIX);
    for (int p = 0; p < 16; p++) begin
      pe_prog[p][0].rf_we = 1; pe_prog[p][0].rf_waddr = 1; pe_prog[p][0].rf_wsel = SRC_LOC1;
      pe_prog[p][1].smu_op = SMU_LDI; pe_prog[p][1].imm = 0;
      pe_prog[p][1].rf_we = 1; pe_prog[p][1].rf_waddr = 0; pe_prog[p][1].rf_wsel = SRC_LOC1;
    end
    pe_prog[pe(0,1)][1].imm = 16'd128;
    // ---- loop body: address generators PE(0,0), PE(0,1)
    foreach (pe_prog[p]) if (p == pe(0,0) || p == pe(0,1)) begin
      pe_prog[p][L+0].alu_op = ALU_PASS; pe_prog[p][L+0].alu_a_sel = SRC_LOC1; pe_prog[p][L+0].rf_raddr = 0;
      pe_prog[p][L+0].alu_dst = dst_nb(DIR_N, 0);
      pe_prog[p][L+0].smu_op = SMU_LDI; pe_prog[p][L+0].imm = 16'd1;
      pe_prog[p][L+1].alu_op = ALU_ADD; pe_prog[p][L+1].alu_a_sel = SRC_LOC1; pe_prog[p][L+1].alu_b_sel = SRC_LOC0;
      pe_prog[p][L+1].rf_raddr = 0; pe_prog[p][L+1].rf_we = 1; pe_prog[p][L+1].rf_waddr = 0;
      pe_prog[p][L+1].rf_wsel = SRC_LOC0;
      pe_prog[p][L+2].alu_op = ALU_MUL; pe_prog[p][L+2].alu_a_sel = SRC_N; pe_prog[p][L+2].alu_b_sel = SRC_LOC1;
      pe_prog[p][L+2].rf_raddr = 1;
    end
    pe_prog[pe(0,0)][L+2].alu_dst = dst_nb(DIR_S, 2);   // to PE(1,0)'s RF
    pe_prog[pe(0,1)][L+2].alu_dst = dst_nb(DIR_S, 0);   // to PE(1,1)'s ALU
    mem_prog[0][L+1].rd_en_a = 1; mem_prog[0][L+1].rd_ch_a = 0;
    mem_prog[0][L+1].rd_en_b = 1; mem_prog[0][L+1].rd_ch_b = 0;
    // loop counter and branch condition in PE(0,3)
    pe_prog[pe(0,3)][L+0].smu_op = SMU_LDI; pe_prog[pe(0,3)][L+0].imm = 16'd1;
    pe_prog[pe(0,3)][L+1].alu_op = ALU_ADD; pe_prog[pe(0,3)][L+1].alu_a_sel = SRC_LOC1;
    pe_prog[pe(0,3)][L+1].alu_b_sel = SRC_LOC0; pe_prog[pe(0,3)][L+1].rf_raddr = 0;
    pe_prog[pe(0,3)][L+1].rf_we = 1; pe_prog[pe(0,3)][L+1].rf_waddr = 0; pe_prog[pe(0,3)][L+1].rf_wsel = SRC_LOC0;
    pe_prog[pe(0,3)][L+1].smu_op = SMU_LDI; pe_prog[pe(0,3)][L+1].imm = 16'(NPIX);
    pe_prog[pe(0,3)][L+2].alu_op = ALU_LTU; pe_prog[pe(0,3)][L+2].alu_a_sel = SRC_LOC1;
    pe_prog[pe(0,3)][L+2].alu_b_sel = SRC_LOC0; pe_prog[pe(0,3)][L+2].rf_raddr = 0;
    for (int k = L+3; k <= L+7; k++) pe_prog[pe(0,3)][k].alu_keep = 1;
    // PE(1,1): forward product west
    pe_prog[pe(1,1)][L+3].alu_op = ALU_PASS; pe_prog[pe(1,1)][L+3].alu_a_sel = SRC_N;
    pe_prog[pe(1,1)][L+3].alu_dst = dst_nb(DIR_W, 0);
    // PE(1,0): store, add, shift, send two rows down
    pe_prog[pe(1,0)][L+3].rf_we = 1; pe_prog[pe(1,0)][L+3].rf_waddr = 0; pe_prog[pe(1,0)][L+3].rf_wsel = SRC_N;
    pe_prog[pe(1,0)][L+4].alu_op = ALU_ADD; pe_prog[pe(1,0)][L+4].alu_a_sel = SRC_E;
    pe_prog[pe(1,0)][L+4].alu_b_sel = SRC_LOC1; pe_prog[pe(1,0)][L+4].rf_raddr = 0;
    pe_prog[pe(1,0)][L+4].rf_we = 1; pe_prog[pe(1,0)][L+4].rf_waddr = 1; pe_prog[pe(1,0)][L+4].rf_wsel = SRC_LOC0;
    pe_prog[pe(1,0)][L+5].smu_op = SMU_SRL; pe_prog[pe(1,0)][L+5].smu_sel = SRC_LOC1;
    pe_prog[pe(1,0)][L+5].rf_raddr = 1; pe_prog[pe(1,0)][L+5].smu_sa = 5'd8;
    pe_prog[pe(1,0)][L+5].smu_dst = DST_VD;
    // PE(3,0) data, PE(3,1) address to the bottom-left memory
    pe_prog[pe(3,0)][L+6].alu_op = ALU_PASS; pe_prog[pe(3,0)][L+6].alu_a_sel = SRC_VD;
    pe_prog[pe(3,0)][L+6].alu_dst = dst_nb(DIR_S, 0);
    pe_prog[pe(3,1)][L+6].alu_op = ALU_PASS; pe_prog[pe(3,1)][L+6].alu_a_sel = SRC_LOC1;
    pe_prog[pe(3,1)][L+6].rf_raddr = 0; pe_prog[pe(3,1)][L+6].alu_dst = dst_nb(DIR_S, 0);
    pe_prog[pe(3,1)][L+6].smu_op = SMU_LDI; pe_prog[pe(3,1)][L+6].imm = 16'd1;
    pe_prog[pe(3,1)][L+7].alu_op = ALU_ADD; pe_prog[pe(3,1)][L+7].alu_a_sel = SRC_LOC1;
    pe_prog[pe(3,1)][L+7].alu_b_sel = SRC_LOC0; pe_prog[pe(3,1)][L+7].rf_raddr = 0;
    pe_prog[pe(3,1)][L+7].rf_we = 1; pe_prog[pe(3,1)][L+7].rf_waddr = 0; pe_prog[pe(3,1)][L+7].rf_wsel = SRC_LOC0;
    mem_prog[2][L+7].wr_en = 1; mem_prog[2][L+7].wr_addr_pe = 1;
    mem_prog[2][L+7].wr_addr_ch = 0; mem_prog[2][L+7].wr_data_ch = 0;
    seq_prog[L+7].br_en = 1; seq_prog[L+7].br_pol = 1; seq_prog[L+7].br_target = 6'(L);
    // ---- epilogue
    pe_prog[pe(3,0)][E+0].smu_op = SMU_LDI; pe_prog[pe(3,0)][E+0].imm = 0;
    pe_prog[pe(3,0)][E+0].smu_dst = dst_nb(DIR_S, 1);
    mem_prog[2][E+1].copy = 1; mem_prog[2][E+1].copy_src = 0; mem_prog[2][E+1].rd_ch_a = 1;
    pe_prog[pe(3,0)][E+2].alu_op = ALU_PASS; pe_prog[pe(3,0)][E+2].alu_a_sel = SRC_S;
    pe_prog[pe(3,0)][E+2].alu_dst = dst_nb(DIR_W, 0);   // wraps round to PE(3,3)
    pe_prog[pe(3,1)][E+2].alu_op = ALU_PASS; pe_prog[pe(3,1)][E+2].alu_a_sel = SRC_S;
    pe_prog[pe(3,1)][E+2].alu_dst = DST_HD;             // two columns east: PE(3,3)
    pe_prog[pe(3,3)][E+3].alu_op = ALU_ADD; pe_prog[pe(3,3)][E+3].alu_a_sel = SRC_E;
    pe_prog[pe(3,3)][E+3].alu_b_sel = SRC_HD; pe_prog[pe(3,3)][E+3].alu_dst = dst_nb(DIR_S, 0);
    pe_prog[pe(3,2)][E+3].smu_op = SMU_LDI; pe_prog[pe(3,2)][E+3].imm = 16'd5;
    pe_prog[pe(3,2)][E+3].smu_dst = dst_nb(DIR_S, 1);
    mem_prog[3][E+4].wr_en = 1; mem_prog[3][E+4].wr_addr_pe = 0;
    mem_prog[3][E+4].wr_addr_ch = 1; mem_prog[3][E+4].wr_data_ch = 0;
    seq_prog[E+4].halt = 1;
  endtask

  int n_multicast = 0;

  task automatic load_program();
    logic [63:0] v;
    logic [20:0] mask, done_mask;
    for (int a = 0; a <= E + 4; a++) begin
      done_mask = '0;
      for (int p = 0; p < 21; p++) begin
        if (done_mask[p]) continue;
        v = (p < 16) ? 64'(pe_prog[p][a]) : (p < 20) ? 64'(mem_prog[p-16][a]) : 64'(seq_prog[a]);
        mask = '0;
        // elements of the same kind with the same word share one multicast write
        for (int q = p; q < 21; q++) begin
          if ((q < 16) != (p < 16) || (q == 20) != (p == 20)) continue;
          if (((q < 16) ? 64'(pe_prog[q][a]) : (q < 20) ? 64'(mem_prog[q-16][a]) : 64'(seq_prog[a])) == v)
            mask[q] = 1'b1;
        end
        done_mask |= mask;
        if ($countones(mask) > 1) n_multicast++;
        @(negedge clk); cfg_we = 1; cfg_sel = mask; cfg_addr = 6'(a); cfg_data = v;
      end
    end
    @(negedge clk); cfg_we = 0; cfg_sel = '0;
  endtask

  logic [23:0] A [NPIX], B [NPIX], expv [NPIX];

  // mechanism counters, from the hardware
  int n_ctx = 0, n_taken = 0, n_not_taken = 0, n_dual = 0, n_copy = 0, n_mwrite = 0;
  int n_hd = 0, n_vd = 0, n_wrap = 0, n_nb = 0, n_mul = 0, n_hold = 0, n_rfnet = 0;

  always @(posedge clk) if (busy) begin
    n_ctx++;
    if (branch_taken) n_taken++;
    else if (dut.u_ctrl.seq.br_en) n_not_taken++;
    if (dut.g_mem[0].u_mem.rea && dut.g_mem[0].u_mem.reb && !dut.g_mem[0].u_mem.ctx.copy) n_dual++;
    if (dut.g_mem[2].u_mem.ctx.copy) n_copy++;
    if (dut.g_mem[2].u_mem.we || dut.g_mem[3].u_mem.we) n_mwrite++;
    if (dut.g_row[3].g_col[1].u_pe.hd_out != '0) n_hd++;
    if (dut.g_row[1].g_col[0].u_pe.vd_out != '0) n_vd++;
    if (dut.g_row[3].g_col[0].u_pe.nb_out[DIR_W] != '0) n_wrap++;
    if (dut.g_row[1].g_col[1].u_pe.nb_out[DIR_W] != '0) n_nb++;
    if (dut.g_row[0].g_col[0].u_pe.ctx.alu_op == ALU_MUL) n_mul++;
    if (dut.g_row[0].g_col[3].u_pe.ctx.alu_keep) n_hold++;
    if (dut.g_row[1].g_col[0].u_pe.ctx.rf_we && dut.g_row[1].g_col[0].u_pe.ctx.rf_wsel == SRC_N) n_rfnet++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic need(input int n, input string what);
    $display("  %-28s %0d", what, n);
    chk(n > 0, {"mechanism never exercised: ", what});
  endtask

  initial begin
    int t0, cycles;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_cp = 0;
    host_mem_sel = 0; host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    load_program();
    // input images
    for (int i = 0; i < NPIX; i++) begin
      A[i] = 24'($urandom_range(0, 255)); B[i] = 24'($urandom_range(0, 255));
      expv[i] = (A[i] * ALPHA + B[i] * (256 - ALPHA)) >> 8;
      @(negedge clk); host_mem_sel = 0; host_mem_we = 1; host_mem_addr = 8'(i);       host_mem_wdata = A[i];
      @(negedge clk); host_mem_sel = 0; host_mem_we = 1; host_mem_addr = 8'(128 + i); host_mem_wdata = B[i];
    end
    @(negedge clk); host_mem_we = 0;
    // run
    start = 1; start_cp = 0;
    @(negedge clk); start = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
    chk(cycles == 2 + 8 * NPIX + 5, $sformatf("cycle count %0d, expected %0d", cycles, 2 + 8 * NPIX + 5));
    chk(n_ctx == 2 + 8 * NPIX + 5, "contexts executed");
    // results
    for (int i = 0; i < NPIX; i++) begin
      host_mem_sel = 2; host_mem_addr = 8'(i); #1;
      chk(host_mem_rdata == expv[i], $sformatf("out[%0d] = %0d, expected %0d", i, host_mem_rdata, expv[i]));
    end
    host_mem_sel = 3; host_mem_addr = 8'd5; #1;
    chk(host_mem_rdata == 2 * expv[0], $sformatf("epilogue word %0d, expected %0d", host_mem_rdata, 2 * expv[0]));
    $display("alpha blend of %0d pixels: %0d cycles", NPIX, cycles);
    $display("mechanisms:");
    need(n_multicast, "multicast config writes");
    need(n_taken, "branch taken");
    need(n_not_taken, "branch not taken");
    need(n_dual, "memory dual read");
    need(n_copy, "memory copy read");
    need(n_mwrite, "memory write");
    need(n_nb, "neighbour transfer");
    need(n_wrap, "wrap-around transfer");
    need(n_hd, "horizontal distant transfer");
    need(n_vd, "vertical distant transfer");
    need(n_mul, "ALU multiply");
    need(n_hold, "ALU output hold");
    need(n_rfnet, "RF write from network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
