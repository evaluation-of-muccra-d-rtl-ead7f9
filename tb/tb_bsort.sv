// tb_bsort: bubble sort on the MuCCRA-D array at its default size.
//
// Sorts NSORT signed 24-bit words in the top-left memory in place, N-1 passes
// of N-1 compare-exchange steps. Each step takes six contexts:
//   S+0  PE(0,0) / PE(0,1) send addresses j and j+1 north
//   S+1  two reads at once from the memory; PE(0,3) counts steps
//   S+2  each of the two PEs keeps its word in the SMU register and sends it
//        to the other; PE(0,3) compares the step count with N-1
//   S+3  PE(0,0) computes max, PE(0,1) min; both put their address on the RF
//        channel
//   S+4  memory writes min at j (address from PE(0,0), data from PE(0,1))
//   S+5  memory writes max at j+1 (address from PE(0,1), data from PE(0,0));
//        j increments; the controller branches back while steps remain
// The pass counter lives in PE(0,2): its compare result is sent over the
// east link to PE(0,3), the PE the controller takes branch conditions from,
// before the outer branch, as the document describes for branches.
// Checks the sorted memory against a reference sort and the cycle count
// 3 + 6N(N-1).
module tb_bsort;
  import muccra_pkg::*;

  localparam int NSORT = 16;

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pe_ctx_t  pe_prog  [16][64];
  mem_ctx_t mem_prog [4][64];
  seq_ctx_t seq_prog [64];

  localparam int O = 2;    // pass start
  localparam int S = 3;    // first context of a compare-exchange step
  localparam int LAST = 14;
  localparam int P00 = 0, P01 = 1, P02 = 2, P03 = 3;

  task automatic ldi_rf(input int p, input int a, input int r, input int v);
    pe_prog[p][a].smu_op = SMU_LDI; pe_prog[p][a].imm = 16'(v);
    pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 3'(r); pe_prog[p][a].rf_wsel = SRC_LOC1;
  endtask

  task automatic incr(input int p, input int a);   // r0 <= r0 + smu_q (smu_q = 1 set before)
    pe_prog[p][a].alu_op = ALU_ADD; pe_prog[p][a].alu_a_sel = SRC_LOC1; pe_prog[p][a].alu_b_sel = SRC_LOC0;
    pe_prog[p][a].rf_raddr = 0; pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 0;
    pe_prog[p][a].rf_wsel = SRC_LOC0;
  endtask

  task automatic build_program();
    foreach (pe_prog[i, j]) pe_prog[i][j] = '0;
    foreach (mem_prog[i, j]) mem_prog[i][j] = '0;
    foreach (seq_prog[j]) seq_prog[j] = '0;
    ldi_rf(P02, 0, 0, 0);                 // pass counter
    // pass start: j = 0 / j+1 = 1, step counter = 0
    ldi_rf(P00, O, 0, 0); ldi_rf(P01, O, 0, 1); ldi_rf(P03, O, 0, 0);
    // S+0
    foreach (pe_prog[p]) if (p == P00 || p == P01) begin
      pe_prog[p][S+0].alu_op = ALU_PASS; pe_prog[p][S+0].alu_a_sel = SRC_LOC1; pe_prog[p][S+0].rf_raddr = 0;
      pe_prog[p][S+0].alu_dst = dst_nb(DIR_N, 0);
      pe_prog[p][S+2].alu_op = ALU_PASS; pe_prog[p][S+2].alu_a_sel = SRC_N;
      pe_prog[p][S+2].smu_op = SMU_PASS; pe_prog[p][S+2].smu_sel = SRC_N;
      pe_prog[p][S+3].alu_a_sel = SRC_LOC0; pe_prog[p][S+3].alu_dst = dst_nb(DIR_N, 0);
      pe_prog[p][S+3].rf_raddr = 0; pe_prog[p][S+3].rf_dst = dst_nb(DIR_N, 2);
      pe_prog[p][S+4].smu_op = SMU_LDI; pe_prog[p][S+4].imm = 16'd1;
      incr(p, S+5);
    end
    pe_prog[P03][S+0].smu_op = SMU_LDI; pe_prog[P03][S+0].imm = 16'd1;
    mem_prog[0][S+1].rd_en_a = 1; mem_prog[0][S+1].rd_en_b = 1;
    incr(P03, S+1);
    pe_prog[P03][S+1].smu_op = SMU_LDI; pe_prog[P03][S+1].imm = 16'(NSORT - 1);
    pe_prog[P00][S+2].alu_dst = dst_nb(DIR_E, 0);
    pe_prog[P01][S+2].alu_dst = dst_nb(DIR_W, 0);
    pe_prog[P03][S+2].alu_op = ALU_LTU; pe_prog[P03][S+2].alu_a_sel = SRC_LOC1;
    pe_prog[P03][S+2].alu_b_sel = SRC_LOC0; pe_prog[P03][S+2].rf_raddr = 0;
    for (int k = S+3; k <= S+5; k++) pe_prog[P03][k].alu_keep = 1;
    pe_prog[P00][S+3].alu_op = ALU_MAX; pe_prog[P00][S+3].alu_b_sel = SRC_E;
    pe_prog[P01][S+3].alu_op = ALU_MIN; pe_prog[P01][S+3].alu_b_sel = SRC_W;
    mem_prog[0][S+4].wr_en = 1; mem_prog[0][S+4].wr_addr_pe = 0;
    mem_prog[0][S+4].wr_addr_ch = 2; mem_prog[0][S+4].wr_data_ch = 0;
    pe_prog[P00][S+4].alu_keep = 1; pe_prog[P00][S+4].alu_dst = dst_nb(DIR_N, 0);
    pe_prog[P01][S+4].rf_raddr = 0; pe_prog[P01][S+4].rf_dst = dst_nb(DIR_N, 2);
    mem_prog[0][S+5].wr_en = 1; mem_prog[0][S+5].wr_addr_pe = 1;
    mem_prog[0][S+5].wr_addr_ch = 2; mem_prog[0][S+5].wr_data_ch = 0;
    seq_prog[S+5].br_en = 1; seq_prog[S+5].br_pol = 1; seq_prog[S+5].br_target = 6'(S);
    // end of pass: PE(0,2) counts passes and sends "more passes" to PE(0,3)
    pe_prog[P02][9].smu_op = SMU_LDI; pe_prog[P02][9].imm = 16'd1;
    incr(P02, 10);
    pe_prog[P02][10].smu_op = SMU_LDI; pe_prog[P02][10].imm = 16'(NSORT - 1);
    pe_prog[P02][11].alu_op = ALU_LTU; pe_prog[P02][11].alu_a_sel = SRC_LOC1;
    pe_prog[P02][11].alu_b_sel = SRC_LOC0; pe_prog[P02][11].rf_raddr = 0;
    pe_prog[P02][11].alu_dst = dst_nb(DIR_E, 0);
    pe_prog[P03][12].alu_op = ALU_PASS; pe_prog[P03][12].alu_a_sel = SRC_W;   // flag = (word == 0)
    seq_prog[13].br_en = 1; seq_prog[13].br_pol = 0; seq_prog[13].br_target = 6'(O);
    seq_prog[LAST].halt = 1;
  endtask

  task automatic load_program();
    for (int a = 0; a <= LAST; a++) begin
      for (int p = 0; p < 21; p++) begin
        @(negedge clk); cfg_we = 1; cfg_sel = 21'(1) << p; cfg_addr = 6'(a);
        cfg_data = (p < 16) ? 64'(pe_prog[p][a]) : (p < 20) ? 64'(mem_prog[p-16][a]) : 64'(seq_prog[a]);
      end
    end
    @(negedge clk); cfg_we = 0; cfg_sel = '0;
  endtask

  logic signed [23:0] vals [NSORT];
  int n_inner = 0, n_outer = 0;

  always @(posedge clk) if (branch_taken) begin
    if (cp == 6'(S+5)) n_inner++;
    else n_outer++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t0, cycles;
    logic signed [23:0] t;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_cp = 0;
    host_mem_sel = 0; host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    load_program();
    for (int i = 0; i < NSORT; i++) begin
      vals[i] = 24'($urandom);
      if (i == 3) vals[i] = vals[1];            // a duplicate
      @(negedge clk); host_mem_sel = 0; host_mem_we = 1; host_mem_addr = 8'(i); host_mem_wdata = vals[i];
    end
    @(negedge clk); host_mem_we = 0;
    // reference: plain bubble sort, signed
    for (int p = 0; p < NSORT - 1; p++)
      for (int j = 0; j < NSORT - 1; j++)
        if (vals[j] > vals[j+1]) begin t = vals[j]; vals[j] = vals[j+1]; vals[j+1] = t; end
    start = 1; start_cp = 0;
    @(negedge clk); start = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
    chk(cycles == 3 + 6 * NSORT * (NSORT - 1), $sformatf("cycle count %0d, expected %0d", cycles, 3 + 6 * NSORT * (NSORT - 1)));
    for (int i = 0; i < NSORT; i++) begin
      host_mem_sel = 0; host_mem_addr = 8'(i); #1;
      chk(host_mem_rdata == vals[i], $sformatf("sorted[%0d] = %0d, expected %0d", i, $signed(host_mem_rdata), vals[i]));
    end
    chk(n_inner == (NSORT - 1) * (NSORT - 2), $sformatf("inner branches %0d", n_inner));
    chk(n_outer == NSORT - 2, $sformatf("outer branches %0d", n_outer));
    $display("bubble sort of %0d words: %0d cycles, %0d/%0d branches taken", NSORT, cycles, n_inner, n_outer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
