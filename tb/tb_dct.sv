// tb_dct: 8 x 8 two-dimensional DCT (as used in JPEG) on the MuCCRA-D array,
// default size.
//
// Integer coefficients C[k][n] = round(256 * s_k * cos((2n+1) k pi / 16)),
// s_0 = 1/sqrt(8), s_k = 1/2. The block X (row-major) is at addresses 0..63
// of the top-left memory and C at 64..127 of both left memories.
// Row pass:    Y[k][r] = (sum_n C[k][n] X[r][n]) >>> 8, stored transposed in
//              the bottom-left memory at 8k + r.
// Column pass: Z[k][c] = (sum_n C[k][n] Y[c][n]) >>> 8, the same program
//              mirrored to the bottom of the array, stored in the top-left
//              memory at 128 + 8k + c.
// Each output is one multiply-accumulate loop of two contexts:
//   L0  the memory reads a sample and a coefficient at once (dual read); the
//       coefficient PE multiplies the previous pair; PE(0,3) tests the count
//   L1  the sample PE forwards the sample to the coefficient PE, both send
//       their next addresses, the accumulating PE adds the product, and the
//       controller branches back to L0
// and an epilogue drains the pipeline, shifts the sum, sends it two rows over
// the vertical one-hop-distant link and writes it. Output and row counters
// live in PE(0,2) and PE(1,3); their compare results are moved to PE(0,3),
// where the controller reads branch conditions. Checks all 64 outputs
// against the same integer arithmetic done here, and the cycle count.
module tb_dct;
  import muccra_pkg::*;

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

  pe_ctx_t  pe_prog  [16][64];
  mem_ctx_t mem_prog [4][64];
  seq_ctx_t seq_prog [64];

  localparam int PASS_LEN = 17;          // contexts per pass
  localparam int LAST = 2 * PASS_LEN;    // halting context
  localparam int P02 = 2, P03 = 3, P13 = 7;

  function automatic int pe(input int r, input int c);
    return r * 4 + c;
  endfunction

  task automatic ldi_rf(input int p, input int a, input int r, input int v);
    pe_prog[p][a].smu_op = SMU_LDI; pe_prog[p][a].imm = 16'(v);
    pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 3'(r); pe_prog[p][a].rf_wsel = SRC_LOC1;
  endtask

  task automatic ldi(input int p, input int a, input int v);
    pe_prog[p][a].smu_op = SMU_LDI; pe_prog[p][a].imm = 16'(v);
  endtask

  // ALU: r <= r op smu_q
  task automatic step(input int p, input int a, input alu_op_e op, input int r = 0);
    pe_prog[p][a].alu_op = op; pe_prog[p][a].alu_a_sel = SRC_LOC1; pe_prog[p][a].alu_b_sel = SRC_LOC0;
    pe_prog[p][a].rf_raddr = 3'(r); pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 3'(r);
    pe_prog[p][a].rf_wsel = SRC_LOC0;
  endtask

  // r0 <= r1 through the SMU
  task automatic copy_r1(input int p, input int a);
    pe_prog[p][a].smu_op = SMU_PASS; pe_prog[p][a].smu_sel = SRC_LOC1; pe_prog[p][a].rf_raddr = 1;
    pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 0; pe_prog[p][a].rf_wsel = SRC_LOC1;
  endtask

  // One pass of eight 8-point DCTs.
  //   xa, ca : sample / coefficient address PEs, next to memory rm (side rd)
  //   acc    : accumulating PE, reached from ca in direction ad
  //   wa, wd : output address / data PEs, next to memory wm (side wdir);
  //            wd is two rows from acc (vertical distant link)
  //   obase  : first output address
  task automatic dct_pass(input int b, input int xa, input int ca, input int acc, input dir_e rd,
                          input dir_e ad, input int rm, input int wa, input int wd, input dir_e wdir,
                          input int wm, input int obase);
    src_e ms, as_;
    ms  = src_e'(rd);                      // memory words arrive from side rd
    as_ = src_e'(int'(ad) ^ 2);            // acc sees the product from the opposite side
    // pass init
    ldi_rf(xa, b+0, 1, 16'hFFFF);          // sample base - 1
    ldi_rf(wa, b+0, 1, obase);             // output base
    ldi_rf(P13, b+0, 0, 0);                // outer count
    // outer start
    ldi_rf(ca, b+1, 0, 63);                // coefficient address - 1
    copy_r1(wa, b+1);
    ldi_rf(P02, b+1, 0, 0);                // output count
    // output start
    copy_r1(xa, b+2);
    ldi_rf(P03, b+2, 0, 0);
    ldi_rf(acc, b+2, 0, 0);
    ldi(xa, b+3, 1); ldi(ca, b+3, 1);
    step(xa, b+4, ALU_ADD); pe_prog[xa][b+4].alu_dst = dst_nb(rd, 0);
    step(ca, b+4, ALU_ADD); pe_prog[ca][b+4].alu_dst = dst_nb(rd, 0);
    ldi(P03, b+4, 7);
    // loop L0 = b+5, L1 = b+6
    mem_prog[rm][b+5].rd_en_a = 1; mem_prog[rm][b+5].rd_en_b = 1;
    ldi(xa, b+5, 1); ldi(ca, b+5, 1);
    pe_prog[ca][b+5].alu_op = ALU_MUL; pe_prog[ca][b+5].alu_a_sel = SRC_W; pe_prog[ca][b+5].alu_b_sel = SRC_LOC0;
    pe_prog[ca][b+5].alu_dst = dst_nb(ad, 0);
    pe_prog[P03][b+5].alu_op = ALU_LTU; pe_prog[P03][b+5].alu_a_sel = SRC_LOC1;
    pe_prog[P03][b+5].alu_b_sel = SRC_LOC0; pe_prog[P03][b+5].rf_raddr = 0;
    ldi(P03, b+5, 1);
    step(xa, b+6, ALU_ADD); pe_prog[xa][b+6].alu_dst = dst_nb(rd, 0);
    pe_prog[xa][b+6].smu_op = SMU_PASS; pe_prog[xa][b+6].smu_sel = ms; pe_prog[xa][b+6].smu_dst = dst_nb(DIR_E, 0);
    step(ca, b+6, ALU_ADD); pe_prog[ca][b+6].alu_dst = dst_nb(rd, 0);
    pe_prog[ca][b+6].smu_op = SMU_PASS; pe_prog[ca][b+6].smu_sel = ms;
    step(P03, b+6, ALU_ADD); ldi(P03, b+6, 7);
    pe_prog[acc][b+6].alu_op = ALU_ADD; pe_prog[acc][b+6].alu_a_sel = as_; pe_prog[acc][b+6].alu_b_sel = SRC_LOC1;
    pe_prog[acc][b+6].rf_raddr = 0; pe_prog[acc][b+6].rf_we = 1; pe_prog[acc][b+6].rf_waddr = 0;
    pe_prog[acc][b+6].rf_wsel = SRC_LOC0;
    seq_prog[b+6].br_en = 1; seq_prog[b+6].br_pol = 1; seq_prog[b+6].br_target = 6'(b+5);
    // output epilogue b+7 .. b+11
    pe_prog[ca][b+7] = pe_prog[ca][b+5]; pe_prog[ca][b+7].smu_op = SMU_PASS; pe_prog[ca][b+7].smu_sel = SRC_N;
    ldi(P02, b+7, 1);
    pe_prog[acc][b+8] = pe_prog[acc][b+6];
    step(P02, b+8, ALU_ADD); ldi(P02, b+8, 8);
    pe_prog[acc][b+9].smu_op = SMU_SRA; pe_prog[acc][b+9].smu_sel = SRC_LOC1;
    pe_prog[acc][b+9].rf_raddr = 0; pe_prog[acc][b+9].smu_sa = 5'd8; pe_prog[acc][b+9].smu_dst = DST_VD;
    pe_prog[P02][b+9].alu_op = ALU_LTU; pe_prog[P02][b+9].alu_a_sel = SRC_LOC1;
    pe_prog[P02][b+9].alu_b_sel = SRC_LOC0; pe_prog[P02][b+9].rf_raddr = 0;
    pe_prog[P02][b+9].alu_dst = dst_nb(DIR_E, 0);
    pe_prog[wd][b+10].alu_op = ALU_PASS; pe_prog[wd][b+10].alu_a_sel = SRC_VD;
    pe_prog[wd][b+10].alu_dst = dst_nb(wdir, 0);
    pe_prog[wa][b+10].alu_op = ALU_PASS; pe_prog[wa][b+10].alu_a_sel = SRC_LOC1;
    pe_prog[wa][b+10].rf_raddr = 0; pe_prog[wa][b+10].alu_dst = dst_nb(wdir, 0);
    ldi(wa, b+10, 8);
    pe_prog[P03][b+10].alu_op = ALU_PASS; pe_prog[P03][b+10].alu_a_sel = SRC_W;
    ldi(ca, b+10, 1);
    mem_prog[wm][b+11].wr_en = 1; mem_prog[wm][b+11].wr_addr_pe = 0;
    mem_prog[wm][b+11].wr_addr_ch = 0; mem_prog[wm][b+11].wr_data_ch = 0;
    step(wa, b+11, ALU_ADD);
    step(ca, b+11, ALU_SUB);               // the loop sent one address too many
    seq_prog[b+11].br_en = 1; seq_prog[b+11].br_pol = 0; seq_prog[b+11].br_target = 6'(b+2);
    // outer epilogue b+12 .. b+16
    ldi(P13, b+12, 1); ldi(xa, b+12, 8); ldi(wa, b+12, 1);
    step(P13, b+13, ALU_ADD); ldi(P13, b+13, 8);
    step(xa, b+13, ALU_ADD, 1); step(wa, b+13, ALU_ADD, 1);
    pe_prog[P13][b+14].alu_op = ALU_LTU; pe_prog[P13][b+14].alu_a_sel = SRC_LOC1;
    pe_prog[P13][b+14].alu_b_sel = SRC_LOC0; pe_prog[P13][b+14].rf_raddr = 0;
    pe_prog[P13][b+14].alu_dst = dst_nb(DIR_N, 0);
    pe_prog[P03][b+15].alu_op = ALU_PASS; pe_prog[P03][b+15].alu_a_sel = SRC_S;
    seq_prog[b+16].br_en = 1; seq_prog[b+16].br_pol = 0; seq_prog[b+16].br_target = 6'(b+1);
  endtask

  task automatic build_program();
    foreach (pe_prog[i, j]) pe_prog[i][j] = '0;
    foreach (mem_prog[i, j]) mem_prog[i][j] = '0;
    foreach (seq_prog[j]) seq_prog[j] = '0;
    // row pass: read top-left memory through PE(0,0)/PE(0,1), accumulate in
    // PE(1,1), write bottom-left memory through PE(3,0)/PE(3,1)
    dct_pass(0, pe(0,0), pe(0,1), pe(1,1), DIR_N, DIR_S, 0, pe(3,0), pe(3,1), DIR_S, 2, 0);
    // column pass: mirrored
    dct_pass(PASS_LEN, pe(3,0), pe(3,1), pe(2,1), DIR_S, DIR_N, 2, pe(0,0), pe(0,1), DIR_N, 0, 128);
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

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_wr(input int m, input int a, input int v);
    @(negedge clk); host_mem_sel = 2'(m); host_mem_we = 1; host_mem_addr = 8'(a); host_mem_wdata = 24'(v);
  endtask

  int coef [8][8];
  int x [8][8], yr [8][8], z [8][8];
  localparam int EXP_CYCLES = 2 * (1 + 8 * (1 + 8 * (3 + 2 * 8 + 5) + 5)) + 1;

  initial begin
    int t0, cycles, acc;
    real s;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_cp = 0;
    host_mem_sel = 0; host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    load_program();
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        s = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
        coef[k][n] = $rtoi($floor(256.0 * s * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0) + 0.5));
      end
    for (int r = 0; r < 8; r++) for (int n = 0; n < 8; n++) x[r][n] = $urandom_range(0, 511) - 256;
    // reference: rows, then columns
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++) begin
        acc = 0;
        for (int n = 0; n < 8; n++) acc += coef[k][n] * x[r][n];
        yr[r][k] = acc >>> 8;
      end
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < 8; k++) begin
        acc = 0;
        for (int n = 0; n < 8; n++) acc += coef[k][n] * yr[n][c];
        z[k][c] = acc >>> 8;
      end
    for (int i = 0; i < 64; i++) begin
      host_wr(0, i, x[i / 8][i % 8]);
      host_wr(0, 64 + i, coef[i / 8][i % 8]);
      host_wr(2, 64 + i, coef[i / 8][i % 8]);
    end
    @(negedge clk); host_mem_we = 0;
    start = 1; start_cp = 0;
    @(negedge clk); start = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
    chk(cycles == EXP_CYCLES, $sformatf("cycle count %0d, expected %0d", cycles, EXP_CYCLES));
    for (int i = 0; i < 64; i++) begin
      host_mem_sel = 2; host_mem_addr = 8'(i); #1;    // row pass, transposed
      chk($signed(host_mem_rdata) == yr[i % 8][i / 8],
          $sformatf("row pass [%0d] = %0d, expected %0d", i, $signed(host_mem_rdata), yr[i % 8][i / 8]));
      host_mem_sel = 0; host_mem_addr = 8'(128 + i); #1;
      chk($signed(host_mem_rdata) == z[i / 8][i % 8],
          $sformatf("Z[%0d][%0d] = %0d, expected %0d", i / 8, i % 8, $signed(host_mem_rdata), z[i / 8][i % 8]));
    end
    $display("8x8 DCT: %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
