// tb_sha1_schedule: the SHA-1 message schedule on the MuCCRA-D array at its
// default size.
//
// SHA-1 expands each 16-word block to 80 words with
//   W[t] = ROL1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16]),  t = 16..79.
// The array's words are 24 bits wide, so a 32-bit W is kept as two parts in
// the top-left memory: its low 24 bits at address t and its high 8 bits at
// 128+t. PE(0,0) works on the low parts and PE(0,1) on the high parts, the
// same program in both (only their base address differs). One t takes 14
// contexts:
//   L+0..L+4  four addresses t-3, t-8, t-14, t-16 = r0 + immediate, one per
//             context (immediate made by the SMU one context earlier)
//   L+3..L+7  the four words come back from the memory, one per context, and
//             are XORed (RF and SMU register hold the partial results)
//   L+8..L+10 the 32-bit rotate by one: each PE sends its part to the other
//             PE and extracts the bit that crosses over (low part >> 23, high
//             part >> 7); PE(0,1) forms the new low part, PE(0,0) the new
//             high part (masked to 8 bits)
//   L+11..L+13 two writes: high part (address from PE(0,1), data from
//             PE(0,0)), then low part (address from PE(0,0), data from
//             PE(0,1)); both PEs step r0; the controller branches back while
//             PE(0,3)'s iteration count is below 64
// SHA-1 is one of the benchmarks of the original architecture; this mapping,
// the split of a word into two parts and the data layout are this design's own.
// The 16 message words are random. Checks all 80 words against a reference
// schedule computed here, and the cycle count 2 + 14 * 64.
module tb_sha1_schedule;
  import muccra_pkg::*;

  localparam int NITER = 64;
  localparam int HI = 128;           // base address of the high parts
  localparam int L = 1;              // first context of the loop body
  localparam int LAST = L + 14;      // halting context
  localparam int P00 = 0, P01 = 1, P03 = 3;

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

  task automatic ldi_rf(input int p, input int a, input int r, input int v);
    pe_prog[p][a].smu_op = SMU_LDI; pe_prog[p][a].imm = 16'(v);
    pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 3'(r); pe_prog[p][a].rf_wsel = SRC_LOC1;
  endtask

  task automatic incr(input int p, input int a);   // r0 <= r0 + smu_q (smu_q = 1 set before)
    pe_prog[p][a].alu_op = ALU_ADD; pe_prog[p][a].alu_a_sel = SRC_LOC1; pe_prog[p][a].alu_b_sel = SRC_LOC0;
    pe_prog[p][a].rf_raddr = 0; pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 0;
    pe_prog[p][a].rf_wsel = SRC_LOC0;
  endtask

  // ALU op with its result written to register r (no transfer)
  task automatic alu_to_rf(input int p, input int a, input alu_op_e op, input src_e sa, input src_e sb,
                           input int rd, input int r);
    pe_prog[p][a].alu_op = op; pe_prog[p][a].alu_a_sel = sa; pe_prog[p][a].alu_b_sel = sb;
    pe_prog[p][a].rf_raddr = 3'(rd);
    pe_prog[p][a].rf_we = 1; pe_prog[p][a].rf_waddr = 3'(r); pe_prog[p][a].rf_wsel = SRC_LOC0;
  endtask

  task automatic smu(input int p, input int a, input smu_op_e op, input src_e sel, input int sa);
    pe_prog[p][a].smu_op = op; pe_prog[p][a].smu_sel = sel; pe_prog[p][a].smu_sa = 5'(sa);
  endtask

  task automatic build_program();
    int offs [4] = '{-3, -8, -14, -16};
    foreach (pe_prog[i, j]) pe_prog[i][j] = '0;
    foreach (mem_prog[i, j]) mem_prog[i][j] = '0;
    foreach (seq_prog[j]) seq_prog[j] = '0;
    ldi_rf(P00, 0, 0, 16); ldi_rf(P01, 0, 0, HI + 16); ldi_rf(P03, 0, 0, 0);
    for (int p = P00; p <= P01; p++) begin
      dir_e other = (p == P00) ? DIR_E : DIR_W;
      src_e from  = (p == P00) ? SRC_E : SRC_W;
      // addresses r0 + offset, sent north on the ALU channel
      for (int k = 0; k < 4; k++) begin
        pe_prog[p][L+k].smu_op = SMU_LDI; pe_prog[p][L+k].imm = 16'(offs[k]);
        pe_prog[p][L+k+1].alu_op = ALU_ADD; pe_prog[p][L+k+1].alu_a_sel = SRC_LOC0;
        pe_prog[p][L+k+1].alu_b_sel = SRC_LOC1; pe_prog[p][L+k+1].rf_raddr = 0;
        pe_prog[p][L+k+1].alu_dst = dst_nb(DIR_N, 0);
      end
      // XOR of the four words as they arrive (L+3 .. L+6)
      pe_prog[p][L+3].rf_we = 1; pe_prog[p][L+3].rf_waddr = 1; pe_prog[p][L+3].rf_wsel = SRC_N;
      smu(p, L+4, SMU_PASS, SRC_N, 0);                                   // W[t-8]
      alu_to_rf(p, L+5, ALU_XOR, SRC_N, SRC_LOC0, 1, 2);                 // W[t-14]^W[t-8]
      smu(p, L+5, SMU_PASS, SRC_LOC1, 0);                                // W[t-3] from r1
      alu_to_rf(p, L+6, ALU_XOR, SRC_N, SRC_LOC0, 2, 3);                 // W[t-16]^W[t-3]
      smu(p, L+6, SMU_PASS, SRC_LOC1, 0);                                // r2
      alu_to_rf(p, L+7, ALU_XOR, SRC_LOC0, SRC_LOC1, 3, 4);              // r4 = XOR of all four
      // rotate: crossing bit, exchange of the parts
      smu(p, L+8, SMU_SRL, SRC_LOC1, (p == P00) ? 23 : 7);
      pe_prog[p][L+8].rf_raddr = 4; pe_prog[p][L+8].rf_dst = dst_nb(other, 1);
      alu_to_rf(p, L+9, ALU_PASS, SRC_LOC0, SRC_LOC0, 0, 5);             // r5 = own crossing bit
      smu(p, L+9, SMU_SLL, from, 1);                                     // other part << 1
      alu_to_rf(p, L+10, ALU_OR, SRC_LOC0, SRC_LOC1, 5, 6);
      // both PEs load 1 for the address step
      pe_prog[p][L+12].smu_op = SMU_LDI; pe_prog[p][L+12].imm = 16'd1;
      incr(p, L+13);
    end
    // PE(0,0): new high part = (high << 1 | low >> 23) & 0xff, data of the first write
    smu(P00, L+11, SMU_MASK, SRC_LOC1, 0);
    pe_prog[P00][L+11].imm = 16'h00ff; pe_prog[P00][L+11].rf_raddr = 6;
    pe_prog[P00][L+11].smu_dst = dst_nb(DIR_N, 1);
    pe_prog[P00][L+12].rf_raddr = 0; pe_prog[P00][L+12].rf_dst = dst_nb(DIR_N, 2);
    // PE(0,1): new low part held in the ALU register for the second write
    pe_prog[P01][L+10].alu_dst = dst_nb(DIR_N, 0);
    for (int a = L+11; a <= L+12; a++) begin
      pe_prog[P01][a].alu_keep = 1; pe_prog[P01][a].alu_dst = dst_nb(DIR_N, 0);
    end
    pe_prog[P01][L+11].rf_raddr = 0; pe_prog[P01][L+11].rf_dst = dst_nb(DIR_N, 2);
    // memory: four dual reads, then the two writes
    for (int a = L+2; a <= L+5; a++) begin
      mem_prog[0][a].rd_en_a = 1; mem_prog[0][a].rd_en_b = 1;
    end
    mem_prog[0][L+12].wr_en = 1; mem_prog[0][L+12].wr_addr_pe = 1;
    mem_prog[0][L+12].wr_addr_ch = 2; mem_prog[0][L+12].wr_data_ch = 1;
    mem_prog[0][L+13].wr_en = 1; mem_prog[0][L+13].wr_addr_pe = 0;
    mem_prog[0][L+13].wr_addr_ch = 2; mem_prog[0][L+13].wr_data_ch = 0;
    // PE(0,3): iteration count and loop flag
    pe_prog[P03][L].smu_op = SMU_LDI; pe_prog[P03][L].imm = 16'd1;
    incr(P03, L+1);
    pe_prog[P03][L+1].smu_op = SMU_LDI; pe_prog[P03][L+1].imm = 16'(NITER);
    pe_prog[P03][L+2].alu_op = ALU_LTU; pe_prog[P03][L+2].alu_a_sel = SRC_LOC1;
    pe_prog[P03][L+2].alu_b_sel = SRC_LOC0; pe_prog[P03][L+2].rf_raddr = 0;
    for (int a = L+3; a <= L+13; a++) pe_prog[P03][a].alu_keep = 1;
    seq_prog[L+13].br_en = 1; seq_prog[L+13].br_pol = 1; seq_prog[L+13].br_target = 6'(L);
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

  task automatic host_write(input int a, input logic [23:0] d);
    @(negedge clk); host_mem_sel = 0; host_mem_we = 1; host_mem_addr = 8'(a); host_mem_wdata = d;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] w [80];
  int n_loop = 0;

  always @(posedge clk) if (branch_taken) n_loop++;

  initial begin
    int t0, cycles, expect_cycles;
    logic [31:0] got;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_cp = 0;
    host_mem_sel = 0; host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    load_program();
    for (int t = 0; t < 16; t++) begin
      w[t] = $urandom;
      if (t == 0) w[t] = 32'h8000_0001;        // both crossing bits set
      host_write(t, w[t][23:0]);
      host_write(HI + t, 24'(w[t][31:24]));
    end
    @(negedge clk); host_mem_we = 0;
    for (int t = 16; t < 80; t++) begin
      got = w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16];
      w[t] = {got[30:0], got[31]};
    end
    start = 1; start_cp = 0;
    @(negedge clk); start = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
    expect_cycles = 2 + 14 * NITER;
    chk(cycles == expect_cycles, $sformatf("cycle count %0d, expected %0d", cycles, expect_cycles));
    chk(n_loop == NITER - 1, $sformatf("loop branches %0d, expected %0d", n_loop, NITER - 1));
    for (int t = 0; t < 80; t++) begin
      host_mem_sel = 0; host_mem_addr = 8'(t); #1; got[23:0] = host_mem_rdata;
      host_mem_addr = 8'(HI + t); #1; got[31:24] = host_mem_rdata[7:0];
      chk(got == w[t] && host_mem_rdata[23:8] == '0, $sformatf("W[%0d] = %h, expected %h", t, got, w[t]));
    end
    $display("SHA-1 schedule W[16..79]: %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
