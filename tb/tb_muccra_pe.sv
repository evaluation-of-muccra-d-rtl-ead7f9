// tb_muccra_pe: self-checking test of one processing element.
// Loads 64 random contexts (random operand sources, operations, register-file
// use and non-conflicting switch destinations), then executes random context
// pointers with random words on all 14 input channels. A cycle-level
// reference model kept here (its own register-file copy, output registers
// and destinations) predicts all 14 output channels and the branch flag each
// cycle. Checks the one-cycle output-register delay, idle behaviour, and that
// a hold (alu_keep) keeps the ALU output.
module tb_muccra_pe;
  import muccra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge so the asynchronous reset acts
  always #5 clk = ~clk;

  logic [CP_W-1:0]  cp, cfg_addr;
  logic             run, cfg_we, flag;
  logic [CTX_W-1:0] cfg_data;
  link_t            nb_in [4], nb_out [4];
  word_t            hd_in, vd_in, hd_out, vd_out;
  pe_ctx_t          ctxs [64];
  int checks = 0, failures = 0, n_keep = 0, n_rfw = 0, n_mul = 0;

  muccra_pe dut (.clk(clk), .rst_n(rst_n), .cp(cp), .run(run), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                 .cfg_data(cfg_data), .nb_in(nb_in), .hd_in(hd_in), .vd_in(vd_in),
                 .nb_out(nb_out), .hd_out(hd_out), .vd_out(vd_out), .flag(flag));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  word_t       m_rf [8];
  word_t       m_alu, m_smu, m_rfq;
  logic [3:0]  m_da, m_ds, m_dr;

  // operations modelled here (a subset of the ALU/SMU sets)
  alu_op_e alu_ops [6] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_MUL, ALU_XOR, ALU_LTU};
  smu_op_e smu_ops [4] = '{SMU_PASS, SMU_SLL, SMU_SRL, SMU_LDI};

  function automatic word_t src(input src_e s, input int fu, input bit is_smu);
    case (s)
      SRC_N, SRC_E, SRC_S, SRC_W:
        return (fu == 0) ? nb_in[int'(s)].alu : (fu == 1) ? nb_in[int'(s)].smu : nb_in[int'(s)].rf;
      SRC_HD: return hd_in;
      SRC_VD: return vd_in;
      default: return '0;
    endcase
  endfunction

  function automatic word_t m_alu_f(input alu_op_e o, input word_t a, input word_t b);
    logic [24:0] s;
    logic [47:0] p;
    logic [23:0] r;
    logic c, f;
    c = 0;
    case (o)
      ALU_ADD: begin s = {1'b0, a.data} + {1'b0, b.data}; r = s[23:0]; c = s[24]; end
      ALU_SUB: begin r = a.data - b.data; c = (a.data < b.data); end
      ALU_MUL: begin p = 48'($signed(a.data) * $signed(b.data)); r = p[23:0]; end
      ALU_XOR: r = a.data ^ b.data;
      ALU_LTU: r = {23'd0, a.data < b.data};
      default: r = a.data;
    endcase
    f = (o == ALU_LTU) ? r[0] : (r == 0);
    return '{carry: {f, c}, data: r};
  endfunction

  function automatic word_t m_smu_f(input smu_op_e o, input word_t x, input logic [4:0] sa, input logic [15:0] im);
    logic [23:0] r;
    case (o)
      SMU_SLL: r = (sa >= 24) ? 0 : x.data << sa;
      SMU_SRL: r = (sa >= 24) ? 0 : x.data >> sa;
      SMU_LDI: r = {{8{im[15]}}, im};
      default: r = x.data;
    endcase
    return '{carry: x.carry, data: r};
  endfunction

  function automatic word_t out_ch(input int k);
    if (k == 13) return hd_out;
    if (k == 14) return vd_out;
    case ((k - 1) % 3)
      0: return nb_out[(k - 1) / 3].alu;
      1: return nb_out[(k - 1) / 3].smu;
      default: return nb_out[(k - 1) / 3].rf;
    endcase
  endfunction

  task automatic check_outputs(input string when);
    word_t e;
    for (int k = 1; k <= 14; k++) begin
      e = (k == m_da) ? m_alu : (k == m_ds) ? m_smu : (k == m_dr) ? m_rfq : '0;
      checks++;
      if (out_ch(k) !== e) begin
        failures++;
        $display("FAIL %s ch%0d got %h exp %h", when, k, out_ch(k), e);
      end
    end
    checks++;
    if (flag !== m_alu.carry[1]) begin failures++; $display("FAIL %s flag", when); end
  endtask

  function automatic src_e rnd_src();
    return src_e'($urandom_range(0, 7));
  endfunction

  initial begin
    pe_ctx_t c;
    word_t a, b, x, ya, ys, rr, wd;
    int d0, d1, d2;
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; cp = 0; run = 0;
    foreach (nb_in[i]) nb_in[i] = '0;
    hd_in = '0; vd_in = '0;
    foreach (m_rf[i]) m_rf[i] = '0;
    m_alu = '0; m_smu = '0; m_rfq = '0; m_da = 0; m_ds = 0; m_dr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      c = '0;
      c.alu_op = alu_ops[$urandom_range(0, 5)];
      c.alu_a_sel = rnd_src(); c.alu_b_sel = rnd_src();
      c.smu_op = smu_ops[$urandom_range(0, 3)];
      c.smu_sel = rnd_src(); c.smu_sa = 5'($urandom); c.imm = 16'($urandom);
      c.rf_we = 1'($urandom); c.rf_waddr = 3'($urandom); c.rf_wsel = rnd_src(); c.rf_raddr = 3'($urandom);
      c.alu_keep = ($urandom_range(0, 7) == 0);
      d0 = $urandom_range(0, 14);
      do d1 = $urandom_range(0, 14); while (d1 != 0 && d1 == d0);
      do d2 = $urandom_range(0, 14); while (d2 != 0 && (d2 == d0 || d2 == d1));
      c.alu_dst = 4'(d0); c.smu_dst = 4'(d1); c.rf_dst = 4'(d2);
      ctxs[i] = c;
      @(negedge clk); cfg_we = 1; cfg_addr = 6'(i); cfg_data = c;
    end
    @(negedge clk); cfg_we = 0;
    check_outputs("after reset");
    run = 1;
    repeat (4000) begin
      cp = 6'($urandom);
      c = ctxs[cp];
      foreach (nb_in[i]) nb_in[i] = link_t'({$urandom, $urandom, $urandom});
      hd_in = word_t'(26'($urandom)); vd_in = word_t'(26'($urandom));
      if ($urandom_range(0, 9) == 0) run = 0; else run = 1;
      #1;
      if (run) begin
        rr = m_rf[c.rf_raddr];
        a = (c.alu_a_sel == SRC_LOC0) ? m_smu : (c.alu_a_sel == SRC_LOC1) ? rr : src(c.alu_a_sel, 0, 0);
        b = (c.alu_b_sel == SRC_LOC0) ? m_smu : (c.alu_b_sel == SRC_LOC1) ? rr : src(c.alu_b_sel, 0, 0);
        x = (c.smu_sel == SRC_LOC0) ? '0 : (c.smu_sel == SRC_LOC1) ? rr : src(c.smu_sel, 1, 1);
        ya = m_alu_f(c.alu_op, a, b);
        ys = m_smu_f(c.smu_op, x, c.smu_sa, c.imm);
        wd = (c.rf_wsel == SRC_LOC0) ? ya : (c.rf_wsel == SRC_LOC1) ? ys : src(c.rf_wsel, 2, 0);
        if (c.alu_op == ALU_MUL) n_mul++;
      end
      @(posedge clk);
      if (run) begin
        if (c.rf_we) begin m_rf[c.rf_waddr] = wd; n_rfw++; end
        if (!c.alu_keep) m_alu = ya; else n_keep++;
        m_smu = ys; m_rfq = rr;
        m_da = c.alu_dst; m_ds = c.smu_dst; m_dr = c.rf_dst;
      end else begin
        m_da = 0; m_ds = 0; m_dr = 0;
      end
      @(negedge clk);
      check_outputs($sformatf("cp=%0d run=%0d", cp, run));
    end
    if (n_keep == 0 || n_rfw == 0 || n_mul == 0) failures++;
    $display("keep=%0d rf_writes=%0d mul=%0d", n_keep, n_rfw, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
