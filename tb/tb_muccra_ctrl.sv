// tb_muccra_ctrl: self-checking test of the central controller.
// Loads a random sequencing table (random branches and polarities, one halting
// context), starts it at random entry points, drives a random branch flag,
// and follows a reference model of the context pointer cycle by cycle. Checks
// that cp advances every cycle (one-cycle context switch), that branches are
// taken exactly when flag matches, and that done pulses once after the
// halting context.
module tb_muccra_ctrl;
  import muccra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge so the asynchronous reset acts
  always #5 clk = ~clk;

  logic            cfg_we, start, flag, run, done, branch_taken;
  logic [CP_W-1:0] cfg_addr, start_cp, cp;
  logic [SEQ_W-1:0] cfg_data;
  seq_ctx_t        tbl [64];
  int checks = 0, failures = 0, n_taken = 0, n_not = 0, n_done = 0;

  muccra_ctrl dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
                   .start(start), .start_cp(start_cp), .flag(flag), .cp(cp), .run(run), .done(done),
                   .branch_taken(branch_taken));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cp=%0d)", what, cp); end
  endtask

  initial begin
    logic [CP_W-1:0] ecp;
    int steps;
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; start = 0; start_cp = 0; flag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      tbl[i] = '0;
      tbl[i].br_en = ($urandom_range(0, 3) == 0);
      tbl[i].br_pol = 1'($urandom);
      tbl[i].br_target = 6'($urandom);
      tbl[i].halt = (i == 63) || ($urandom_range(0, 15) == 0);
      @(negedge clk); cfg_we = 1; cfg_addr = 6'(i); cfg_data = tbl[i];
    end
    @(negedge clk); cfg_we = 0;
    repeat (40) begin
      @(negedge clk);
      chk(!run && !done, "idle before start");
      start = 1; start_cp = 6'($urandom);
      ecp = start_cp;
      @(negedge clk); start = 0;
      steps = 0;
      forever begin
        chk(run && cp == ecp, $sformatf("cp expected %0d", ecp));
        flag = 1'($urandom);
        #1;
        if (tbl[ecp].halt) begin
          @(negedge clk);
          chk(!run && done, "halt ends run with done");
          n_done++;
          @(negedge clk);
          chk(!done, "done is one pulse");
          break;
        end
        if (tbl[ecp].br_en && flag == tbl[ecp].br_pol) begin
          chk(branch_taken, "branch taken"); ecp = tbl[ecp].br_target; n_taken++;
        end else begin
          chk(!branch_taken, "branch not taken"); ecp = ecp + 1; if (tbl[ecp - 1].br_en) n_not++;
        end
        @(negedge clk);
        steps++;
        if (steps > 2000) begin   // infinite loop in a random table: stop it by reset
          rst_n = 0; @(negedge clk); rst_n = 1; break;
        end
      end
    end
    if (n_taken == 0 || n_not == 0 || n_done == 0) failures++;
    $display("taken=%0d not_taken=%0d programs=%0d", n_taken, n_not, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
