// muccra_ctrl: the central controller of the MuCCRA-D array.
//
// It broadcasts the context pointer `cp` to every PE and distributed memory,
// which reconfigure in parallel from their own context memories, so a context
// switch takes one clock cycle. What follows each context comes from the
// controller's own 64-entry context memory (muccra_pkg::seq_ctx_t): the next
// context in order, a conditional branch, or the end of the program. Branch
// conditions come from one PE at the right edge of the array (`flag`, the
// condition bit of that PE's ALU output register); a program must move the
// value it branches on into that PE, as in the document. The sequencing table,
// the start/done handshake and the branch-flag encoding are this design's
// choices; the document gives the context-pointer broadcast and the
// branch-from-the-rightmost-PE scheme.
//
// Timing: `start` for one cycle while idle loads `start_cp`; `run` is high
// from the next cycle on while contexts execute. The context at `cp` executes
// in each `run` cycle. After the halting context has executed, `run` falls
// and `done` pulses for one cycle. A branch in context k tests the flag left
// by context k-1.
module muccra_ctrl
  import muccra_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [CP_W-1:0] cfg_addr,
  input  logic [SEQ_W-1:0] cfg_data,
  input  logic            start,
  input  logic [CP_W-1:0] start_cp,
  input  logic            flag,
  output logic [CP_W-1:0] cp,
  output logic            run,
  output logic            done,
  output logic            branch_taken
);

  logic [SEQ_W-1:0] seq_raw;
  seq_ctx_t         seq;

  ctx_mem #(.W(SEQ_W), .N(CTX_N)) u_seq (
    .clk(clk), .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_data), .cp(cp), .ctx(seq_raw)
  );
  assign seq = seq_ctx_t'(seq_raw);

  assign branch_taken = run && !seq.halt && seq.br_en && (flag == seq.br_pol);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp   <= '0;
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          cp  <= start_cp;
          run <= 1'b1;
        end
      end else if (seq.halt) begin
        run  <= 1'b0;
        done <= 1'b1;
      end else if (branch_taken) begin
        cp <= seq.br_target;
      end else begin
        cp <= cp + 1'b1;
      end
    end
  end

endmodule
