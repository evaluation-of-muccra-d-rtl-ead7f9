// tb_inner_pe_switch: self-checking test of the inner-PE switch.
// For random non-conflicting destination triples (including "none"), checks
// that each of the 14 channels carries exactly the output routed to it and
// zero otherwise.
module tb_inner_pe_switch;
  import muccra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t      alu_q, smu_q, rf_q, hd_out, vd_out;
  logic [3:0] alu_dst, smu_dst, rf_dst;
  link_t      nb_out [4];
  int checks = 0, failures = 0;

  inner_pe_switch dut (.clk(clk), .alu_q(alu_q), .alu_dst(alu_dst), .smu_q(smu_q), .smu_dst(smu_dst),
                       .rf_q(rf_q), .rf_dst(rf_dst), .nb_out(nb_out), .hd_out(hd_out), .vd_out(vd_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t chan(input int k);
    // k = 1..14 as in the destination code
    if (k == 13) return hd_out;
    if (k == 14) return vd_out;
    case ((k - 1) % 3)
      0: return nb_out[(k - 1) / 3].alu;
      1: return nb_out[(k - 1) / 3].smu;
      default: return nb_out[(k - 1) / 3].rf;
    endcase
  endfunction

  initial begin
    int da, ds, dr;
    word_t e;
    repeat (3000) begin
      @(negedge clk);
      da = $urandom_range(0, 14);
      do ds = $urandom_range(0, 14); while (ds != 0 && ds == da);
      do dr = $urandom_range(0, 14); while (dr != 0 && (dr == da || dr == ds));
      alu_dst = 4'(da); smu_dst = 4'(ds); rf_dst = 4'(dr);
      alu_q = word_t'(26'($urandom)); smu_q = word_t'(26'($urandom)); rf_q = word_t'(26'($urandom));
      #1;
      for (int k = 1; k <= 14; k++) begin
        e = (k == da) ? alu_q : (k == ds) ? smu_q : (k == dr) ? rf_q : '0;
        checks++;
        if (chan(k) !== e) begin
          failures++;
          $display("FAIL ch%0d dst=%0d/%0d/%0d got %h exp %h", k, da, ds, dr, chan(k), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
