// tb_vit_bm_calc: self-checking testbench of the branch metric unit.
// All 512 soft symbols, all 8 code words, against vit_ref_pkg::ref_bm.
module tb_vit_bm_calc;
  import vit_ref_pkg::*;

  logic [8:0]      sym;
  logic [7:0][4:0] bm;
  int checks = 0, failures = 0;

  vit_bm_calc dut (.sym, .bm);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 512; s++) begin
      sym = 9'(s);
      #1;
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (int'(bm[c]) != ref_bm(s, c)) begin
          failures++;
          $display("sym %0d cw %0d: got %0d exp %0d", s, c, bm[c], ref_bm(s, c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
