// tb_vit_acs_array: self-checking testbench of the 256-state ACS unit.
// Random metrics (including the unreachable all-ones value and near-ties),
// random decision bits and branch metrics, first stage on and off; every
// state's new metric and decision bit is compared with a trellis model
// built on vit_ref_pkg::ref_code.
module tb_vit_acs_array;
  import vit_ref_pkg::*;

  logic                  first;
  logic [255:0][9:0]     pm_in, pm_out;
  logic [255:0]          dec_in, dec_out;
  logic [7:0][4:0]       bm;
  int checks = 0, failures = 0;

  vit_acs_array dut (.first, .pm_in, .dec_in, .bm, .pm_out, .dec_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      first = ($urandom_range(0, 3) == 0);
      for (int s = 0; s < 256; s++) begin
        case ($urandom_range(0, 3))
          0:       pm_in[s] = 10'h3ff;
          1:       pm_in[s] = 10'($urandom_range(1000, 1023));
          default: pm_in[s] = 10'($urandom_range(0, 40));
        endcase
        dec_in[s] = 1'($urandom_range(0, 1));
      end
      for (int c = 0; c < 8; c++) bm[c] = 5'($urandom_range(0, 21));
      #1;
      for (int ns = 0; ns < 256; ns++) begin
        automatic int u = ns & 1, pa = ns >> 1, pb = (ns >> 1) | 128;
        automatic int ma = sat_add(int'(pm_in[pa]), int'(bm[ref_code(pa, u)]));
        automatic int mb = sat_add(int'(pm_in[pb]), int'(bm[ref_code(pb, u)]));
        automatic int em = (mb < ma) ? mb : ma;
        automatic int ed = first ? u : ((mb < ma) ? int'(dec_in[pb]) : int'(dec_in[pa]));
        checks += 2;
        if (int'(pm_out[ns]) != em) begin
          failures++; $display("it %0d state %0d pm got %0d exp %0d", it, ns, pm_out[ns], em);
        end
        if (int'(dec_out[ns]) != ed) begin
          failures++; $display("it %0d state %0d dec got %0d exp %0d", it, ns, dec_out[ns], ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
