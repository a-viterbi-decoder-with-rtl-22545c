// tb_vit_decision_unit: self-checking testbench of the survivor selection.
// Random metric vectors with many ties (small value ranges) and a single
// planted minimum; checks the smallest-metric state (lowest index on a
// tie), its decision bit and the next initial state.
module tb_vit_decision_unit;
  logic [255:0][9:0] pm;
  logic [255:0]      dec;
  logic [7:0]        init_state, best_state, next_state;
  logic              dec_bit;
  int checks = 0, failures = 0;

  vit_decision_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      automatic int hi = (it % 3 == 0) ? 3 : 1023;
      int best, eb;
      for (int s = 0; s < 256; s++) begin
        pm[s]  = 10'($urandom_range(2, hi));
        dec[s] = 1'($urandom_range(0, 1));
      end
      if (it % 2 == 1) pm[$urandom_range(0, 255)] = 10'($urandom_range(0, 1));
      init_state = 8'($urandom_range(0, 255));
      #1;
      best = 0;
      for (int s = 1; s < 256; s++) if (pm[s] < pm[best]) best = s;
      eb = int'(dec[best]);
      checks += 3;
      if (int'(best_state) != best) begin
        failures++; $display("it %0d best got %0d exp %0d", it, best_state, best);
      end
      if (int'(dec_bit) != eb) begin
        failures++; $display("it %0d bit got %0d exp %0d", it, dec_bit, eb);
      end
      if (int'(next_state) != (((int'(init_state) << 1) | eb) & 255)) begin
        failures++; $display("it %0d next state got %0d", it, next_state);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
