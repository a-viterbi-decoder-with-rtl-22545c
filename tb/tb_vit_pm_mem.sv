// tb_vit_pm_mem: self-checking testbench of the path metric memory.
// Checks reset to unreachable, write enable, hold, and the init read
// port (0 at the initial state, all ones elsewhere) while the stored
// metrics stay visible on pm_q.
module tb_vit_pm_mem;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              init = 1'b0, wr_en = 1'b0;
  logic [7:0]        init_state = '0;
  logic [255:0][9:0] pm_wr, pm_rd, pm_q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vit_pm_mem dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read();
    for (int s = 0; s < 256; s++) begin
      int exp_rd = init ? ((s == int'(init_state)) ? 0 : 1023) : int'(model[s]);
      checks += 2;
      if (int'(pm_rd[s]) != exp_rd) begin
        failures++; $display("pm_rd[%0d] got %0d exp %0d", s, pm_rd[s], exp_rd);
      end
      if (pm_q[s] != model[s]) begin
        failures++; $display("pm_q[%0d] got %0d exp %0d", s, pm_q[s], model[s]);
      end
    end
  endtask

  initial begin
    pm_wr = '0;
    repeat (2) @(posedge clk);
    #1 model = '1;
    check_read();
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      init  = $urandom_range(0, 1);
      init_state = 8'($urandom_range(0, 255));
      for (int s = 0; s < 256; s++) pm_wr[s] = 10'($urandom_range(0, 1023));
      #1 check_read();
      @(posedge clk);
      if (wr_en) model = pm_wr;
      #1 check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
