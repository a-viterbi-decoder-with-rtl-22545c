// tb_vit_dec_mem: self-checking testbench of the 256-bit decision memory.
// Checks reset to zero, writes with enable and holding without it.
module tb_vit_dec_mem;
  logic         clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [255:0] dec_wr = '0, dec_rd, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vit_dec_mem dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 model = '0;
    checks++;
    if (dec_rd != model) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      for (int w = 0; w < 8; w++) dec_wr[w*32 +: 32] = $urandom;
      @(posedge clk);
      if (wr_en) model = dec_wr;
      #1;
      checks++;
      if (dec_rd != model) begin failures++; $display("mismatch at %0d", it); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
