// tb_vit_input_buffer: self-checking testbench of the 45-entry symbol
// window. A queue model follows random writes (with last flags) and pops;
// every cycle the ready flag, the count, the head's last flag and a random
// relative read are compared with it. Fill-to-full and drain-to-empty both
// occur.
module tb_vit_input_buffer;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0, pop = 1'b0;
  logic [8:0] in_sym = '0, rd_sym;
  logic [5:0] rd_off = '0;
  logic       rd_last, head_last;
  logic [5:0] count;
  int checks = 0, failures = 0;
  int q[$];         // {last, sym}
  int fulls = 0;
  bit wrote;

  always #5 clk = ~clk;

  vit_input_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int it = 0; it < 6000; it++) begin
      automatic int phase = (it / 500) % 2;   // alternately filling and draining
      @(negedge clk);
      in_valid = (phase == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      in_sym   = 9'($urandom_range(0, 511));
      in_last  = ($urandom_range(0, 9) == 0);
      pop      = (q.size() > 0) && ((phase == 0) ? ($urandom_range(0, 3) == 0)
                                                 : ($urandom_range(0, 3) != 0));
      rd_off   = (q.size() > 0) ? 6'($urandom_range(0, q.size() - 1)) : '0;
      #1;
      checks += 2;
      if (in_ready != (q.size() < 45)) begin failures++; $display("ready wrong at %0d", it); end
      if (int'(count) != q.size()) begin failures++; $display("count wrong at %0d", it); end
      if (q.size() == 45) fulls++;
      if (q.size() > 0) begin
        checks += 2;
        if ({rd_last, rd_sym} != 10'(q[rd_off])) begin
          failures++; $display("read wrong at %0d off %0d", it, rd_off);
        end
        if (head_last != q[0][9]) begin failures++; $display("head_last wrong at %0d", it); end
      end
      wrote = in_valid && in_ready;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (wrote) q.push_back(int'({in_last, in_sym}));
    end
    checks++;
    if (fulls == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
