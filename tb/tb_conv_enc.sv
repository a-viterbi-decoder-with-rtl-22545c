// tb_conv_enc: self-checking testbench of the rate 1/3, K = 9 encoder.
// Random information bits, random idle cycles and frame clears; each code
// word is compared with the shift-register model of vit_ref_pkg, one clock
// after its bit was accepted.
module tb_conv_enc;
  import vit_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       in_valid = 1'b0;
  logic       in_bit = 1'b0;
  logic       out_valid;
  logic [2:0] out_code;

  int checks = 0, failures = 0;
  int st = 0;          // model state, bit 0 = most recent input
  int exp_code;
  bit exp_valid = 0;

  always #5 clk = ~clk;

  conv_enc dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // the zero state gives code 000 for input 0 and the tap MSBs for input 1
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 40) == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = $urandom_range(0, 1);
      if (clear) st = 0;
      exp_valid = in_valid;
      if (in_valid) begin
        exp_code = ref_code(st, int'(in_bit));
        st = ((st << 1) | int'(in_bit)) & 255;
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_valid) begin
        failures++; $display("valid mismatch at %0d", n);
      end
      if (exp_valid) begin
        checks++;
        if (int'(out_code) != exp_code) begin
          failures++;
          $display("code mismatch at %0d: got %0d exp %0d", n, out_code, exp_code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
