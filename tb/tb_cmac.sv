// tb_cmac: runs of 1 to 6 random complex 16Q8 products are accumulated and
// the Q16 result is compared with the exact integer sum of
// (a.re b.re - a.im b.im) + j (a.re b.im + a.im b.re) worked out here.
// Runs are separated by random idle cycles; out_valid must pulse exactly once
// per run, one cycle after its last input.
module tb_cmac;
  import pinv_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_clr = 1'b0, in_last = 1'b0, out_valid;
  cplx_t a = '0, b = '0;
  logic signed [31:0] acc_re, acc_im;
  int checks = 0, failures = 0;

  cmac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    int len;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 300; run++) begin
      len = 1 + $urandom_range(5);
      er = 0; ei = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_clr   = (k == 0);
        in_last  = (k == len - 1);
        a = '{re: word_t'($urandom), im: word_t'($urandom)};
        b = '{re: word_t'($urandom_range(2000)), im: word_t'(int'($urandom_range(2000)) - 1000)};
        er += longint'(a.re) * b.re - longint'(a.im) * b.im;
        ei += longint'(a.re) * b.im + longint'(a.im) * b.re;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== in_last) begin failures++; $display("out_valid wrong"); end
      end
      @(negedge clk) in_valid = 1'b0;
      checks++;
      if (longint'(acc_re) != er || longint'(acc_im) != ei) begin
        failures++;
        $display("run %0d: got %0d %0d expected %0d %0d", run, acc_re, acc_im, er, ei);
      end
      repeat ($urandom_range(2)) begin
        @(posedge clk) #1;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
