// tb_scale_corr: checks the shift-add scale correction against an integer
// multiply, floor(x * 155 / 256), for the extremes and 2000 random 16-bit
// inputs, and checks that 1.0 (256 in 16Q8) maps to 155 (0.6055).
module tb_scale_corr;
  logic signed [15:0] din, dout;
  int checks = 0, failures = 0;

  scale_corr #(.W(16)) dut (.din, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [15:0] x);
    longint p, e;
    din = x;
    #1;
    p = longint'(x) * 155;
    e = (p >= 0) ? p / 256 : -((-p + 255) / 256);   // floor division
    checks++;
    if (longint'(dout) != e) begin
      failures++;
      $display("x=%0d: got %0d expected %0d", x, dout, e);
    end
  endtask

  initial begin
    check(16'sd256);
    if (dout != 16'sd155) begin failures++; $display("1.0 -> %0d", dout); end
    check(16'sd0);
    check(16'sd1);
    check(-16'sd1);
    check(16'sh7fff);
    check(16'sh8000);
    for (int i = 0; i < 2000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
