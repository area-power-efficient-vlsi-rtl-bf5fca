// tb_cordic_cell: one micro-cell (shift 3) driven with random samples of
// both modes. Each registered output is compared with the shift-add step
// worked out here from the inputs; the direction follows the sign rules of
// the control unit. Cycles with in_valid low must leave the data registers
// unchanged and drop out_valid.
module tb_cordic_cell;
  import pinv_pkg::*;

  localparam int IW = 22;
  localparam int SH = 3;
  localparam logic signed [AW-1:0] ATAN3 = 16'sd1019;  // round(atan(1/8) * 2^13)

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  cordic_mode_e in_mode = VECTORING, out_mode;
  logic signed [IW-1:0] in_x = '0, in_y = '0, out_x, out_y;
  logic signed [AW-1:0] in_z = '0, out_z;
  int checks = 0, failures = 0;

  cordic_cell #(.SHIFT(SH), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [IW-1:0] ex, ey, hx;
    logic signed [AW-1:0] ez;
    logic cw;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_mode  = cordic_mode_e'($urandom_range(1));
      in_x     = IW'(int'($urandom_range(200000)) - 100000);
      in_y     = IW'(int'($urandom_range(200000)) - 100000);
      in_z     = AW'(int'($urandom_range(20000)) - 10000);
      if (in_mode == VECTORING) cw = (in_x < 0) == (in_y < 0);
      else                      cw = (in_z >= 0);
      ex = cw ? in_x + (in_y >>> SH) : in_x - (in_y >>> SH);
      ey = cw ? in_y - (in_x >>> SH) : in_y + (in_x >>> SH);
      if (in_mode == VECTORING) ez = cw ? in_z + ATAN3 : in_z - ATAN3;
      else                      ez = cw ? in_z - ATAN3 : in_z + ATAN3;
      hx = out_x;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch"); end
      if (in_valid) begin
        if (out_x !== ex || out_y !== ey || out_z !== ez || out_mode !== in_mode) begin
          failures++;
          $display("sample %0d: got %0d %0d %0d expected %0d %0d %0d", i, out_x, out_y, out_z, ex, ey, ez);
        end
      end else if (out_x !== hx) begin
        failures++;
        $display("idle cycle changed the data registers");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
