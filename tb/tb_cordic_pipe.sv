// tb_cordic_pipe: the 13-cell pipelined CORDIC with scale correction.
//
// 400 random samples, vectoring and rotation mixed freely, with random idle
// cycles between them, are compared with real-arithmetic results:
//   vectoring: theta = atan(y/x) (the vector is turned onto the nearer half
//              of the x axis), out_x = sign(x) |v| G, out_y = 0, out_z = theta
//   rotation : (x, y) turned clockwise by z, times G
// where G = K13 * 155/256 is the gain left by the shift-add correction,
// K13 = prod_{i<13} sqrt(1 + 2^-2i). Tolerances: 4 LSB on x and y (16Q8),
// 8 LSB on z (2^-13 rad). Every output must appear exactly 14 cycles after
// its input, in order.
module tb_cordic_pipe;
  import pinv_pkg::*;

  localparam int LAT = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  cordic_mode_e in_mode = VECTORING, out_mode;
  word_t in_x = '0, in_y = '0, out_x, out_y;
  logic signed [AW-1:0] in_z = '0, out_z;
  int checks = 0, failures = 0, cyc = 0;
  real G;

  cordic_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real x, y, z; int mode; int t; } exp_t;
  exp_t q[$];
  int n_out = 0;

  function automatic real absr(real a); return a < 0 ? -a : a; endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = q.pop_front();
      checks++;
      if (cyc - e.t != LAT) begin failures++; $display("latency %0d", cyc - e.t); end
      if (absr(real'(out_x) - e.x) > 4.0 || absr(real'(out_y) - e.y) > 4.0 ||
          (e.mode == 0 && absr(real'(out_z) - e.z) > 8.0) || int'(out_mode) != e.mode) begin
        failures++;
        $display("mode %0d: got (%0d, %0d, %0d) expected (%f, %f, %f)",
                 e.mode, out_x, out_y, out_z, e.x, e.y, e.z);
      end
      n_out++;
    end
  end

  initial begin
    G = 155.0 / 256.0;
    for (int i = 0; i < 13; i++) G = G * $sqrt(1.0 + 1.0 / real'(1 << (2 * i)));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      exp_t e;
      real x, y, z, th, mag;
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      in_mode  = cordic_mode_e'($urandom_range(1));
      in_x     = word_t'(int'($urandom_range(16000)) - 8000);
      in_y     = word_t'(int'($urandom_range(16000)) - 8000);
      in_z     = (in_mode == ROTATION) ? AW'(int'($urandom_range(24000)) - 12000) : '0;
      x = real'(in_x); y = real'(in_y); z = real'(in_z) / 8192.0;
      if (in_mode == VECTORING) begin
        th  = (in_x == 0) ? ((in_y >= 0) ? 1.5707963 : -1.5707963) : $atan(y / x);
        mag = $sqrt(x * x + y * y) * G;
        e.x = (in_x < 0) ? -mag : mag;
        e.y = 0.0;
        e.z = th * 8192.0;
        e.mode = 0;
      end else begin
        e.x = ( x * $cos(z) + y * $sin(z)) * G;
        e.y = (-x * $sin(z) + y * $cos(z)) * G;
        e.z = 0.0;
        e.mode = 1;
      end
      e.t = cyc;
      if (in_valid) q.push_back(e);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
