// tb_pinv_top: end-to-end test of the pseudo-inverse module at its default
// size (M = N = 4, 13-cell CORDICs, 16Q8).
//
// For several random channel matrices H (entries uniform in [-1, 1] on both
// parts) and alpha = 0.5 or 0.1, the bench runs one complete computation and
// checks the streamed P^(1/2) and Q_a against
//   1. a real-arithmetic model of the same pass sequence (phase passes, then
//      the Givens tree (1,2),(3,4),(1,3),(0,1)), in which every CORDIC output
//      carries the residual gain K13 * 155/256 of the shift-add scale
//      correction, K13 = prod_{i<13} sqrt(1 + 2^-2i);
//   2. the invariant Q_a = H P^(1/2), which holds whatever unitary factor the
//      passes pick;
//   3. the start-to-done latency (1098 cycles) and the counts of vectoring
//      samples, rotation samples, MAC results and output beats.
// It also counts how often each mechanism occurred (vectoring, rotation,
// phase pass, Givens pass, MAC run, negative-x vectoring, idle-hold of the
// CORDIC cells) and fails a mechanism that never happened.
module tb_pinv_top;
  import pinv_pkg::*;

  localparam int M = M_TX;
  localparam int N = N_RX;
  localparam int R = 1 + M + N;
  localparam int C = M + 1;
  localparam int NTRIAL = 8;
  localparam int LATENCY = 1098;
  localparam real ALPHA_EVEN = 0.5;  // alpha of even-numbered trials
  localparam real ALPHA_ODD  = 0.1;  // alpha of odd-numbered trials (high SNR)
  localparam real TOL_MODEL = 0.06;
  localparam real TOL_INV   = 0.04;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t inv_sqrt_alpha;
  logic busy, done, h_rd, out_valid;
  logic [$clog2(N)-1:0] h_row;
  logic [$clog2(M)-1:0] h_col;
  cplx_t h_data;
  logic [$clog2(M+N)-1:0] out_row;
  logic [$clog2(M)-1:0] out_col;
  cplx_t [1:0] out_data;

  int checks = 0, failures = 0;
  int cyc = 0;

  pinv_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel matrix memory, one-cycle read
  cplx_t hmem [N][M];
  always_ff @(posedge clk) if (h_rd) h_data <= hmem[h_row][h_col];

  // results
  real p_re [M][M], p_im [M][M], q_re [N][M], q_im [N][M];
  int  beats;
  always @(posedge clk) if (out_valid) begin
    for (int e = 0; e < 2; e++) begin
      int c;
      real vr, vi;
      c  = int'(out_col) + e;
      vr = real'(out_data[1-e].re) / 256.0;
      vi = real'(out_data[1-e].im) / 256.0;
      if (int'(out_row) < M) begin p_re[int'(out_row)][c] = vr; p_im[int'(out_row)][c] = vi; end
      else begin q_re[int'(out_row)-M][c] = vr; q_im[int'(out_row)-M][c] = vi; end
    end
    beats++;
  end

  // mechanism counters
  int n_vec, n_rot, n_mac, n_phase_pass, n_giv_pass, n_negx, n_hold;
  always @(posedge clk) if (rst_n) begin
    if (dut.c1_valid && dut.c1_mode == VECTORING) n_vec++;
    if (dut.c1_valid && dut.c1_mode == ROTATION)  n_rot++;
    if (dut.c1_valid && dut.c1_mode == VECTORING && dut.c1_x < 0) n_negx++;
    if (dut.m_out_valid) n_mac++;
    if (int'(dut.u_ctrl.state) == 6) begin  // S_VREAD
      if (int'(dut.u_ctrl.cur.kind) == 2) n_phase_pass++;  // P_PHASE
      if (int'(dut.u_ctrl.cur.kind) == 3) n_giv_pass++;    // P_GIVENS
    end
  end
  // idle cells keep their data registers
  logic signed [DW+GUARD+FGUARD-1:0] last_x0;
  always @(posedge clk) begin
    if (rst_n && !$past(dut.u_cordic2.v[0]) && $past(rst_n, 2)) begin
      n_hold++;
      if (dut.u_cordic2.xs[1] !== last_x0) begin
        failures++;
        $display("idle CORDIC cell changed its data");
      end
    end
    last_x0 <= dut.u_cordic2.xs[1];
  end

  // -------------------------------------------------- reference model
  real ar [R][C], ai [R][C];
  real gain;
  real hr [N][M], hi [N][M];

  function automatic real rtheta(real x, real y);
    if (x == 0.0) return (y >= 0.0) ? 1.5707963267948966 : -1.5707963267948966;
    return $atan(y / x);
  endfunction

  task automatic rot(inout real x, inout real y, input real th);
    real nx, ny;
    nx = ( x * $cos(th) + y * $sin(th)) * gain;
    ny = (-x * $sin(th) + y * $cos(th)) * gain;
    x = nx; y = ny;
  endtask

  task automatic model();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        ar[r][c] = (r >= 1 && r <= M && r == c) ? real'(inv_sqrt_alpha) / 256.0 : 0.0;
        ai[r][c] = 0.0;
      end
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < R; r++) begin
        ar[r][0] = (r == 0) ? 1.0 : (r == 1 + M + i) ? -1.0 : 0.0;
        ai[r][0] = 0.0;
      end
      for (int j = 1; j <= M; j++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int k = 0; k < M; k++) begin
          sr += hr[i][k] * ar[k+1][j] - hi[i][k] * ai[k+1][j];
          si += hr[i][k] * ai[k+1][j] + hi[i][k] * ar[k+1][j];
        end
        ar[0][j] = sr; ai[0][j] = si;
      end
      for (int j = 1; j <= M; j++) begin
        real th;
        th = rtheta(ar[0][j], ai[0][j]);
        for (int r = 0; r < R; r++) rot(ar[r][j], ai[r][j], th);
        ai[0][j] = 0.0;
      end
      for (int g = 0; g < M; g++) begin
        int a, b;
        real th;
        case (g)
          0: begin a = 1; b = 2; end
          1: begin a = 3; b = 4; end
          2: begin a = 1; b = 3; end
          default: begin a = 0; b = 1; end
        endcase
        th = rtheta(ar[0][a], ar[0][b]);
        for (int r = 0; r < R; r++) begin
          rot(ar[r][a], ar[r][b], th);
          if (r > 0) rot(ai[r][a], ai[r][b], th);
        end
        ar[0][b] = 0.0;
      end
    end
  endtask

  // ----------------------------------------------------------- stimulus
  initial begin
    real k13, err_m, err_i;
    int t0, lat;
    k13 = 1.0;
    for (int i = 0; i < 13; i++) k13 = k13 * $sqrt(1.0 + 1.0 / real'(1 << (2 * i)));
    gain = k13 * 155.0 / 256.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTRIAL; t++) begin
      inv_sqrt_alpha = word_t'($rtoi(256.0 / $sqrt((t % 2 == 0) ? ALPHA_EVEN : ALPHA_ODD) + 0.5));
      for (int i = 0; i < N; i++)
        for (int k = 0; k < M; k++) begin
          hmem[i][k].re = word_t'(int'($urandom_range(512)) - 256);
          hmem[i][k].im = word_t'(int'($urandom_range(512)) - 256);
          hr[i][k] = real'(hmem[i][k].re) / 256.0;
          hi[i][k] = real'(hmem[i][k].im) / 256.0;
        end
      model();
      beats = 0;
      n_vec = 0; n_rot = 0; n_mac = 0;
      @(negedge clk) start = 1'b1;
      t0 = cyc;
      @(negedge clk) start = 1'b0;
      @(posedge done);
      lat = cyc - t0;
      @(negedge clk);
      // latency and counts
      checks += 5;
      if (lat != LATENCY) begin failures++; $display("trial %0d latency %0d, expected %0d", t, lat, LATENCY); end
      if (n_vec != N * (M/2 + M)) begin failures++; $display("vectoring samples %0d", n_vec); end
      if (n_rot != N * (M/2 + M) * (R-1)) begin failures++; $display("rotation samples %0d", n_rot); end
      if (n_mac != N * M) begin failures++; $display("MAC results %0d", n_mac); end
      if (beats != (M + N) * M / 2) begin failures++; $display("output beats %0d", beats); end
      // compare with the model
      err_m = 0.0;
      for (int r = 0; r < M + N; r++)
        for (int c = 0; c < M; c++) begin
          real er, ei;
          er = (r < M) ? p_re[r][c] - ar[r+1][c+1] : q_re[r-M][c] - ar[r+1][c+1];
          ei = (r < M) ? p_im[r][c] - ai[r+1][c+1] : q_im[r-M][c] - ai[r+1][c+1];
          checks++;
          if ((er < 0 ? -er : er) > TOL_MODEL || (ei < 0 ? -ei : ei) > TOL_MODEL) begin
            failures++;
            $display("trial %0d entry (%0d,%0d): got (%f, %f) model (%f, %f)", t, r, c,
                     r < M ? p_re[r][c] : q_re[r-M][c], r < M ? p_im[r][c] : q_im[r-M][c],
                     ar[r+1][c+1], ai[r+1][c+1]);
          end
          if ((er < 0 ? -er : er) > err_m) err_m = (er < 0 ? -er : er);
          if ((ei < 0 ? -ei : ei) > err_m) err_m = (ei < 0 ? -ei : ei);
        end
      // invariant Q_a = H P^(1/2)
      err_i = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) begin
          real sr, si, er, ei;
          sr = 0.0;
          si = 0.0;
          for (int k = 0; k < M; k++) begin
            sr += hr[i][k] * p_re[k][j] - hi[i][k] * p_im[k][j];
            si += hr[i][k] * p_im[k][j] + hi[i][k] * p_re[k][j];
          end
          er = sr - q_re[i][j]; ei = si - q_im[i][j];
          er = er < 0 ? -er : er; ei = ei < 0 ? -ei : ei;
          checks++;
          if (er > TOL_INV || ei > TOL_INV) begin
            failures++;
            $display("trial %0d Q_a(%0d,%0d) differs from (H P)(%0d,%0d) by %f", t, i, j, i, j, er > ei ? er : ei);
          end
          if (er > err_i) err_i = er;
          if (ei > err_i) err_i = ei;
        end
      $display("trial %0d: latency %0d cycles, max |RTL - model| = %f, max |Q_a - H P| = %f",
               t, lat, err_m, err_i);
    end
    // mechanisms
    checks += 5;
    if (n_phase_pass == 0) begin failures++; $display("no phase pass"); end
    if (n_giv_pass == 0)   begin failures++; $display("no Givens pass"); end
    if (n_negx == 0)       begin failures++; $display("no vectoring with negative x"); end
    if (n_hold == 0)       begin failures++; $display("no idle cycle of CORDIC-2"); end
    if (n_rot == 0)        begin failures++; $display("no rotation"); end
    $display("mechanisms: phase passes %0d, Givens passes %0d, negative-x vectorings %0d, idle-hold cycles %0d",
             n_phase_pass, n_giv_pass, n_negx, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
