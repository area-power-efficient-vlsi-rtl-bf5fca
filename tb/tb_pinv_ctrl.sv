// tb_pinv_ctrl: the control unit alone, with simple stand-ins built here
// for the RAM (array, one-cycle read), the two CORDICs (14-cycle delay
// lines that return x and y unchanged and, for a vectoring sample, the
// "angle" x ^ y) and the MAC (exact complex sum of its run).
//
// Checked, for one full run with M = N = 4:
//   * the pass list: vectoring reads of row 0 must name the column pairs
//     (1,2),(3,4) [phase], (1,2),(3,4),(1,3),(0,1) [Givens] for every row of H
//   * steering of RAM data into the CORDICs for both pass kinds and both
//     modes, and the angle fed back as z in rotation
//   * steering of CORDIC results back into the RAM (row, columns and
//     re/im placement)
//   * the initial array, column 0 before each row and the MAC write-back
//   * H addresses, start-to-done latency (1098 cycles) and 16 output beats
//     whose data are the RAM words named by out_row/out_col.
module tb_pinv_ctrl;
  import pinv_pkg::*;

  localparam int M = 4, N = 4, R = 9, C = 5, DEPTH = 45, AB = 6, LAT = 14;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t inv_sqrt_alpha = 16'sd362;
  logic busy, done, h_rd;
  logic [1:0] h_row, h_col;
  cplx_t h_data;
  logic a_en, a_we, b_en, b_we;
  logic [AB-1:0] a_addr, b_addr;
  cplx_t a_wdata, a_rdata, b_wdata, b_rdata;
  logic c1_valid, c2_valid, c1o_valid, c2o_valid;
  cordic_mode_e c1_mode, c2_mode;
  word_t c1_x, c1_y, c2_x, c2_y, c1o_x, c1o_y, c2o_x, c2o_y;
  logic signed [AW-1:0] c1_z, c2_z, c1o_z, c2o_z;
  logic m_valid, m_clr, m_last, m_out_valid;
  cplx_t m_a, m_b;
  logic signed [31:0] m_acc_re, m_acc_im;
  logic out_valid;
  logic [2:0] out_row;
  logic [1:0] out_col;
  cplx_t [1:0] out_data;

  int checks = 0, failures = 0, cyc = 0;

  pinv_ctrl #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cyc, msg);
  endtask

  // ---------------- RAM stand-in
  cplx_t mem [DEPTH];
  logic [AB-1:0] ra_q, rb_q;
  always_ff @(posedge clk) begin
    if (a_en && !a_we) begin a_rdata <= mem[a_addr]; ra_q <= a_addr; end
    if (b_en && !b_we) begin b_rdata <= mem[b_addr]; rb_q <= b_addr; end
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  // ---------------- H stand-in: H(i,k) = {i*16+k, -(i*16+k)} in LSBs
  always_ff @(posedge clk) if (h_rd)
    h_data <= '{re: word_t'(int'(h_row) * 16 + int'(h_col) + 1), im: word_t'(-(int'(h_row) * 16 + int'(h_col) + 1))};

  // ---------------- CORDIC stand-ins
  typedef struct packed {
    logic v; cordic_mode_e md; word_t x, y; logic signed [AW-1:0] z;
  } smp_t;
  smp_t d1 [LAT], d2 [LAT];
  function automatic smp_t mk(logic v, cordic_mode_e md, word_t x, word_t y, logic signed [AW-1:0] z);
    return '{v: v, md: md, x: x, y: y, z: (md == VECTORING) ? AW'(x ^ y) : z};
  endfunction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin d1[i] <= '0; d2[i] <= '0; end
    end else begin
      d1[0] <= mk(c1_valid, c1_mode, c1_x, c1_y, c1_z);
      d2[0] <= mk(c2_valid, c2_mode, c2_x, c2_y, c2_z);
      for (int i = 1; i < LAT; i++) begin d1[i] <= d1[i-1]; d2[i] <= d2[i-1]; end
    end
  end
  assign c1o_valid = d1[LAT-1].v;  assign c2o_valid = d2[LAT-1].v;
  assign c1o_x = d1[LAT-1].x; assign c1o_y = d1[LAT-1].y; assign c1o_z = d1[LAT-1].z;
  assign c2o_x = d2[LAT-1].x; assign c2o_y = d2[LAT-1].y; assign c2o_z = d2[LAT-1].z;

  // ---------------- MAC stand-in
  longint sr, si;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_out_valid <= 1'b0;
    else begin
      m_out_valid <= m_valid && m_last;
      if (m_valid) begin
        sr = (m_clr ? 0 : sr) + longint'(m_a.re) * m_b.re - longint'(m_a.im) * m_b.im;
        si = (m_clr ? 0 : si) + longint'(m_a.re) * m_b.im + longint'(m_a.im) * m_b.re;
        m_acc_re <= 32'(sr);
        m_acc_im <= 32'(si);
      end
    end
  end

  // ---------------- monitors
  int vec_list [$];          // ca*8+cb of every vectoring pass
  int kind;                  // 0 phase, 1 Givens, for the current pass
  int ca, cb, wrow;
  logic signed [AW-1:0] ang1, ang2;
  int beats = 0, n_col0 = 0, n_mac = 0, n_rot_wr = 0, n_vec_wr = 0;

  always @(posedge clk) if (rst_n) begin
    // vectoring issue: rdata holds row 0 of columns (ca, cb)
    if (c1_valid && c1_mode == VECTORING) begin
      ca = int'(ra_q); cb = int'(rb_q);
      vec_list.push_back(ca * 8 + cb);
      kind = (vec_list.size() % 6 == 1 || vec_list.size() % 6 == 2) ? 0 : 1;
      wrow = 1;
      checks++;
      if (kind == 0) begin
        if (c1_x !== a_rdata.re || c1_y !== a_rdata.im || c2_x !== b_rdata.re || c2_y !== b_rdata.im || c1_z !== 0)
          fail("phase vectoring steering");
      end else if (c1_x !== a_rdata.re || c1_y !== b_rdata.re || c2_x !== a_rdata.re || c2_y !== b_rdata.re)
        fail("Givens vectoring steering");
    end
    if (c1_valid && c1_mode == ROTATION) begin
      checks++;
      if (c1_z !== ang1 || c2_z !== ang2) fail("angle not fed back");
      if (int'(ra_q) % C != ca || int'(rb_q) % C != cb) fail("rotation reads the wrong columns");
      if (kind == 0) begin
        if (c1_x !== a_rdata.re || c1_y !== a_rdata.im || c2_x !== b_rdata.re || c2_y !== b_rdata.im)
          fail("phase rotation steering");
      end else if (c1_x !== a_rdata.re || c1_y !== b_rdata.re || c2_x !== a_rdata.im || c2_y !== b_rdata.im)
        fail("Givens rotation steering");
    end
    // results written back
    if (c1o_valid && d1[LAT-1].md == VECTORING) begin
      ang1 = c1o_z; ang2 = c2o_z;
      n_vec_wr++;
      checks++;
      if (!(a_en && a_we && a_addr == AB'(ca) && b_en && b_we && b_addr == AB'(cb)))
        fail("vectoring result not written to row 0");
      else if (a_wdata !== cplx_t'{re: c1o_x, im: 16'sd0} ||
               b_wdata !== ((kind == 0) ? cplx_t'{re: c2o_x, im: 16'sd0} : cplx_t'(0)))
        fail("vectoring result data");
    end
    if (c1o_valid && d1[LAT-1].md == ROTATION) begin
      n_rot_wr++;
      checks++;
      if (!(a_en && a_we && a_addr == AB'(wrow * C + ca) && b_en && b_we && b_addr == AB'(wrow * C + cb)))
        fail($sformatf("rotation result address %0d/%0d, expected row %0d", a_addr, b_addr, wrow));
      else if (kind == 0 && (a_wdata !== cplx_t'{re: c1o_x, im: c1o_y} || b_wdata !== cplx_t'{re: c2o_x, im: c2o_y}))
        fail("phase rotation write data");
      else if (kind == 1 && (a_wdata !== cplx_t'{re: c1o_x, im: c2o_x} || b_wdata !== cplx_t'{re: c1o_y, im: c2o_y}))
        fail("Givens rotation write data");
      wrow++;
    end
    if (m_out_valid) begin
      n_mac++;
      checks++;
      if (!(b_en && b_we && b_addr == AB'((n_mac - 1) % M + 1)))
        fail("MAC result address");
      else if (b_wdata !== cplx_t'{re: q16_to_word(m_acc_re), im: q16_to_word(m_acc_im)})
        fail("MAC result data");
    end
    if (h_rd) begin
      checks++;
      if (int'(h_row) != (n_mac / M)) fail("H row address");
    end
    if (out_valid) begin
      beats++;
      checks++;
      if (out_data[1] !== mem[(int'(out_row) + 1) * C + int'(out_col) + 1] ||
          out_data[0] !== mem[(int'(out_row) + 1) * C + int'(out_col) + 2])
        fail("output beat data");
    end
  end

  // snapshot checks of the initial array and of column 0
  initial begin
    int t0, lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    // after INIT (16 cycles) every P/Q entry is set
    repeat (17) @(negedge clk);
    for (int r = 1; r < R; r++)
      for (int c = 1; c < C; c++) begin
        checks++;
        if (mem[r * C + c] !== cplx_t'{re: (r == c) ? inv_sqrt_alpha : 16'sd0, im: 16'sd0})
          fail($sformatf("initial entry (%0d,%0d)", r, c));
      end
    // after the COL0 pass of row 0
    repeat (7) @(negedge clk);
    for (int r = 0; r < R; r++) begin
      checks++;
      if (mem[r * C] !== cplx_t'{re: (r == 0) ? 16'sd256 : (r == 1 + M) ? -16'sd256 : 16'sd0, im: 16'sd0})
        fail($sformatf("column 0 row %0d", r));
    end
    @(posedge done);
    lat = cyc - t0;
    @(negedge clk);
    checks += 6;
    if (lat != 1098) fail($sformatf("latency %0d", lat));
    if (beats != 16) fail($sformatf("%0d output beats", beats));
    if (n_mac != N * M) fail($sformatf("%0d MAC results", n_mac));
    if (n_vec_wr != N * 6) fail($sformatf("%0d vectoring results", n_vec_wr));
    if (n_rot_wr != N * 6 * (R - 1)) fail($sformatf("%0d rotation results", n_rot_wr));
    if (vec_list.size() != N * 6) fail("pass count");
    else begin
      static int expl [6] = '{1*8+2, 3*8+4, 1*8+2, 3*8+4, 1*8+3, 0*8+1};
      foreach (vec_list[i]) begin
        checks++;
        if (vec_list[i] != expl[i % 6]) fail($sformatf("pass %0d pairs columns %0d,%0d", i, vec_list[i] / 8, vec_list[i] % 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
