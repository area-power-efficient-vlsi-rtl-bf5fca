// pinv_ctrl: control unit and data steering of the pseudo-inverse module.
//
// It runs the square-root algorithm for P^(1/2) and Q_a of the augmented
// channel matrix [H; sqrt(alpha) I] on a working array kept in the dual-port
// RAM. The array has R = 1+M+N rows and M+1 columns:
//   row 0           leader row   [ 1     , H_i P^(1/2) ]
//   rows 1..M       P block      [ 0     , P^(1/2)     ]
//   rows M+1..M+N   Q block      [ -e_i  , Q_a         ]
// P^(1/2) starts as (1/sqrt(alpha)) I and Q_a as 0. For every row i of H the
// unit runs this list of passes:
//   COL0    write column 0 as [1; 0; -e_i]
//   MAC     leader entries H_i * P^(1/2)(:,j), j = 1..M, on the complex MAC
//   PHASE   for columns (1,2), (3,4), ...: CORDIC-1 takes the first column and
//           CORDIC-2 the second; each vectors its leader (re, im) to get the
//           leader's phase, then turns every other entry of its column by
//           the same angle, so the leaders become real
//   GIVENS  parallel-Jacobi tree that zeroes the real leaders of columns
//           1..M into column 0: pairs (1,2),(3,4), then (1,3), ..., then
//           (0,1). Both CORDICs vector the same real leader pair and keep
//           the angle; then, row by row, CORDIC-1 turns the real parts and
//           CORDIC-2 the imaginary parts of the pair.
// Every CORDIC pass is a vectoring step (one sample, wait for the angle,
// which is fed back as z) and a rotation step (R-1 samples, one per cycle,
// written back in order as they leave the pipelines). After the last row of
// H the unit streams P^(1/2) (rows 0..M-1) and Q_a (rows M..M+N-1), two
// entries per cycle.
//
// Interface: start (one cycle, while idle) samples inv_sqrt_alpha; busy is
// high until done pulses after the last output beat. H is fetched from an
// outside memory: h_rd with (h_row, h_col), h_data valid one cycle later.
// Output beats: out_valid with out_row, out_col (first of two columns) and
// out_data = {entry(out_col), entry(out_col+1)}.
// Requirements: M a power of two (at least 2), and a CORDIC latency of more
// than R-1 cycles so that a pass's reads end before its writes begin.
// The pass list, the shared use of both CORDICs for vectoring and rotation
// and the angle feedback follow the design; the array layout, the pass order
// within the tree and all timing are this implementation's choices.
module pinv_ctrl
  import pinv_pkg::*;
#(
  parameter int unsigned M = M_TX,
  parameter int unsigned N = N_RX,
  parameter int unsigned R = 1 + M + N,
  parameter int unsigned C = M + 1,
  parameter int unsigned DEPTH = R * C,
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  word_t                  inv_sqrt_alpha,
  output logic                   busy,
  output logic                   done,
  // channel matrix source
  output logic                   h_rd,
  output logic [$clog2(N)-1:0]   h_row,
  output logic [$clog2(M)-1:0]   h_col,
  input  cplx_t                  h_data,
  // dual-port RAM
  output logic                   a_en,
  output logic                   a_we,
  output logic [ABITS-1:0]       a_addr,
  output cplx_t                  a_wdata,
  input  cplx_t                  a_rdata,
  output logic                   b_en,
  output logic                   b_we,
  output logic [ABITS-1:0]       b_addr,
  output cplx_t                  b_wdata,
  input  cplx_t                  b_rdata,
  // CORDIC-1
  output logic                   c1_valid,
  output cordic_mode_e           c1_mode,
  output word_t                  c1_x,
  output word_t                  c1_y,
  output logic signed [AW-1:0]   c1_z,
  input  logic                   c1o_valid,
  input  word_t                  c1o_x,
  input  word_t                  c1o_y,
  input  logic signed [AW-1:0]   c1o_z,
  // CORDIC-2
  output logic                   c2_valid,
  output cordic_mode_e           c2_mode,
  output word_t                  c2_x,
  output word_t                  c2_y,
  output logic signed [AW-1:0]   c2_z,
  input  logic                   c2o_valid,
  input  word_t                  c2o_x,
  input  word_t                  c2o_y,
  input  logic signed [AW-1:0]   c2o_z,
  // complex MAC
  output logic                   m_valid,
  output logic                   m_clr,
  output logic                   m_last,
  output cplx_t                  m_a,
  output cplx_t                  m_b,
  input  logic                   m_out_valid,
  input  logic signed [2*DW-1:0] m_acc_re,
  input  logic signed [2*DW-1:0] m_acc_im,
  // results
  output logic                   out_valid,
  output logic [$clog2(M+N)-1:0] out_row,
  output logic [$clog2(M)-1:0]   out_col,
  output cplx_t [1:0]            out_data
);

  localparam int unsigned RB     = $clog2(R + 1);
  localparam int unsigned CB     = $clog2(C + 1);
  localparam int unsigned NPHASE = M / 2;
  localparam int unsigned NPASS  = 2 + NPHASE + M;
  localparam int unsigned PB     = $clog2(NPASS + 1);
  localparam int unsigned LOGM   = $clog2(M);
  localparam word_t       ONE    = word_t'(1 <<< DFRAC);

  typedef enum logic [1:0] {P_COL0, P_MAC, P_PHASE, P_GIVENS} pass_e;

  typedef struct packed {
    pass_e         kind;
    logic [CB-1:0] ca;
    logic [CB-1:0] cb;
  } pass_t;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_NEXT, S_COL0, S_MAC, S_MACW,
    S_VREAD, S_VWAIT, S_RREAD, S_RWAIT, S_OUT, S_FLUSH
  } state_e;

  // The p-th pass of one row of H.
  function automatic pass_t pass_info(logic [PB-1:0] p);
    pass_t r;
    int    idx;
    int    pi;
    r   = '{kind: P_COL0, ca: '0, cb: '0};
    idx = 2 + NPHASE;
    pi = int'(p);
    if (pi == 1) begin
      r.kind = P_MAC;
    end else if (pi >= 2 && pi < 2 + NPHASE) begin
      r.kind = P_PHASE;
      r.ca   = CB'(2 * (pi - 2) + 1);
      r.cb   = CB'(2 * (pi - 2) + 2);
    end else if (pi >= 2 + NPHASE) begin
      r.kind = P_GIVENS;
      r.ca   = '0;                      // final pair (0,1)
      r.cb   = CB'(1);
      for (int l = 0; l < LOGM; l++) begin
        for (int k = 0; k < M / 2; k++) begin
          if (k < (M >> (l + 1))) begin
            if (pi == idx) begin
              r.ca = CB'(1 + k * (2 << l));
              r.cb = CB'(1 + k * (2 << l) + (1 << l));
            end
            idx++;
          end
        end
      end
    end
    return r;
  endfunction

  function automatic logic [ABITS-1:0] addr(logic [RB-1:0] r, logic [CB-1:0] c);
    return ABITS'(r * C + c);
  endfunction

  state_e           state;
  pass_t            cur;
  logic [PB-1:0]    pass_i;
  logic [$clog2(N+1)-1:0] row_i;
  logic [RB-1:0]    r_cnt, w_cnt;
  logic [CB-1:0]    c_cnt;
  logic [$clog2(M+1)-1:0] k_cnt;
  word_t            alpha_q;
  logic signed [AW-1:0] ang1, ang2;

  // one-cycle-delayed read bookkeeping (RAM and H reads take one cycle)
  logic             iss_v;       // rdata feeds the CORDICs this cycle
  cordic_mode_e     iss_mode;
  logic             mac_v, mac_clr, mac_last;
  logic [CB-1:0]    mac_j, mac_wj;
  logic             outq_v;
  logic [RB-1:0]    outq_r;
  logic [CB-1:0]    outq_c;
  logic [$clog2(M+1)-1:0] mac_wr;

  assign cur  = pass_info(pass_i);
  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pass_i   <= '0;
      row_i    <= '0;
      r_cnt    <= '0;
      w_cnt    <= '0;
      c_cnt    <= '0;
      k_cnt    <= '0;
      mac_wr   <= '0;
      alpha_q  <= '0;
      ang1     <= '0;
      ang2     <= '0;
      done     <= 1'b0;
      iss_v    <= 1'b0;
      iss_mode <= VECTORING;
      mac_v    <= 1'b0;
      mac_clr  <= 1'b0;
      mac_last <= 1'b0;
      mac_j    <= '0;
      mac_wj   <= '0;
      outq_v   <= 1'b0;
      outq_r   <= '0;
      outq_c   <= '0;
    end else begin
      done   <= 1'b0;
      iss_v  <= 1'b0;
      mac_v  <= 1'b0;
      outq_v <= 1'b0;
      if (mac_v && mac_last) mac_wj <= mac_j;
      unique case (state)
        S_IDLE: if (start) begin
          alpha_q <= inv_sqrt_alpha;
          row_i   <= '0;
          pass_i  <= '0;
          r_cnt   <= RB'(1);
          c_cnt   <= CB'(1);
          state   <= S_INIT;
        end
        S_INIT: begin  // rows 1..R-1, columns 1..M, two per cycle
          if (c_cnt + 2 > CB'(M)) begin
            c_cnt <= CB'(1);
            r_cnt <= r_cnt + 1'b1;
            if (r_cnt == RB'(R - 1)) state <= S_NEXT;
          end else begin
            c_cnt <= c_cnt + CB'(2);
          end
        end
        S_NEXT: begin  // start pass pass_i
          r_cnt  <= '0;
          w_cnt  <= RB'(1);
          c_cnt  <= CB'(1);
          k_cnt  <= '0;
          mac_wr <= '0;
          unique case (cur.kind)
            P_COL0:   state <= S_COL0;
            P_MAC:    state <= S_MAC;
            default:  state <= S_VREAD;
          endcase
        end
        S_COL0: begin
          r_cnt <= r_cnt + RB'(2);
          if (r_cnt + 2 >= RB'(R)) state <= S_RWAIT;
        end
        S_MAC: begin
          mac_v    <= 1'b1;
          mac_clr  <= (k_cnt == '0);
          mac_last <= (int'(k_cnt) == M - 1);
          mac_j    <= c_cnt;
          if (int'(k_cnt) == M - 1) begin
            k_cnt <= '0;
            c_cnt <= c_cnt + 1'b1;
            if (c_cnt == CB'(M)) state <= S_MACW;
          end else begin
            k_cnt <= k_cnt + 1'b1;
          end
        end
        S_MACW: ;
        S_VREAD: begin
          iss_v    <= 1'b1;
          iss_mode <= VECTORING;
          state    <= S_VWAIT;
        end
        S_VWAIT: if (c1o_valid) begin
          ang1  <= c1o_z;
          ang2  <= c2o_z;
          r_cnt <= RB'(1);
          state <= S_RREAD;
        end
        S_RREAD: begin
          iss_v    <= 1'b1;
          iss_mode <= ROTATION;
          r_cnt    <= r_cnt + 1'b1;
          if (r_cnt == RB'(R - 1)) state <= S_RWAIT;
        end
        S_RWAIT: ;
        S_OUT: begin
          outq_v <= 1'b1;
          outq_r <= r_cnt;
          outq_c <= c_cnt;
          if (c_cnt + 2 > CB'(M)) begin
            c_cnt <= CB'(1);
            r_cnt <= r_cnt + 1'b1;
            if (r_cnt == RB'(R - 1)) state <= S_FLUSH;
          end else begin
            c_cnt <= c_cnt + CB'(2);
          end
        end
        S_FLUSH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // write-back of MAC results ends the MAC pass
      if (m_out_valid) begin
        mac_wr <= mac_wr + 1'b1;
        if (int'(mac_wr) == M - 1) state <= S_NEXT;
      end
      // write-back of rotation results ends a CORDIC pass
      if (state == S_RWAIT && c1o_valid) begin
        w_cnt <= w_cnt + 1'b1;
      end
      if ((state == S_RWAIT && c1o_valid && w_cnt == RB'(R - 1)) ||
          (state == S_RWAIT && cur.kind == P_COL0)) begin
        state <= S_NEXT;
      end
      // advance the pass list when a pass ends
      if ((m_out_valid && int'(mac_wr) == M - 1) ||
          (state == S_RWAIT && ((c1o_valid && w_cnt == RB'(R - 1)) || cur.kind == P_COL0))) begin
        if (pass_i == PB'(NPASS - 1)) begin
          pass_i <= '0;
          row_i  <= row_i + 1'b1;
          if (int'(row_i) == N - 1) begin
            state <= S_OUT;
            r_cnt <= RB'(1);
            c_cnt <= CB'(1);
          end
        end else begin
          pass_i <= pass_i + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------ RAM port steering
  always_comb begin
    a_en = 1'b0; a_we = 1'b0; a_addr = '0; a_wdata = '0;
    b_en = 1'b0; b_we = 1'b0; b_addr = '0; b_wdata = '0;
    h_rd = 1'b0;
    h_row = row_i[$clog2(N)-1:0];
    h_col = k_cnt[$clog2(M)-1:0];
    unique case (state)
      S_INIT: begin
        a_en = 1'b1; a_we = 1'b1; a_addr = addr(r_cnt, c_cnt);
        b_en = 1'b1; b_we = 1'b1; b_addr = addr(r_cnt, c_cnt + 1'b1);
        a_wdata = '{re: (r_cnt == RB'(c_cnt))        ? alpha_q : '0, im: '0};
        b_wdata = '{re: (r_cnt == RB'(c_cnt + 1'b1)) ? alpha_q : '0, im: '0};
      end
      S_COL0: begin
        a_en = 1'b1; a_we = 1'b1; a_addr = addr(r_cnt, '0);
        b_en = (r_cnt + 1 < RB'(R)); b_we = 1'b1; b_addr = addr(r_cnt + 1'b1, '0);
        a_wdata = '{re: (r_cnt == 0) ? ONE : (r_cnt == RB'(1 + M) + RB'(row_i)) ? -ONE : '0,
                    im: '0};
        b_wdata = '{re: (r_cnt + 1'b1 == RB'(1 + M) + RB'(row_i)) ? -ONE : '0, im: '0};
      end
      S_MAC: begin
        a_en = 1'b1; a_addr = addr(RB'(k_cnt) + 1'b1, c_cnt);
        h_rd = 1'b1;
      end
      S_VREAD: begin
        a_en = 1'b1; a_addr = addr('0, cur.ca);
        b_en = 1'b1; b_addr = addr('0, cur.cb);
      end
      S_RREAD: begin
        a_en = 1'b1; a_addr = addr(r_cnt, cur.ca);
        b_en = 1'b1; b_addr = addr(r_cnt, cur.cb);
      end
      S_OUT: begin
        a_en = 1'b1; a_addr = addr(r_cnt, c_cnt);
        b_en = 1'b1; b_addr = addr(r_cnt, c_cnt + 1'b1);
      end
      default: ;
    endcase
    // results coming back
    if (m_out_valid) begin
      b_en = 1'b1; b_we = 1'b1; b_addr = addr('0, mac_wj);
      b_wdata = '{re: q16_to_word(m_acc_re), im: q16_to_word(m_acc_im)};
    end
    if (state == S_VWAIT && c1o_valid) begin
      a_en = 1'b1; a_we = 1'b1; a_addr = addr('0, cur.ca);
      b_en = 1'b1; b_we = 1'b1; b_addr = addr('0, cur.cb);
      a_wdata = '{re: c1o_x, im: '0};
      b_wdata = (cur.kind == P_PHASE) ? '{re: c2o_x, im: '0} : '0;
    end
    if (state == S_RWAIT && c1o_valid) begin
      a_en = 1'b1; a_we = 1'b1; a_addr = addr(w_cnt, cur.ca);
      b_en = 1'b1; b_we = 1'b1; b_addr = addr(w_cnt, cur.cb);
      if (cur.kind == P_PHASE) begin
        a_wdata = '{re: c1o_x, im: c1o_y};
        b_wdata = '{re: c2o_x, im: c2o_y};
      end else begin
        a_wdata = '{re: c1o_x, im: c2o_x};
        b_wdata = '{re: c1o_y, im: c2o_y};
      end
    end
  end

  // ------------------------------------- CORDIC and MAC input steering
  always_comb begin
    c1_valid = iss_v;
    c2_valid = iss_v;
    c1_mode  = iss_mode;
    c2_mode  = iss_mode;
    c1_z     = (iss_mode == ROTATION) ? ang1 : '0;
    c2_z     = (iss_mode == ROTATION) ? ang2 : '0;
    if (cur.kind == P_PHASE) begin
      c1_x = a_rdata.re; c1_y = a_rdata.im;
      c2_x = b_rdata.re; c2_y = b_rdata.im;
    end else begin
      c1_x = a_rdata.re; c1_y = b_rdata.re;
      if (iss_mode == ROTATION) begin
        c2_x = a_rdata.im; c2_y = b_rdata.im;
      end else begin
        c2_x = a_rdata.re; c2_y = b_rdata.re;
      end
    end
    m_valid = mac_v;
    m_clr   = mac_clr;
    m_last  = mac_last;
    m_a     = h_data;
    m_b     = a_rdata;
  end

  // ----------------------------------------------------------- results
  always_comb begin
    out_valid   = outq_v;
    out_row     = $clog2(M+N)'(outq_r - 1'b1);
    out_col     = $clog2(M)'(outq_c - 1'b1);
    out_data[1] = a_rdata;
    out_data[0] = b_rdata;
  end

  // ------------------------------------------------------- assertions
  a_cordics_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      c1o_valid == c2o_valid)
    else $error("pinv_ctrl: CORDIC outputs out of step");
  a_no_result_while_reading: assert property (@(posedge clk) disable iff (!rst_n)
      c1o_valid |-> (state == S_VWAIT || state == S_RWAIT))
    else $error("pinv_ctrl: CORDIC result arrived while the pass was still reading");

endmodule
