// cmac: complex multiply-accumulate unit.
//
// Forms sum_k a_k * b_k over a run of complex 16Q8 operand pairs with four
// real multipliers (re*re, im*im, re*im, im*re) and two accumulators. The
// pseudo-inverse datapath uses it for the leader row H_i * P^(1/2) of every
// pre-array: a_k = H(i,k), b_k = P^(1/2)(k,j).
//
// Interface and timing: on a cycle with in_valid, the product of a and b is
// added to the accumulator, which is first cleared when in_clr is high. The
// registered accumulator (Q16, 32 bits per part, {re, im} = 64 bits) is
// presented on acc; out_valid is high for one cycle after an input that
// carried in_last. The operand registers and the accumulator load only on
// valid inputs, so an idle unit does not toggle. The four-multiplier
// structure follows the design; accumulator width (no overflow guard bits)
// and the framing signals are this implementation's choices.
module cmac
  import pinv_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_clr,
  input  logic                   in_last,
  input  cplx_t                  a,
  input  cplx_t                  b,
  output logic                   out_valid,
  output logic signed [2*DW-1:0] acc_re,
  output logic signed [2*DW-1:0] acc_im
);

  logic signed [2*DW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [2*DW-1:0] base_re, base_im;

  always_comb begin
    p_rr    = a.re * b.re;
    p_ii    = a.im * b.im;
    p_ri    = a.re * b.im;
    p_ir    = a.im * b.re;
    base_re = in_clr ? '0 : acc_re;
    base_im = in_clr ? '0 : acc_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && in_last;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      acc_re <= base_re + p_rr - p_ii;
      acc_im <= base_im + p_ri + p_ir;
    end
  end

endmodule
