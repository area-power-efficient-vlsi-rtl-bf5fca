// cordic_pipe: generic pipelined CORDIC with scale correction.
//
// NCELL micro-cells (default 13) are chained, cell i shifting by i. Each
// sample carries a mode bit, so one pipeline serves both jobs of the
// pseudo-inverse datapath:
//   vectoring : z_in = 0; (x, y) is turned onto the x axis; out_z is the
//               clockwise angle turned, out_x the (signed) magnitude, out_y ~ 0.
//   rotation  : (x, y) is turned clockwise by z_in. Feeding back the out_z
//               of a vectoring sample as z_in applies the same turn to other
//               vectors.
// x and y enter as 16Q8 words and are carried wider inside the cells: GUARD
// integer bits so that the CORDIC gain (1.647) cannot overflow them, and
// FGUARD fraction bits so that the truncating shifts of 13 cells do not
// pile up error. After the last cell both go through scale_corr (x 155/256)
// in a final register stage, are rounded back to 8 fraction bits and
// saturated to 16Q8. out_z is not scaled.
//
// Timing: latency NCELL + 1 cycles, one sample accepted per cycle, no stall.
// Registers load only for valid samples, so an idle pipeline holds its state.
// The 13 cells, the 16Q8 format and the shift-add correction follow the
// design; guard bits, saturation and the angle format are this
// implementation's choices.
module cordic_pipe
  import pinv_pkg::*;
#(
  parameter int unsigned NC = NCELL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cordic_mode_e         in_mode,
  input  word_t                in_x,
  input  word_t                in_y,
  input  logic signed [AW-1:0] in_z,
  output logic                 out_valid,
  output cordic_mode_e         out_mode,
  output word_t                out_x,
  output word_t                out_y,
  output logic signed [AW-1:0] out_z
);

  localparam int unsigned IW = DW + GUARD + FGUARD;
  localparam logic signed [IW-1:0] WMAX = IW'((1 <<< (DW-1)) - 1);
  localparam logic signed [IW-1:0] WMIN = -IW'(1 <<< (DW-1));

  logic                 v [NC+1];
  cordic_mode_e         md[NC+1];
  logic signed [IW-1:0] xs[NC+1];
  logic signed [IW-1:0] ys[NC+1];
  logic signed [AW-1:0] zs[NC+1];

  assign v[0]  = in_valid;
  assign md[0] = in_mode;
  assign xs[0] = IW'(in_x) <<< FGUARD;
  assign ys[0] = IW'(in_y) <<< FGUARD;
  assign zs[0] = in_z;

  for (genvar i = 0; i < NC; i++) begin : g_cell
    cordic_cell #(.SHIFT(i), .IW(IW)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[i]),
      .in_mode   (md[i]),
      .in_x      (xs[i]),
      .in_y      (ys[i]),
      .in_z      (zs[i]),
      .out_valid (v[i+1]),
      .out_mode  (md[i+1]),
      .out_x     (xs[i+1]),
      .out_y     (ys[i+1]),
      .out_z     (zs[i+1])
    );
  end

  logic signed [IW-1:0] xc, yc;

  scale_corr #(.W(IW)) u_scx (.din(xs[NC]), .dout(xc));
  scale_corr #(.W(IW)) u_scy (.din(ys[NC]), .dout(yc));

  // round to the 16Q8 grid, then saturate
  function automatic word_t sat(logic signed [IW-1:0] w);
    logic signed [IW-1:0] a;
    a = (w + IW'(1 <<< (FGUARD - 1))) >>> FGUARD;
    if (a > WMAX)      return word_t'(WMAX);
    else if (a < WMIN) return word_t'(WMIN);
    else               return word_t'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[NC];
  end

  always_ff @(posedge clk) begin
    if (v[NC]) begin
      out_mode <= md[NC];
      out_x    <= sat(xc);
      out_y    <= sat(yc);
      out_z    <= zs[NC];
    end
  end

endmodule
