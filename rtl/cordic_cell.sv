// cordic_cell: one micro-cell (pipeline stage) of the pipelined CORDIC.
//
// Stage i turns (x, y) by the elementary angle atan(2^-i), clockwise or
// counter-clockwise, with two shifts and two add/subtracts, and updates the
// angle z by the same elementary angle:
//   cw : x' = x + (y >>> i),  y' = y - (x >>> i)
//   ccw: x' = x - (y >>> i),  y' = y + (x >>> i)
// The direction comes from cordic_cell_ctrl (sign bits and mode). The mode
// bit is registered with the data so that every sample carries its own mode
// down the pipeline, and samples of either mode can follow each other.
//
// Timing: one register stage, latency 1 cycle, one sample per cycle.
// out_valid follows in_valid every cycle; the data registers load only when
// in_valid is high, so an idle cell holds its previous values and its
// arithmetic does not toggle (the design's power-saving rule for idle cells).
// No reset on the data registers; out_valid is reset.
module cordic_cell
  import pinv_pkg::*;
#(
  parameter int unsigned SHIFT = 0,        // cell index i
  parameter int unsigned IW    = DW + GUARD + FGUARD // internal x/y width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cordic_mode_e         in_mode,
  input  logic signed [IW-1:0] in_x,
  input  logic signed [IW-1:0] in_y,
  input  logic signed [AW-1:0] in_z,
  output logic                 out_valid,
  output cordic_mode_e         out_mode,
  output logic signed [IW-1:0] out_x,
  output logic signed [IW-1:0] out_y,
  output logic signed [AW-1:0] out_z
);

  localparam logic signed [AW-1:0] ATAN = atan_const(SHIFT);

  cell_ctrl_t            ctrl;
  logic signed [IW-1:0]  x_sh, y_sh, nx, ny;
  logic signed [AW-1:0]  nz;

  cordic_cell_ctrl u_ctrl (
    .sign_x (in_x[IW-1]),
    .sign_y (in_y[IW-1]),
    .sign_z (in_z[AW-1]),
    .mode   (in_mode),
    .ctrl   (ctrl)
  );

  always_comb begin
    x_sh = in_x >>> SHIFT;
    y_sh = in_y >>> SHIFT;
    if (ctrl.cw) begin
      nx = in_x + y_sh;
      ny = in_y - x_sh;
    end else begin
      nx = in_x - y_sh;
      ny = in_y + x_sh;
    end
    nz = ctrl.z_add ? in_z + ATAN : in_z - ATAN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_mode <= in_mode;
      out_x    <= nx;
      out_y    <= ny;
      out_z    <= nz;
    end
  end

endmodule
