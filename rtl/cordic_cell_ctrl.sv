// cordic_cell_ctrl: control unit of one CORDIC micro-cell.
//
// The unit looks at the sign bits of the cell's x, y and z inputs and at the
// CORDIC mode bit that travels down the pipeline with the data. It forms two
// candidate direction controls, one for vectoring and one for rotation, and
// the mode bit selects which one drives the cell. Purely combinational.
//
//   vectoring : drive y towards 0. The rotation is clockwise when x and y have
//               the same sign, so the vector is turned onto the nearer half of
//               the x axis (x may end up negative; the magnitude is then -x).
//               z accumulates the clockwise angle turned (z_add = cw).
//   rotation  : drive z towards 0. z >= 0 means "still to turn clockwise", so
//               the cell rotates clockwise and subtracts the elementary angle.
//
// The block structure (sign inputs, two generators, mode-controlled select)
// follows the design's micro-cell control unit; the exact sign rules are
// this implementation's choice.
module cordic_cell_ctrl
  import pinv_pkg::*;
(
  input  logic         sign_x,
  input  logic         sign_y,
  input  logic         sign_z,
  input  cordic_mode_e mode,
  output cell_ctrl_t   ctrl
);

  cell_ctrl_t vec_ctrl, rot_ctrl;

  always_comb begin
    vec_ctrl.cw    = (sign_x == sign_y);
    vec_ctrl.z_add = vec_ctrl.cw;
    rot_ctrl.cw    = ~sign_z;
    rot_ctrl.z_add = sign_z;
    ctrl = (mode == ROTATION) ? rot_ctrl : vec_ctrl;
  end

endmodule
