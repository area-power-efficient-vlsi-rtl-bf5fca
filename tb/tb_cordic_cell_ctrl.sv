// tb_cordic_cell_ctrl: exhaustive test of the micro-cell control unit.
// All 16 combinations of sign(x), sign(y), sign(z) and mode are applied and
// the direction controls are compared with the rules written out here:
// vectoring turns clockwise when x and y have equal signs and adds the angle
// when it turns clockwise; rotation turns clockwise when z >= 0 and then
// subtracts the angle.
module tb_cordic_cell_ctrl;
  import pinv_pkg::*;

  logic sx, sy, sz;
  cordic_mode_e mode;
  cell_ctrl_t ctrl;
  int checks = 0, failures = 0;

  cordic_cell_ctrl dut (.sign_x(sx), .sign_y(sy), .sign_z(sz), .mode(mode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_cw, exp_add;
      {mode, sx, sy, sz} = 4'(v);
      #1;
      if (mode == VECTORING) begin
        // x, y same sign: the vector lies in quadrant I or III
        exp_cw  = (sx && sy) || (!sx && !sy);
        exp_add = exp_cw;
      end else begin
        exp_cw  = !sz;
        exp_add = sz;
      end
      checks++;
      if (ctrl.cw !== exp_cw || ctrl.z_add !== exp_add) begin
        failures++;
        $display("mode=%0d sx=%0d sy=%0d sz=%0d: got cw=%0d add=%0d, expected %0d %0d",
                 mode, sx, sy, sz, ctrl.cw, ctrl.z_add, exp_cw, exp_add);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
