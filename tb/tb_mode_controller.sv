// tb_mode_controller: random routing information and congestion flags; the
// expected output of every input is worked out from the XY-X rule: X first,
// one productive Y step when the X output is congested and the Y output is
// not and the packet heads east (west-first restriction, the default), local
// when both distances are zero.
module tb_mode_controller;
  import noc_pkg::*;

  route_info_t       info [NPORTS];
  logic [NPORTS-1:0] cong, detour;
  port_e             sel  [NPORTS];
  int                checks = 0, failures = 0, n_detour = 0;

  mode_controller dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NPORTS; i++) begin
        info[i].x_pending = 1'($urandom);
        info[i].y_pending = 1'($urandom);
        info[i].x_port    = $urandom_range(0, 1) ? P_EAST : P_WEST;
        info[i].y_port    = $urandom_range(0, 1) ? P_NORTH : P_SOUTH;
      end
      cong = NPORTS'($urandom);
      #1;
      for (int i = 0; i < NPORTS; i++) begin
        port_e exp;
        logic  exp_det;
        exp_det = 0;
        if (!info[i].x_pending && !info[i].y_pending) exp = P_LOCAL;
        else if (!info[i].x_pending) exp = info[i].y_port;
        else if (!info[i].y_pending) exp = info[i].x_port;
        else if (cong[int'(info[i].x_port)] && !cong[int'(info[i].y_port)] &&
                 info[i].x_port == P_EAST) begin
          exp = info[i].y_port; exp_det = 1;
        end else exp = info[i].x_port;
        checks++;
        if (sel[i] != exp || detour[i] != exp_det) begin
          failures++;
          $display("FAIL input %0d sel=%0d exp=%0d", i, sel[i], exp);
        end
        if (exp_det) n_detour++;
      end
    end
    checks++;
    if (n_detour == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
