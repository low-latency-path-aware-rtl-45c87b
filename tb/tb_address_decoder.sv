// tb_address_decoder: random router coordinates and destinations; the
// productive directions are recomputed here from the coordinates.
module tb_address_decoder;
  import noc_pkg::*;

  coord_t      cur_x, cur_y;
  flit_t       flit;
  route_info_t info;
  head_flit_t  h;
  int          checks = 0, failures = 0;

  address_decoder dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      cur_x = coord_t'($urandom); cur_y = coord_t'($urandom);
      h = head_flit_t'({$urandom, $urandom});
      h.ftype = FT_HEAD;
      if (n % 4 == 0) h.dst_x = cur_x;
      if (n % 5 == 0) h.dst_y = cur_y;
      flit = flit_t'(h);
      #1;
      checks++;
      if (info.x_pending != (int'(h.dst_x) != int'(cur_x)) ||
          info.y_pending != (int'(h.dst_y) != int'(cur_y)) ||
          (int'(h.dst_x) > int'(cur_x) && info.x_port != P_EAST) ||
          (int'(h.dst_x) < int'(cur_x) && info.x_port != P_WEST) ||
          (int'(h.dst_y) > int'(cur_y) && info.y_port != P_NORTH) ||
          (int'(h.dst_y) < int'(cur_y) && info.y_port != P_SOUTH)) begin
        failures++;
        $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d)", cur_x, cur_y, h.dst_x, h.dst_y);
      end
    end
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
