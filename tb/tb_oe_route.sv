// tb_oe_route: exhaustive check of the odd-even routing function on an 8 x 8
// mesh. For every current node, destination and source column it compares
// the returned direction set with a reference written from the turn rules
// with signed offsets, and checks that every returned direction is minimal
// and that a packet not yet at its destination always gets at least one.
module tb_oe_route;
  import noc_pkg::*;

  localparam int K = 8;

  coord_t cur_x, cur_y, src_x, dst_x, dst_y;
  logic [NPORT-1:0] dirs;
  int checks = 0, failures = 0;

  oe_route dut (.*);

  function automatic logic [NPORT-1:0] ref_route(int cx, int cy, int sx, int dx, int dy);
    logic [NPORT-1:0] r = '0;
    int e0 = dx - cx;          // > 0: east
    int e1 = cy - dy;          // > 0: north
    int v  = (e1 > 0) ? 0 : 2; // N or S
    if (e0 == 0 && e1 == 0) r[4] = 1'b1;
    else if (e0 == 0) r[v] = 1'b1;
    else if (e0 > 0) begin
      if (e1 == 0) r[1] = 1'b1;
      else begin
        if ((cx % 2) == 1 || cx == sx) r[v] = 1'b1;
        if ((dx % 2) == 1 || e0 != 1) r[1] = 1'b1;
      end
    end else begin
      r[3] = 1'b1;
      if ((cx % 2) == 0 && e1 != 0) r[v] = 1'b1;
    end
    return r;
  endfunction

  initial begin
    for (int cx = 0; cx < K; cx++)
      for (int cy = 0; cy < K; cy++)
        for (int dx = 0; dx < K; dx++)
          for (int dy = 0; dy < K; dy++)
            for (int sx = 0; sx < K; sx++) begin
              cur_x = coord_t'(cx); cur_y = coord_t'(cy);
              dst_x = coord_t'(dx); dst_y = coord_t'(dy); src_x = coord_t'(sx);
              #1;
              checks++;
              if (dirs !== ref_route(cx, cy, sx, dx, dy)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL cur (%0d,%0d) src_x %0d dst (%0d,%0d): got %b", cx, cy, sx, dx, dy, dirs);
              end
              checks++;
              if ((dirs[0] && dy >= cy) || (dirs[2] && dy <= cy) ||
                  (dirs[1] && dx <= cx) || (dirs[3] && dx >= cx) ||
                  ((cx != dx || cy != dy) && dirs[3:0] == '0 && ((cx % 2) == 1 || cx == sx || (dx % 2) == 1 || dx != cx + 1))) begin
                failures++;
                if (failures < 10) $display("FAIL non-minimal or empty set at cur (%0d,%0d)", cx, cy);
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
