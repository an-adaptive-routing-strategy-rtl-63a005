// tb_nop_metric: one Neighbors-on-Path metric per direction, all driven with
// the same random packet and buffer state. The expected metric is worked
// out here: the neighbour's admissible outputs under the odd-even rules, the
// mean of the neighbour's free shares over them (full when the neighbour is
// the destination), and the mean of that with the free share toward the
// neighbour, all rounded down.
module tb_nop_metric;
  import noc_pkg::*;

  coord_t cur_x, cur_y, src_x, dst_x, dst_y;
  q_t [3:0] own_free;
  q_t [3:0] nbr_free [4];
  q_t [3:0] metric;
  int checks = 0, failures = 0;

  for (genvar d = 0; d < 4; d++) begin : g_dut
    nop_metric #(.DIR(d)) dut (
      .cur_x, .cur_y, .src_x, .dst_x, .dst_y,
      .own_free (own_free[d]),
      .nbr_free (nbr_free[d]),
      .metric   (metric[d])
    );
  end

  // admissible directions, odd-even rules with signed offsets
  function automatic logic [4:0] adm(int cx, int cy, int sx, int dx, int dy);
    logic [4:0] r = '0;
    int e0 = dx - cx, e1 = cy - dy, v = (cy > dy) ? 0 : 2;
    if (e0 == 0 && e1 == 0) r[4] = 1;
    else if (e0 == 0) r[v] = 1;
    else if (e0 > 0) begin
      if (e1 == 0) r[1] = 1;
      else begin
        if (cx % 2 == 1 || cx == sx) r[v] = 1;
        if (dx % 2 == 1 || e0 != 1) r[1] = 1;
      end
    end else begin
      r[3] = 1;
      if (cx % 2 == 0 && e1 != 0) r[v] = 1;
    end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic int cx = $urandom_range(1, 6), cy = $urandom_range(1, 6);
      automatic int dx = $urandom_range(7), dy = $urandom_range(7), sx = $urandom_range(7);
      cur_x = coord_t'(cx); cur_y = coord_t'(cy);
      dst_x = coord_t'(dx); dst_y = coord_t'(dy); src_x = coord_t'(sx);
      for (int d = 0; d < 4; d++) begin
        own_free[d] = q_t'($urandom_range(255));
        for (int k = 0; k < 4; k++) nbr_free[d][k] = q_t'($urandom_range(255));
      end
      #1;
      for (int d = 0; d < 4; d++) begin
        automatic int nx = cx + ((d == 1) ? 1 : (d == 3) ? -1 : 0);
        automatic int ny = cy + ((d == 2) ? 1 : (d == 0) ? -1 : 0);
        automatic logic [4:0] a = adm(nx, ny, sx, dx, dy);
        automatic int sum = 0, cnt = 0, ahead, exp_m;
        for (int k = 0; k < 4; k++) if (a[k]) begin sum += nbr_free[d][k]; cnt++; end
        ahead = a[4] ? 255 : (cnt > 1) ? sum / 2 : sum;
        exp_m = (own_free[d] + ahead) / 2;
        checks++;
        if (metric[d] != q_t'(exp_m)) begin
          failures++;
          if (failures < 10) $display("FAIL dir %0d at (%0d,%0d) to (%0d,%0d): %0d expected %0d",
                                      d, cx, cy, dx, dy, metric[d], exp_m);
        end
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
