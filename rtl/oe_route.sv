// oe_route: odd-even minimal adaptive routing function.
//
// Given the node that holds a head flit, the packet's source column and its
// destination, returns the set of output directions the packet may take, one
// bit per direction (index = noc_pkg::dir_e). Only minimal directions are
// returned, at most two of them. The odd-even turn model forbids east-to-north
// and east-to-south turns in even columns and north-to-west and south-to-west
// turns in odd columns, which keeps wormhole switching free of deadlock
// without virtual channels. The selection strategy runs on top of this
// function, which is the one the network is evaluated with; the rules are the
// published odd-even turn model, written here from its definition.
//
// Purely combinational.
module oe_route
  import noc_pkg::*;
(
  input  coord_t            cur_x,
  input  coord_t            cur_y,
  input  coord_t            src_x,
  input  coord_t            dst_x,
  input  coord_t            dst_y,
  output logic [NPORT-1:0]  dirs
);

  dir_e vdir;

  always_comb begin
    vdir = (dst_y < cur_y) ? DIR_N : DIR_S;
    dirs = '0;
    if (dst_x == cur_x && dst_y == cur_y) begin
      dirs[DIR_L] = 1'b1;
    end else if (dst_x == cur_x) begin
      dirs[vdir] = 1'b1;
    end else if (dst_x > cur_x) begin
      if (dst_y == cur_y) begin
        dirs[DIR_E] = 1'b1;
      end else begin
        // vertical move allowed in odd columns or in the source column
        if (cur_x[0] || cur_x == src_x) dirs[vdir] = 1'b1;
        // keep going east unless the destination column is even and next
        if (dst_x[0] || (dst_x - cur_x) != coord_t'(1)) dirs[DIR_E] = 1'b1;
      end
    end else begin
      dirs[DIR_W] = 1'b1;
      if (!cur_x[0] && dst_y != cur_y) dirs[vdir] = 1'b1;
    end
  end

endmodule
