// Route computation: XY dimension-order routing on a 2D mesh.
//
// A head flit first travels along X until its column matches, then along Y,
// then leaves through the local (ejection) port. Combinational; the router's
// own coordinates come in as inputs so every router can share the same code.
// XY routing is the reference algorithm of the evaluation; the adaptive
// OPT-Y routing function and its selection functions are not part of this
// design.
module noc_route_xy
  import pfl_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x_i,
  input  logic [COORD_W-1:0] cur_y_i,
  input  logic [COORD_W-1:0] dst_x_i,
  input  logic [COORD_W-1:0] dst_y_i,
  output logic [2:0]         port_o     // P_XP, P_YP, P_XM, P_YM or P_LOC
);
  always_comb begin
    if      (dst_x_i > cur_x_i) port_o = 3'(P_XP);
    else if (dst_x_i < cur_x_i) port_o = 3'(P_XM);
    else if (dst_y_i > cur_y_i) port_o = 3'(P_YP);
    else if (dst_y_i < cur_y_i) port_o = 3'(P_YM);
    else                        port_o = 3'(P_LOC);
  end
endmodule
