// 2D mesh network-on-chip whose links tolerate partially faulty wires.
//
// MESH_X x MESH_Y routers (4x4 by default, as in the evaluated system), each
// with PFL encoders on its four output links and PFL decoders on its four
// input links. Router (x, y) has index r = y * MESH_X + x; X+ leads to x + 1,
// Y+ to y + 1.
//
// The data wires of each directed link are physical wires, not logic: they
// are brought out of this module. link_tx_o[r][d] is what router r drives
// onto its output link in direction d (P_XP, P_YP, P_XM, P_YM), and
// link_rx_i[r][d] is what the far end of that same link receives; it is fed
// into the input port of the neighbour facing it. Connecting link_rx_i to
// link_tx_o gives a fault-free network; forcing some data bits gives stuck
// wires. Links that leave the mesh edge are driven but unused, and their
// receive inputs are ignored. The back channel of each link (nack, m, VC
// credits) is wired inside and assumed sound.
//
// Local ports: one injection and one ejection port per router. A source may
// send a flit on VC v only while it holds a credit for v (it starts with
// BUF_DEPTH credits per VC and gets one back on inj_credit_o[r][v]).
// Ejection has no back-pressure.
//
// The mesh size, 40-wire links and 6 VCs of 6 flits follow the evaluated
// system; bringing the wires out and the credit interface of the local port
// are this design's own choices.
module noc_mesh
  import pfl_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned NVC       = 6,
  parameter int unsigned BUF_DEPTH = 6,
  parameter int unsigned OUT_DEPTH = 2,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic             clk,
  input  logic             rst_n,
  // link wires
  output link_fwd_t        link_tx_o   [N][4],
  input  link_fwd_t        link_rx_i   [N][4],
  // local ports
  input  logic             inj_valid_i [N],
  input  flit_t            inj_flit_i  [N],
  output logic [NVC-1:0]   inj_credit_o[N],
  output logic             ej_valid_o  [N],
  output flit_t            ej_flit_o   [N],
  // link status, per output link
  output logic [SEG_W-1:0] link_m_o    [N][4],
  output logic             link_dead_o [N][4]
);
  link_bwd_t      bwd_in  [N][4];   // back channel seen by router r's output d
  link_bwd_t      bwd_out [N][4];   // back channel driven by router r's input d
  logic [NVC-1:0] cr_in   [N][4];
  logic [NVC-1:0] cr_out  [N][4];
  link_fwd_t      fwd_in  [N][4];
  logic [LINK_W-1:0] fv   [N][4];

  function automatic int opposite(int d);
    return (d + 2) % 4;
  endfunction

  // neighbour index in direction d, -1 at the mesh edge
  function automatic int nbr(int r, int d);
    int x, y;
    x = r % MESH_X;
    y = r / MESH_X;
    case (d)
      P_XP:    return (x + 1 < MESH_X) ? r + 1 : -1;
      P_YP:    return (y + 1 < MESH_Y) ? r + MESH_X : -1;
      P_XM:    return (x > 0) ? r - 1 : -1;
      default: return (y > 0) ? r - MESH_X : -1;
    endcase
  endfunction

  for (genvar r = 0; r < N; r++) begin : g_r
    for (genvar d = 0; d < 4; d++) begin : g_d
      localparam int NB = nbr(r, d);
      if (NB >= 0) begin : g_link
        // input d of router r is fed by output opposite(d) of router NB
        assign fwd_in[r][d]  = link_rx_i[NB][opposite(d)];
        assign bwd_in[r][d]  = bwd_out[NB][opposite(d)];
        assign cr_in[r][d]   = cr_out[NB][opposite(d)];
      end else begin : g_edge
        assign fwd_in[r][d]  = '0;
        assign bwd_in[r][d]  = '0;
        assign cr_in[r][d]   = '0;
      end
    end

    noc_router #(.NVC(NVC), .BUF_DEPTH(BUF_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_router (
      .clk, .rst_n,
      .cur_x_i(COORD_W'(r % MESH_X)), .cur_y_i(COORD_W'(r / MESH_X)),
      .out_fwd_o(link_tx_o[r]), .out_bwd_i(bwd_in[r]), .out_credit_i(cr_in[r]),
      .in_fwd_i(fwd_in[r]), .in_bwd_o(bwd_out[r]), .in_credit_o(cr_out[r]),
      .inj_valid_i(inj_valid_i[r]), .inj_flit_i(inj_flit_i[r]),
      .inj_credit_o(inj_credit_o[r]),
      .ej_valid_o(ej_valid_o[r]), .ej_flit_o(ej_flit_o[r]),
      .out_m_o(link_m_o[r]), .out_dead_o(link_dead_o[r]), .in_fv_o(fv[r])
    );
  end
endmodule
