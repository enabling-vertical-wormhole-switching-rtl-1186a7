// 3D NoC-bus hybrid system with bus virtual channel allocation (BVA).
//
// NZ layers, each an NX x NY 2D mesh of wormhole VC routers (vc_router).
// Neighbouring routers of a layer are linked by flit and credit wires; the
// NZ routers at each (x,y) are linked by one vertical pillar (bva_pillar):
// UPDOWN buffers, BVA units, the BVA arbiter and a pipelined (BUS_KIND 0,
// pip_BVA, the default) or TDMA (BUS_KIND 1, TDMA_BVA) data bus. The bus is
// not shared between routers of a layer: every pillar has its own.
//
// Packets are routed XYZ. A packet that must change layer finishes its x and
// y hops in its source layer, goes through the router's UPDOWN port into the
// UPDOWN buffer, reserves a VC in the target layer's UPDOWN input port
// through BVA and then streams over the bus flit by flit (vertical wormhole
// switching), after which it is ejected at the target router's LOCAL port.
//
// The processing units are outside: each router's LOCAL input and output
// port is brought out with credit flow control. loc_in_flit.vc names the
// router input VC to write (the sender keeps VC_DEPTH credits per VC);
// loc_out_flit.vc names the output VC that the router allocated, and the
// receiver returns one credit on loc_out_credit per flit it takes
// (VC_DEPTH credits per VC). Mesh-edge ports are tied off. Single clock.
module noc3d_top
  import noc_pkg::*;
#(
  parameter int unsigned BUS_KIND = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           loc_in_valid  [NZ][NY][NX],
  input  flit_t          loc_in_flit   [NZ][NY][NX],
  output logic [NVC-1:0] loc_in_credit [NZ][NY][NX],
  output logic           loc_out_valid [NZ][NY][NX],
  output flit_t          loc_out_flit  [NZ][NY][NX],
  input  logic [NVC-1:0] loc_out_credit[NZ][NY][NX]
);
  // Per-router port bundles.
  logic           r_in_valid [NZ][NY][NX][NPORT];
  flit_t          r_in_flit  [NZ][NY][NX][NPORT];
  logic [NVC-1:0] r_cr_out   [NZ][NY][NX][NPORT];
  logic           r_out_valid[NZ][NY][NX][NPORT];
  flit_t          r_out_flit [NZ][NY][NX][NPORT];
  logic [NVC-1:0] r_cr_in    [NZ][NY][NX][NPORT];
  logic           r_in2_valid[NZ][NY][NX];
  flit_t          r_in2_flit [NZ][NY][NX];
  logic [NVC-1:0] r_release  [NZ][NY][NX];

  for (genvar z = 0; z < NZ; z++) begin : g_z
    for (genvar y = 0; y < NY; y++) begin : g_y
      for (genvar x = 0; x < NX; x++) begin : g_x
        vc_router u_router (
          .clk, .rst_n,
          .my_x(X_W'(x)), .my_y(Y_W'(y)), .my_z(Z_W'(z)),
          .in_valid(r_in_valid[z][y][x]), .in_flit(r_in_flit[z][y][x]),
          .credit_out(r_cr_out[z][y][x]),
          .ud_in2_valid(r_in2_valid[z][y][x]), .ud_in2_flit(r_in2_flit[z][y][x]),
          .ud_release(r_release[z][y][x]),
          .out_valid(r_out_valid[z][y][x]), .out_flit(r_out_flit[z][y][x]),
          .credit_in(r_cr_in[z][y][x])
        );

        // LOCAL port
        assign r_in_valid[z][y][x][P_LOCAL] = loc_in_valid[z][y][x];
        assign r_in_flit[z][y][x][P_LOCAL]  = loc_in_flit[z][y][x];
        assign loc_in_credit[z][y][x]       = r_cr_out[z][y][x][P_LOCAL];
        assign loc_out_valid[z][y][x]       = r_out_valid[z][y][x][P_LOCAL];
        assign loc_out_flit[z][y][x]        = r_out_flit[z][y][x][P_LOCAL];
        assign r_cr_in[z][y][x][P_LOCAL]    = loc_out_credit[z][y][x];

        // XM input <- west neighbour's XP output; XP input <- east's XM output
        if (x > 0) begin : g_w
          assign r_in_valid[z][y][x][P_XM] = r_out_valid[z][y][x-1][P_XP];
          assign r_in_flit[z][y][x][P_XM]  = r_out_flit[z][y][x-1][P_XP];
          assign r_cr_in[z][y][x][P_XM]    = r_cr_out[z][y][x-1][P_XP];
        end else begin : g_w0
          assign r_in_valid[z][y][x][P_XM] = 1'b0;
          assign r_in_flit[z][y][x][P_XM]  = '0;
          assign r_cr_in[z][y][x][P_XM]    = '0;
        end
        if (x < NX-1) begin : g_e
          assign r_in_valid[z][y][x][P_XP] = r_out_valid[z][y][x+1][P_XM];
          assign r_in_flit[z][y][x][P_XP]  = r_out_flit[z][y][x+1][P_XM];
          assign r_cr_in[z][y][x][P_XP]    = r_cr_out[z][y][x+1][P_XM];
        end else begin : g_e0
          assign r_in_valid[z][y][x][P_XP] = 1'b0;
          assign r_in_flit[z][y][x][P_XP]  = '0;
          assign r_cr_in[z][y][x][P_XP]    = '0;
        end
        if (y > 0) begin : g_s
          assign r_in_valid[z][y][x][P_YM] = r_out_valid[z][y-1][x][P_YP];
          assign r_in_flit[z][y][x][P_YM]  = r_out_flit[z][y-1][x][P_YP];
          assign r_cr_in[z][y][x][P_YM]    = r_cr_out[z][y-1][x][P_YP];
        end else begin : g_s0
          assign r_in_valid[z][y][x][P_YM] = 1'b0;
          assign r_in_flit[z][y][x][P_YM]  = '0;
          assign r_cr_in[z][y][x][P_YM]    = '0;
        end
        if (y < NY-1) begin : g_n
          assign r_in_valid[z][y][x][P_YP] = r_out_valid[z][y+1][x][P_YM];
          assign r_in_flit[z][y][x][P_YP]  = r_out_flit[z][y+1][x][P_YM];
          assign r_cr_in[z][y][x][P_YP]    = r_cr_out[z][y+1][x][P_YM];
        end else begin : g_n0
          assign r_in_valid[z][y][x][P_YP] = 1'b0;
          assign r_in_flit[z][y][x][P_YP]  = '0;
          assign r_cr_in[z][y][x][P_YP]    = '0;
        end
      end
    end
  end

  // One vertical pillar per (x,y).
  for (genvar y = 0; y < NY; y++) begin : g_py
    for (genvar x = 0; x < NX; x++) begin : g_px
      logic           p_out_valid [NZ];
      flit_t          p_out_flit  [NZ];
      logic [NVC-1:0] p_out_credit[NZ];
      logic           p_in_valid  [NZ];
      flit_t          p_in_flit   [NZ];
      logic           p_in2_valid [NZ];
      flit_t          p_in2_flit  [NZ];
      logic [NVC-1:0] p_release   [NZ];

      for (genvar z = 0; z < NZ; z++) begin : g_pz
        assign p_out_valid[z]             = r_out_valid[z][y][x][P_UD];
        assign p_out_flit[z]              = r_out_flit[z][y][x][P_UD];
        assign r_cr_in[z][y][x][P_UD]     = p_out_credit[z];
        assign r_in_valid[z][y][x][P_UD]  = p_in_valid[z];
        assign r_in_flit[z][y][x][P_UD]   = p_in_flit[z];
        assign r_in2_valid[z][y][x]       = p_in2_valid[z];
        assign r_in2_flit[z][y][x]        = p_in2_flit[z];
        assign p_release[z]               = r_release[z][y][x];
      end

      bva_pillar #(.NL(NZ), .BUS_KIND(BUS_KIND)) u_pillar (
        .clk, .rst_n,
        .ud_out_valid(p_out_valid), .ud_out_flit(p_out_flit), .ud_out_credit(p_out_credit),
        .ud_in_valid(p_in_valid), .ud_in_flit(p_in_flit),
        .ud_in2_valid(p_in2_valid), .ud_in2_flit(p_in2_flit),
        .ud_release(p_release)
      );
    end
  end
endmodule
