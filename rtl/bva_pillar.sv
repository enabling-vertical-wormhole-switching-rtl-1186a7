// One pillar of the 3D NoC-bus hybrid: everything vertical at one (x,y).
//
// Per layer it holds the UPDOWN buffer fed by the router's UD output port and
// the BVA unit; once per pillar the BVA arbiter, the three shared BVA buses
// (Target_layer_bus, bus_granted, BVA_result_bus plus the NL free_vc_exist
// wires) and the data bus, which is the pipelined bus (BUS_KIND 0, pip_BVA)
// or the TDMA bus (BUS_KIND 1, TDMA_BVA). The shared buses, tri-state in the
// document, are ORs of enable-gated drivers here; only the granted layer and
// the target layer drive at any time.
//
// Packet flow: router UD output -> UPDOWN buffer VC -> head flit requests
// BVA -> VCID stored -> flits tagged with target layer and VCID go on the
// data bus -> target router's UD input VC (two write channels, one per lane)
// -> the router reports the tail flit's departure -> the VC is free again.
module bva_pillar
  import noc_pkg::*;
#(
  parameter int unsigned NL       = NZ,
  parameter int unsigned BUS_KIND = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  // router UD output ports
  input  logic           ud_out_valid [NL],
  input  flit_t          ud_out_flit  [NL],
  output logic [NVC-1:0] ud_out_credit[NL],
  // router UD input ports
  output logic           ud_in_valid  [NL],
  output flit_t          ud_in_flit   [NL],
  output logic           ud_in2_valid [NL],
  output flit_t          ud_in2_flit  [NL],
  input  logic [NVC-1:0] ud_release   [NL]
);

  // BVA wires
  logic [NL-1:0]   bva_req, bva_grant, free_vc_exist;
  logic            bus_granted;
  logic [Z_W-1:0]  target_layer_bus;
  logic [VC_W-1:0] bva_result_bus;
  logic            tl_en  [NL];
  logic [Z_W-1:0]  tl_val [NL];
  logic            res_en [NL];
  logic [VC_W-1:0] res_val[NL];

  // UPDOWN buffer <-> BVA unit
  logic [NVC-1:0]  va_req   [NL];
  logic [Z_W-1:0]  des_layer[NL][NVC];
  logic            alloc_valid [NL];
  logic [VC_W-1:0] alloc_idx   [NL];
  logic [VC_W-1:0] alloc_vcid  [NL];

  // UPDOWN buffer <-> data bus
  logic      have_up [NL], have_down [NL];
  logic      up_ready[NL], down_ready[NL];
  logic      inj_valid [NL];
  bus_flit_t inj_flit  [NL];

  always_comb begin
    target_layer_bus = '0;
    bva_result_bus   = '0;
    for (int k = 0; k < NL; k++) begin
      if (tl_en[k])  target_layer_bus |= tl_val[k];
      if (res_en[k]) bva_result_bus   |= res_val[k];
    end
  end

  bva_arbiter #(.NL(NL)) u_arb (
    .clk, .rst_n, .bva_req, .bva_grant, .bus_granted
  );

  for (genvar k = 0; k < NL; k++) begin : g_layer
    logic [NVC-1:0] va_grant_unused;

    updown_buffer #(.MY_Z(k)) u_buf (
      .clk, .rst_n,
      .in_valid(ud_out_valid[k]), .in_flit(ud_out_flit[k]), .credit_out(ud_out_credit[k]),
      .free_vc_exist(free_vc_exist),
      .va_req(va_req[k]), .des_layer(des_layer[k]),
      .alloc_valid(alloc_valid[k]), .alloc_idx(alloc_idx[k]), .alloc_vcid(alloc_vcid[k]),
      .have_up(have_up[k]), .have_down(have_down[k]),
      .up_ready(up_ready[k]), .down_ready(down_ready[k]),
      .inj_valid(inj_valid[k]), .inj_flit(inj_flit[k])
    );

    bva_unit #(.MY_Z(k)) u_bva (
      .clk, .rst_n,
      .va_req(va_req[k]), .des_layer(des_layer[k]),
      .bva_req(bva_req[k]), .bva_grant(bva_grant[k]), .va_grant(va_grant_unused),
      .tl_drive_en(tl_en[k]), .tl_drive(tl_val[k]),
      .bva_result_bus(bva_result_bus),
      .alloc_valid(alloc_valid[k]), .alloc_idx(alloc_idx[k]), .alloc_vcid(alloc_vcid[k]),
      .bus_granted(bus_granted), .target_layer_bus(target_layer_bus),
      .release_vc(ud_release[k]), .free_vc_exist(free_vc_exist[k]),
      .res_drive_en(res_en[k]), .res_drive(res_val[k])
    );
  end

  if (BUS_KIND == 0) begin : g_pip
    pip_bus #(.NL(NL)) u_bus (
      .clk, .rst_n,
      .inj_valid, .inj_flit, .up_ready, .down_ready,
      .ej_up_valid(ud_in_valid), .ej_up_flit(ud_in_flit),
      .ej_dn_valid(ud_in2_valid), .ej_dn_flit(ud_in2_flit)
    );
  end else begin : g_tdma
    tdma_bus #(.NL(NL)) u_bus (
      .clk, .rst_n,
      .have_up, .have_down,
      .inj_valid, .inj_flit, .up_ready, .down_ready,
      .ej_up_valid(ud_in_valid), .ej_up_flit(ud_in_flit),
      .ej_dn_valid(ud_in2_valid), .ej_dn_flit(ud_in2_flit)
    );
  end

  // Only the granted layer drives the Target_layer_bus, only one target layer
  // answers on the BVA_result_bus.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bva_grant))
    else $error("bva_pillar: two layers drive Target_layer_bus");
endmodule
