// BVA unit: the per-layer part of bus virtual channel allocation.
//
// Source side (this layer sends a packet): the VA requests of the UPDOWN
// buffer VCs go to a V:1 arbiter, and their OR is the layer's BVA request to
// the pillar's BVA arbiter. When the BVA arbiter grants this layer, the unit
// drives the target layer of the locally granted VC on the Target_layer_bus,
// and the VCID that comes back on the BVA_result_bus in the same cycle is
// handed to the UPDOWN buffer (alloc_*), which stores it at the clock edge.
//
// Target side (this layer receives a packet): the free VC list of this
// layer's UPDOWN input port is kept here as one bit per VC. When bus_granted
// is high and the Target_layer_bus carries this layer's number, the unit takes
// the lowest free VC, drives its index on the BVA_result_bus and marks it busy.
// free_vc_exist (registered state, OR of the list) tells the other layers that
// at least one VC is idle. A VC returns to the list when the router reports
// that its tail flit has left (release).
//
// The shared buses are modelled as drive enable plus value; the pillar ORs
// the enabled values (the tri-state drivers of the document). The whole
// request-grant-result sequence completes in one cycle. The structure follows
// the document; the single-cycle timing, round-robin arbitration and the
// lowest-index pick from the free list are this design's choices.
module bva_unit
  import noc_pkg::*;
#(
  parameter int unsigned MY_Z = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // source side
  input  logic [NVC-1:0]  va_req,
  input  logic [Z_W-1:0]  des_layer [NVC],
  output logic            bva_req,
  input  logic            bva_grant,
  output logic [NVC-1:0]  va_grant,        // local V:1 winner
  output logic            tl_drive_en,
  output logic [Z_W-1:0]  tl_drive,
  input  logic [VC_W-1:0] bva_result_bus,
  output logic            alloc_valid,
  output logic [VC_W-1:0] alloc_idx,
  output logic [VC_W-1:0] alloc_vcid,
  // target side
  input  logic            bus_granted,
  input  logic [Z_W-1:0]  target_layer_bus,
  input  logic [NVC-1:0]  release_vc,
  output logic            free_vc_exist,
  output logic            res_drive_en,
  output logic [VC_W-1:0] res_drive
);
  // ---- source side
  logic            loc_any;
  logic [VC_W-1:0] loc_idx;

  rr_arbiter #(.N(NVC)) u_varb (
    .clk, .rst_n, .req(va_req), .advance(bva_grant),
    .gnt(va_grant), .gnt_idx(loc_idx), .any(loc_any)
  );

  assign bva_req     = |va_req;
  assign tl_drive_en = bva_grant && loc_any;
  assign tl_drive    = tl_drive_en ? des_layer[loc_idx] : '0;
  assign alloc_valid = bva_grant && loc_any;
  assign alloc_idx   = loc_idx;
  assign alloc_vcid  = bva_result_bus;

  // ---- target side
  logic [NVC-1:0]  free_list;
  logic [VC_W-1:0] pick;
  logic            pick_ok;
  logic            take;

  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int v = NVC-1; v >= 0; v--)
      if (free_list[v]) begin
        pick_ok = 1'b1;
        pick    = VC_W'(v);
      end
  end

  assign take          = bus_granted && (int'(target_layer_bus) == MY_Z) && pick_ok;
  assign res_drive_en  = take;
  assign res_drive     = take ? pick : '0;
  assign free_vc_exist = |free_list;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free_list <= '1;
    else        free_list <= (free_list | release_vc) & ~(take ? (NVC'(1) << pick) : '0);
  end

  assert property (@(posedge clk) disable iff (!rst_n) (release_vc & free_list) == '0)
    else $error("bva_unit: release of a VC that is already free");
  assert property (@(posedge clk) disable iff (!rst_n)
                   bus_granted && int'(target_layer_bus) == MY_Z |-> pick_ok)
    else $error("bva_unit: allocation request with an empty free VC list");
endmodule
