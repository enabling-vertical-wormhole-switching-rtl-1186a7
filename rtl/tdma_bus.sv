// TDMA vertical bus with BVA (TDMA_BVA).
//
// Two unidirectional lanes per pillar, each carrying one flit per cycle from
// any layer directly to its target layer (one hop). Time slots go to single
// flits, not to whole packets: every cycle each lane's arbiter grants one of
// the layers that have a flit for that direction (have_up/have_down), by a
// rotating priority alone, and the granted layer's UPDOWN buffer puts a flit
// on the lane. The flit is registered and delivered to its target layer the
// next cycle, with no back-pressure: BVA has reserved a whole-packet VC there.
// A grant whose layer sends on the other lane instead is an unused slot.
//
// Per-flit slots and priority-only granting are the document's; the
// round-robin rotation and the one-cycle registered delivery are this
// design's choices.
module tdma_bus
  import noc_pkg::*;
#(
  parameter int unsigned NL = NZ
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      have_up    [NL],
  input  logic      have_down  [NL],
  input  logic      inj_valid  [NL],
  input  bus_flit_t inj_flit   [NL],
  output logic      up_ready   [NL],
  output logic      down_ready [NL],
  output logic      ej_up_valid [NL],
  output flit_t     ej_up_flit  [NL],
  output logic      ej_dn_valid [NL],
  output flit_t     ej_dn_flit  [NL]
);
  localparam int unsigned IW = $clog2(NL > 1 ? NL : 2);

  logic [NL-1:0] req_up, req_dn, gnt_up, gnt_dn;
  logic [IW-1:0] sel_up, sel_dn;
  logic          any_up, any_dn;

  always_comb begin
    for (int k = 0; k < NL; k++) begin
      req_up[k]     = have_up[k];
      req_dn[k]     = have_down[k];
      up_ready[k]   = gnt_up[k];
      down_ready[k] = gnt_dn[k];
    end
  end

  rr_arbiter #(.N(NL)) u_up (
    .clk, .rst_n, .req(req_up), .advance(1'b1),
    .gnt(gnt_up), .gnt_idx(sel_up), .any(any_up)
  );
  rr_arbiter #(.N(NL)) u_dn (
    .clk, .rst_n, .req(req_dn), .advance(1'b1),
    .gnt(gnt_dn), .gnt_idx(sel_dn), .any(any_dn)
  );

  logic      up_v, dn_v;
  bus_flit_t up_r, dn_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_v <= 1'b0;
      dn_v <= 1'b0;
      up_r <= '0;
      dn_r <= '0;
    end else begin
      up_v <= any_up && inj_valid[sel_up] && (inj_flit[sel_up].layer > sel_up);
      dn_v <= any_dn && inj_valid[sel_dn] && (inj_flit[sel_dn].layer < sel_dn);
      up_r <= inj_flit[sel_up];
      dn_r <= inj_flit[sel_dn];
    end
  end

  always_comb begin
    for (int k = 0; k < NL; k++) begin
      ej_up_valid[k] = up_v && int'(up_r.layer) == k;
      ej_up_flit[k]  = up_r.flit;
      ej_dn_valid[k] = dn_v && int'(dn_r.layer) == k;
      ej_dn_flit[k]  = dn_r.flit;
    end
  end
endmodule
