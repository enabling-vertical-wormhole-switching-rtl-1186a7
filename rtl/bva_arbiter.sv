// BVA arbiter: one per pillar, physically in the middle layer of the stack.
//
// Each layer's BVA unit sends one request wire (the OR of its VA requests).
// Every cycle the arbiter grants at most one of them, round-robin, on the
// one-hot bva_grant lines, and raises bus_granted, which every layer's target
// side watches together with the Target_layer_bus. Combinational from request
// to grant; the priority pointer moves after every grant. Granting one request
// per cycle is the document's; round-robin is this design's choice.
module bva_arbiter #(
  parameter int unsigned NL = noc_pkg::NZ
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NL-1:0] bva_req,
  output logic [NL-1:0] bva_grant,
  output logic          bus_granted
);
  logic [$clog2(NL > 1 ? NL : 2)-1:0] idx_unused;

  rr_arbiter #(.N(NL)) u_arb (
    .clk, .rst_n, .req(bva_req), .advance(1'b1),
    .gnt(bva_grant), .gnt_idx(idx_unused), .any(bus_granted)
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bva_grant))
    else $error("bva_arbiter: more than one grant");
endmodule
