// UPDOWN buffer: the output-side buffer between a router's UPDOWN port and
// the vertical bus of its pillar.
//
// It holds NVC virtual channels of DEPTH flits, written by the router's UD
// output port with ordinary credit flow control (credit_out pulses one cycle
// after a flit leaves for the bus). A VC whose front flit is a head flit and
// that has no downstream VC yet raises va_req[v], but only while the target
// layer's UPDOWN input port reports a free VC (free_vc_exist). The BVA unit
// answers with alloc_*: the VCID reserved in the target layer, which is kept
// in a per-VC register together with the target layer.
//
// Once a VC holds a VCID its flits are sent one by one, wormhole style: each
// flit goes onto the bus with its target layer and with its vc field set to
// the reserved VCID. One flit per cycle leaves the buffer, chosen round-robin
// among the VCs that are ready to go in a direction whose lane accepts
// (up_ready/down_ready); have_up/have_down tell the bus which directions
// have work and do not depend on the ready signals. The reservation ends with
// the tail flit.
//
// The handshake and the per-VC registers follow the document; the
// round-robin choice and the one-flit-per-cycle output are this design's.
module updown_buffer
  import noc_pkg::*;
#(
  parameter int unsigned MY_Z  = 0,
  parameter int unsigned DEPTH = UD_BUF_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // router UD output port
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic [NVC-1:0]    credit_out,
  // BVA unit
  input  logic [NZ-1:0]     free_vc_exist,
  output logic [NVC-1:0]    va_req,
  output logic [Z_W-1:0]    des_layer [NVC],
  input  logic              alloc_valid,
  input  logic [VC_W-1:0]   alloc_idx,     // which local VC was served
  input  logic [VC_W-1:0]   alloc_vcid,    // VCID in the target UD input port
  // vertical bus
  output logic              have_up,
  output logic              have_down,
  input  logic              up_ready,
  input  logic              down_ready,
  output logic              inj_valid,
  output bus_flit_t         inj_flit
);
  flit_t           hd    [NVC];
  logic [NVC-1:0]  empty;
  logic [NVC-1:0]  pop;
  logic [NVC-1:0]  alloc;              // VCID reserved
  logic [VC_W-1:0] vcid  [NVC];
  logic [Z_W-1:0]  tlayer [NVC];

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic full_unused;
    logic [$clog2(DEPTH+1)-1:0] cnt_unused;
    sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(in_valid && int'(in_flit.vc) == v), .din(in_flit),
      .pop(pop[v]), .dout(hd[v]),
      .empty(empty[v]), .full(full_unused), .count(cnt_unused)
    );
  end

  // VA requests (Fig. 3 step 1).
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      des_layer[v] = dest_z(hd[v]);
      va_req[v]    = !empty[v] && !alloc[v] && is_head(hd[v]) &&
                     free_vc_exist[dest_z(hd[v])];
    end
  end

  // Flit injection.
  logic [NVC-1:0]  go_up, go_dn, elig, gnt;
  logic [VC_W-1:0] sel;
  logic            any;

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      go_up[v] = alloc[v] && !empty[v] && (int'(tlayer[v]) > MY_Z);
      go_dn[v] = alloc[v] && !empty[v] && (int'(tlayer[v]) < MY_Z);
      elig[v]  = (go_up[v] && up_ready) || (go_dn[v] && down_ready);
    end
  end
  assign have_up   = |go_up;
  assign have_down = |go_dn;

  rr_arbiter #(.N(NVC)) u_sel (
    .clk, .rst_n, .req(elig), .advance(1'b1),
    .gnt(gnt), .gnt_idx(sel), .any(any)
  );

  assign pop       = any ? gnt : '0;
  assign inj_valid = any;
  always_comb begin
    inj_flit         = '0;
    inj_flit.layer   = tlayer[sel];
    inj_flit.flit    = hd[sel];
    inj_flit.flit.vc = vcid[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc      <= '0;
      credit_out <= '0;
      for (int v = 0; v < NVC; v++) begin
        vcid[v]   <= '0;
        tlayer[v] <= '0;
      end
    end else begin
      credit_out <= pop;
      if (any && is_tail(hd[sel])) alloc[sel] <= 1'b0;
      if (alloc_valid) begin
        alloc[alloc_idx]  <= 1'b1;
        vcid[alloc_idx]   <= alloc_vcid;
        tlayer[alloc_idx] <= dest_z(hd[alloc_idx]);
      end
    end
  end

  // BVA only serves a VC that asked for it.
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> va_req[alloc_idx])
    else $error("updown_buffer: VCID for a VC without request");
endmodule
