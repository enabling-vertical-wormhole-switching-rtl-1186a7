// Planar wormhole virtual-channel router with an UPDOWN port.
//
// Six physical ports: LOCAL (processing unit), XP/XM/YP/YM (the four mesh
// neighbours on the same layer) and UD (the vertical bus). Each input port has
// NVC VC buffers; the UD input VCs hold one whole packet (UD_DEPTH) so that
// the bus never needs credits, the others hold IN_DEPTH flits.
//
// Packets are routed XYZ: first along x, then y, then to the target layer
// through the UD port. Output VCs are allocated the conventional way: an
// idle VC is reserved by the head flit after a V:1 arbitration among the VCs
// of an input port and a P:1 arbitration at the output port, and each output
// VC follows the idle -> active -> wait -> idle state machine (allocated,
// tail flit sent, all credits back). Switch allocation uses the same
// two-stage separable scheme, and flow control is credit based.
//
// Timing: a flit written into an input VC is visible the next cycle. A head
// flit spends one cycle in VC allocation and one in switch allocation; the
// switch winner is registered on out_flit, so a head flit leaves two cycles
// after it was written and body flits follow one per cycle. credit_out is a
// one-cycle pulse, registered, for every flit that leaves an input VC.
//
// The router's mesh position comes in on the my_x/my_y/my_z strap inputs
// rather than as parameters, so that every router of the system is the same
// tile.
//
// The UD input port has a second write channel (ud_in2_*) because the
// upward and downward bus lanes can both deliver a flit to this layer in the
// same cycle; they always target different VCs, which BVA reserved for
// different packets. ud_release pulses when a tail flit leaves a UD input VC
// so that the BVA free VC list can take it back.
//
// Port order, XYZ routing, the allocation stages and the credit scheme follow
// the document; arbiter policy (round-robin), the lowest-index choice from the
// free VC list and the one-cycle stage timing are this design's choices.
module vc_router
  import noc_pkg::*;
#(
  parameter int unsigned IN_DEPTH      = VC_DEPTH,
  parameter int unsigned UD_DEPTH      = UD_IN_DEPTH,
  parameter int unsigned NB_CREDITS    = VC_DEPTH,      // neighbour input VC depth
  parameter int unsigned UD_CREDITS    = UD_BUF_DEPTH,  // UPDOWN buffer VC depth
  parameter int unsigned LOCAL_CREDITS = VC_DEPTH       // processing unit sink depth
) (
  input  logic             clk,
  input  logic             rst_n,
  // position of this router, strapped at instantiation
  input  logic [X_W-1:0]   my_x,
  input  logic [Y_W-1:0]   my_y,
  input  logic [Z_W-1:0]   my_z,
  // input side
  input  logic             in_valid   [NPORT],
  input  flit_t            in_flit    [NPORT],
  output logic [NVC-1:0]   credit_out [NPORT],
  input  logic             ud_in2_valid,
  input  flit_t            ud_in2_flit,
  output logic [NVC-1:0]   ud_release,
  // output side
  output logic             out_valid  [NPORT],
  output flit_t            out_flit   [NPORT],
  input  logic [NVC-1:0]   credit_in  [NPORT]
);
  localparam int unsigned PW = 3;
  localparam int unsigned CRW = $clog2((UD_CREDITS > NB_CREDITS ? UD_CREDITS : NB_CREDITS) +
                                       LOCAL_CREDITS + 1);

  typedef enum logic [1:0] {OV_IDLE, OV_ACTIVE, OV_WAIT} ovc_state_e;

  function automatic int unsigned credits_of(int unsigned o);
    if (o == int'(P_UD))    return UD_CREDITS;
    if (o == int'(P_LOCAL)) return LOCAL_CREDITS;
    return NB_CREDITS;
  endfunction

  // XYZ routing of a head flit.
  function automatic logic [PW-1:0] route(flit_t f);
    if (dest_x(f) > my_x)      return P_XP;
    else if (dest_x(f) < my_x) return P_XM;
    else if (dest_y(f) > my_y) return P_YP;
    else if (dest_y(f) < my_y) return P_YM;
    else if (dest_z(f) != my_z) return P_UD;
    else return P_LOCAL;
  endfunction

  // ---------------------------------------------------------------- input VCs
  flit_t               hd     [NPORT][NVC];
  logic                empty  [NPORT][NVC];
  logic                push   [NPORT][NVC];
  flit_t               din    [NPORT][NVC];
  logic                pop    [NPORT][NVC];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic w1, w2;
      assign w1 = in_valid[p] && (int'(in_flit[p].vc) == v);
      if (p == P_UD) begin : g_ud
        assign w2 = ud_in2_valid && (int'(ud_in2_flit.vc) == v);
      end else begin : g_nud
        assign w2 = 1'b0;
      end
      assign push[p][v] = w1 || w2;
      assign din[p][v]  = w1 ? in_flit[p] : ud_in2_flit;

      logic full_unused;
      logic [$clog2((p == P_UD ? UD_DEPTH : IN_DEPTH)+1)-1:0] cnt_unused;
      sync_fifo #(.T(flit_t), .DEPTH(p == P_UD ? UD_DEPTH : IN_DEPTH)) u_fifo (
        .clk, .rst_n,
        .push(push[p][v]), .din(din[p][v]),
        .pop(pop[p][v]), .dout(hd[p][v]),
        .empty(empty[p][v]), .full(full_unused), .count(cnt_unused)
      );

      // Both bus lanes never write the same UD VC in one cycle.
      assert property (@(posedge clk) disable iff (!rst_n) !(w1 && w2))
        else $error("vc_router: two flits for one input VC");
    end
  end

  // Input VC state: routed and holding an output VC.
  logic            ivc_active [NPORT][NVC];
  logic [PW-1:0]   ivc_oport  [NPORT][NVC];
  logic [VC_W-1:0] ivc_ovc    [NPORT][NVC];

  // --------------------------------------------------------------- output VCs
  ovc_state_e      ovc_state [NPORT][NVC];
  logic [CRW-1:0]  credits   [NPORT][NVC];
  logic            ov_free   [NPORT];       // free VC list not empty
  logic [VC_W-1:0] ov_pick   [NPORT];       // head of the free VC list

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      ov_free[o] = 1'b0;
      ov_pick[o] = '0;
      for (int w = NVC-1; w >= 0; w--) begin
        if (ovc_state[o][w] == OV_IDLE) begin
          ov_free[o] = 1'b1;
          ov_pick[o] = VC_W'(w);
        end
      end
    end
  end

  // ------------------------------------------------------ VC allocation (VA)
  logic [NVC-1:0]   va_req1    [NPORT];
  logic [NVC-1:0]   va_gnt1    [NPORT];
  logic [VC_W-1:0]  va_idx1    [NPORT];
  logic             va_any1    [NPORT];
  logic [PW-1:0]    va_port1   [NPORT];
  logic [NPORT-1:0] va_req2    [NPORT];   // indexed by output port
  logic [NPORT-1:0] va_gnt2    [NPORT];
  logic [PW-1:0]    va_idx2    [NPORT];
  logic             va_any2    [NPORT];
  logic             va_won     [NPORT];   // indexed by input port

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        va_req1[p][v] = !ivc_active[p][v] && !empty[p][v] && is_head(hd[p][v]) &&
                        ov_free[route(hd[p][v])];
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_va1
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(va_req1[p]), .advance(va_won[p]),
      .gnt(va_gnt1[p]), .gnt_idx(va_idx1[p]), .any(va_any1[p])
    );
    assign va_port1[p] = route(hd[p][va_idx1[p]]);
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int p = 0; p < NPORT; p++)
        va_req2[o][p] = va_any1[p] && (va_port1[p] == PW'(o));
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_va2
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(va_req2[o]), .advance(1'b1),
      .gnt(va_gnt2[o]), .gnt_idx(va_idx2[o]), .any(va_any2[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      va_won[p] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (va_gnt2[o][p]) va_won[p] = 1'b1;
    end
  end

  // -------------------------------------------------- switch allocation (SA)
  logic [NVC-1:0]   sa_req1  [NPORT];
  logic [NVC-1:0]   sa_gnt1  [NPORT];
  logic [VC_W-1:0]  sa_idx1  [NPORT];
  logic             sa_any1  [NPORT];
  logic [PW-1:0]    sa_port1 [NPORT];
  logic [NPORT-1:0] sa_req2  [NPORT];
  logic [NPORT-1:0] sa_gnt2  [NPORT];
  logic [PW-1:0]    sa_idx2  [NPORT];
  logic             sa_any2  [NPORT];
  logic             sa_won   [NPORT];

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        sa_req1[p][v] = ivc_active[p][v] && !empty[p][v] &&
                        (credits[ivc_oport[p][v]][ivc_ovc[p][v]] != '0);
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_sa1
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(sa_req1[p]), .advance(sa_won[p]),
      .gnt(sa_gnt1[p]), .gnt_idx(sa_idx1[p]), .any(sa_any1[p])
    );
    assign sa_port1[p] = ivc_oport[p][sa_idx1[p]];
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int p = 0; p < NPORT; p++)
        sa_req2[o][p] = sa_any1[p] && (sa_port1[p] == PW'(o));
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_sa2
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(sa_req2[o]), .advance(1'b1),
      .gnt(sa_gnt2[o]), .gnt_idx(sa_idx2[o]), .any(sa_any2[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      sa_won[p] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (sa_gnt2[o][p]) sa_won[p] = 1'b1;
    end
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        pop[p][v] = sa_won[p] && (int'(sa_idx1[p]) == v);
  end

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        for (int v = 0; v < NVC; v++) begin
          ivc_active[p][v] <= 1'b0;
          ivc_oport[p][v]  <= '0;
          ivc_ovc[p][v]    <= '0;
          ovc_state[p][v]  <= OV_IDLE;
          credits[p][v]    <= CRW'(credits_of(p));
        end
        out_valid[p]  <= 1'b0;
        out_flit[p]   <= '0;
        credit_out[p] <= '0;
      end
      ud_release <= '0;
    end else begin
      ud_release <= '0;
      for (int p = 0; p < NPORT; p++) credit_out[p] <= '0;

      // Output VC credits: returns from downstream, minus flits sent below.
      for (int o = 0; o < NPORT; o++)
        for (int w = 0; w < NVC; w++) begin
          logic sent;
          sent = sa_any2[o] && (ivc_ovc[sa_idx2[o]][sa_idx1[sa_idx2[o]]] == VC_W'(w));
          credits[o][w] <= credits[o][w] + CRW'(credit_in[o][w]) - CRW'(sent);
          // wait -> idle once every credit is back
          if (ovc_state[o][w] == OV_WAIT &&
              credits[o][w] + CRW'(credit_in[o][w]) == CRW'(credits_of(o)))
            ovc_state[o][w] <= OV_IDLE;
        end

      // VC allocation: idle -> active.
      for (int o = 0; o < NPORT; o++)
        if (va_any2[o]) begin
          ivc_active[va_idx2[o]][va_idx1[va_idx2[o]]] <= 1'b1;
          ivc_oport[va_idx2[o]][va_idx1[va_idx2[o]]]  <= PW'(o);
          ivc_ovc[va_idx2[o]][va_idx1[va_idx2[o]]]    <= ov_pick[o];
          ovc_state[o][ov_pick[o]]                    <= OV_ACTIVE;
        end

      // Switch traversal into the output registers.
      for (int o = 0; o < NPORT; o++) begin
        out_valid[o] <= sa_any2[o];
        if (sa_any2[o]) begin
          logic [PW-1:0]   ip;
          logic [VC_W-1:0] iv;
          flit_t           f;
          ip = sa_idx2[o];
          iv = sa_idx1[ip];
          f  = hd[ip][iv];
          f.vc = ivc_ovc[ip][iv];
          out_flit[o] <= f;
          credit_out[ip][iv] <= 1'b1;
          if (is_tail(f)) begin
            ivc_active[ip][iv]       <= 1'b0;
            ovc_state[o][f.vc]       <= OV_WAIT;   // active -> wait
            if (ip == P_UD) ud_release[iv] <= 1'b1;
          end
        end
      end
    end
  end
endmodule
