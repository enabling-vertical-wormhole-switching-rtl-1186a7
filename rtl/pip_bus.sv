// Pipelined vertical bus with BVA (pip_BVA).
//
// The bus of one pillar has one stage per layer and two unidirectional lanes,
// one for upward and one for downward traffic. Between layer k and k+1 the
// upward lane has a Bus_FIFO of DEPTH flits (filled by stage k), and between
// layer k and k-1 the downward lane has one too (filled by stage k).
//
// Because BVA has already reserved a VC in the target UPDOWN input port, and
// that VC holds a whole packet, every flit that reaches its target layer is
// taken at once: the stage at layer k ejects the flit at the head of the
// incoming FIFO when its layer field equals k, with no back-pressure, on
// ej_up_* (arrived from below) or ej_dn_* (from above). Any other flit at the
// head of the incoming FIFO passes on, and the stage only has to choose
// between it and the flit the local UPDOWN buffer offers for the same lane.
// The two alternate: after a through flit the local buffer has priority, after
// a local flit the through traffic (this design's choice). A full FIFO stalls
// both. Flits of different packets interleave freely; each flit is handled
// alone.
//
// up_ready/down_ready depend only on FIFO state and the stage priority, not on
// inj_valid, so the UPDOWN buffer can pick its flit from them in the same
// cycle. A flit injected at layer k reaches layer k+d after d cycles.
module pip_bus
  import noc_pkg::*;
#(
  parameter int unsigned NL    = NZ,
  parameter int unsigned DEPTH = BUS_FIFO_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      inj_valid [NL],
  input  bus_flit_t inj_flit  [NL],
  output logic      up_ready  [NL],
  output logic      down_ready[NL],
  output logic      ej_up_valid [NL],
  output flit_t     ej_up_flit  [NL],
  output logic      ej_dn_valid [NL],
  output flit_t     ej_dn_flit  [NL]
);
  // FIFO k of the up lane sits above layer k; FIFO k of the down lane below it.
  bus_flit_t up_hd [NL], dn_hd [NL];
  logic      up_empty [NL], up_full [NL], up_push [NL], up_pop [NL];
  logic      dn_empty [NL], dn_full [NL], dn_push [NL], dn_pop [NL];
  bus_flit_t up_din [NL], dn_din [NL];
  logic      up_prio [NL], dn_prio [NL];   // 1: local flit has priority

  for (genvar k = 0; k < NL; k++) begin : g_stage
    // ---------------------------------------------------------- upward lane
    logic thr_up_v, loc_up_v, thr_up_go, loc_up_go;
    if (k > 0) begin : g_upin
      assign ej_up_valid[k] = !up_empty[k-1] && int'(up_hd[k-1].layer) == k;
      assign ej_up_flit[k]  = up_hd[k-1].flit;
      assign thr_up_v       = !up_empty[k-1] && int'(up_hd[k-1].layer) != k;
    end else begin : g_upin0
      assign ej_up_valid[k] = 1'b0;
      assign ej_up_flit[k]  = '0;
      assign thr_up_v       = 1'b0;
    end
    if (k < NL-1) begin : g_upout
      logic [$clog2(DEPTH+1)-1:0] cnt_unused;
      assign loc_up_v   = inj_valid[k] && int'(inj_flit[k].layer) > k;
      assign up_ready[k] = !up_full[k] && (up_prio[k] || !thr_up_v);
      assign loc_up_go  = loc_up_v && up_ready[k];
      assign thr_up_go  = thr_up_v && !up_full[k] && !loc_up_go;
      assign up_push[k] = loc_up_go || thr_up_go;
      assign up_din[k]  = loc_up_go ? inj_flit[k] : up_hd[k-((k > 0) ? 1 : 0)];
      sync_fifo #(.T(bus_flit_t), .DEPTH(DEPTH)) u_up (
        .clk, .rst_n, .push(up_push[k]), .din(up_din[k]), .pop(up_pop[k]),
        .dout(up_hd[k]), .empty(up_empty[k]), .full(up_full[k]), .count(cnt_unused)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) up_prio[k] <= 1'b0;
        else if (loc_up_go) up_prio[k] <= 1'b0;
        else if (thr_up_go) up_prio[k] <= 1'b1;
      end
    end else begin : g_uptop
      assign loc_up_v    = 1'b0;
      assign up_ready[k] = 1'b0;
      assign loc_up_go   = 1'b0;
      assign thr_up_go   = 1'b0;
      assign up_push[k]  = 1'b0;
      assign up_din[k]   = '0;
      assign up_hd[k]    = '0;
      assign up_empty[k] = 1'b1;
      assign up_full[k]  = 1'b1;
      assign up_prio[k]  = 1'b0;
    end
    if (k > 0) begin : g_uppop
      assign up_pop[k-1] = ej_up_valid[k] || thr_up_go;
    end
    if (k == NL-1) begin : g_uppoptop
      assign up_pop[k] = 1'b0;
    end

    // -------------------------------------------------------- downward lane
    logic thr_dn_v, loc_dn_v, thr_dn_go, loc_dn_go;
    if (k < NL-1) begin : g_dnin
      assign ej_dn_valid[k] = !dn_empty[k+1] && int'(dn_hd[k+1].layer) == k;
      assign ej_dn_flit[k]  = dn_hd[k+1].flit;
      assign thr_dn_v       = !dn_empty[k+1] && int'(dn_hd[k+1].layer) != k;
    end else begin : g_dnin0
      assign ej_dn_valid[k] = 1'b0;
      assign ej_dn_flit[k]  = '0;
      assign thr_dn_v       = 1'b0;
    end
    if (k > 0) begin : g_dnout
      logic [$clog2(DEPTH+1)-1:0] cnt_unused;
      assign loc_dn_v     = inj_valid[k] && int'(inj_flit[k].layer) < k;
      assign down_ready[k] = !dn_full[k] && (dn_prio[k] || !thr_dn_v);
      assign loc_dn_go    = loc_dn_v && down_ready[k];
      assign thr_dn_go    = thr_dn_v && !dn_full[k] && !loc_dn_go;
      assign dn_push[k]   = loc_dn_go || thr_dn_go;
      assign dn_din[k]    = loc_dn_go ? inj_flit[k] : dn_hd[(k < NL-1) ? k+1 : k];
      sync_fifo #(.T(bus_flit_t), .DEPTH(DEPTH)) u_dn (
        .clk, .rst_n, .push(dn_push[k]), .din(dn_din[k]), .pop(dn_pop[k]),
        .dout(dn_hd[k]), .empty(dn_empty[k]), .full(dn_full[k]), .count(cnt_unused)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) dn_prio[k] <= 1'b0;
        else if (loc_dn_go) dn_prio[k] <= 1'b0;
        else if (thr_dn_go) dn_prio[k] <= 1'b1;
      end
    end else begin : g_dnbot
      assign loc_dn_v      = 1'b0;
      assign down_ready[k] = 1'b0;
      assign loc_dn_go     = 1'b0;
      assign thr_dn_go     = 1'b0;
      assign dn_push[k]    = 1'b0;
      assign dn_din[k]     = '0;
      assign dn_hd[k]      = '0;
      assign dn_empty[k]   = 1'b1;
      assign dn_full[k]    = 1'b1;
      assign dn_prio[k]    = 1'b0;
    end
    if (k < NL-1) begin : g_dnpop
      assign dn_pop[k+1] = ej_dn_valid[k] || thr_dn_go;
    end
    if (k == 0) begin : g_dnpopbot
      assign dn_pop[k] = 1'b0;
    end
  end
endmodule
