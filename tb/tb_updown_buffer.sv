// Test of the UPDOWN buffer (layer 1 of 4, 4 VCs of 4 flits).
//
// The testbench plays both the router (writes packets into random VCs,
// respecting the credits the buffer returns) and the BVA unit (answers
// va_req with a random granted VC and a VCID; it withholds free_vc_exist for
// some target layers at times). It checks that:
//  - va_req is raised only for a VC with a head flit at the front, no VCID
//    yet, and free_vc_exist set for the head flit's target layer;
//  - no flit leaves before its packet has a VCID;
//  - every flit leaves in order, on the lane of its direction, only when that
//    lane is ready, tagged with the packet's target layer and its VCID;
//  - have_up/have_down match the pending work; one credit per flit returns.
module tb_updown_buffer;
  import noc_pkg::*;
  localparam int MYZ = 1;
  localparam int PL  = 5;     // packet length used here

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid;
  flit_t           in_flit;
  logic [NVC-1:0]  credit_out;
  logic [NZ-1:0]   free_vc_exist;
  logic [NVC-1:0]  va_req;
  logic [Z_W-1:0]  des_layer [NVC];
  logic            alloc_valid;
  logic [VC_W-1:0] alloc_idx, alloc_vcid;
  logic            have_up, have_down, up_ready, down_ready, inj_valid;
  bus_flit_t       inj_flit;

  updown_buffer #(.MY_Z(MYZ)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // Reference per VC: queue of flits written, reservation state.
  flit_t          q     [NVC][$];
  bit             resv  [NVC];
  logic [VC_W-1:0] rvcid [NVC];
  int             rlay  [NVC];
  int             cred  [NVC];
  int             wr_left [NVC];   // flits of the current packet still to write
  int             n_pkts_out = 0, n_va_blocked = 0, n_up = 0, n_dn = 0;
  int             sent = 0, recv = 0;

  initial begin
    in_valid = 0; in_flit = '0; free_vc_exist = '1; alloc_valid = 0;
    alloc_idx = '0; alloc_vcid = '0; up_ready = 0; down_ready = 0;
    foreach (cred[v]) begin cred[v] = UD_BUF_DEPTH; resv[v] = 0; wr_left[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int wv;
      @(negedge clk);
      // ---- router side: write one flit into a random VC with credit
      in_valid = 0;
      wv = $urandom_range(NVC-1);
      if (i < 3500 && cred[wv] > 0 && $urandom_range(1)) begin
        flit_t f;
        int dz;
        if (wr_left[wv] == 0) begin
          do dz = $urandom_range(NZ-1); while (dz == MYZ);
          f.ftype = F_HEAD;
          f.data  = {$urandom} & 32'hFFFF_FFC0 | 32'(dz << 4);
          wr_left[wv] = PL - 1;
        end else begin
          f.ftype = (wr_left[wv] == 1) ? F_TAIL : F_BODY;
          f.data  = $urandom;
          wr_left[wv]--;
        end
        f.vc = VC_W'(wv);
        in_valid = 1; in_flit = f;
        cred[wv]--;
        sent++;
      end
      // ---- BVA side
      free_vc_exist = ($urandom_range(3) == 0) ? NZ'($urandom) : '1;
      up_ready   = $urandom_range(1);
      down_ready = $urandom_range(1);
      #1;
      for (int v = 0; v < NVC; v++) begin
        bit exp;
        exp = q[v].size() > 0 && !resv[v] && is_head(q[v][0]) &&
              free_vc_exist[dest_z(q[v][0])];
        check(va_req[v] == exp, $sformatf("va_req[%0d]", v));
        if (q[v].size() > 0 && !resv[v] && is_head(q[v][0]) && !exp) n_va_blocked++;
        if (exp) check(des_layer[v] == dest_z(q[v][0]), "des_layer");
      end
      begin
        bit hu, hd;
        hu = 0; hd = 0;
        for (int v = 0; v < NVC; v++)
          if (resv[v] && q[v].size() > 0) begin
            if (rlay[v] > MYZ) hu = 1; else hd = 1;
          end
        check(have_up == hu && have_down == hd, "have_up/have_down");
      end
      alloc_valid = 0;
      if (va_req != 0 && $urandom_range(1)) begin
        int g;
        do g = $urandom_range(NVC-1); while (!va_req[g]);
        alloc_valid = 1; alloc_idx = VC_W'(g); alloc_vcid = VC_W'($urandom);
      end
      #1;
      // ---- bus side
      if (inj_valid) begin
        int v;
        v = -1;
        for (int k = 0; k < NVC; k++)
          if (resv[k] && q[k].size() > 0 && rvcid[k] == inj_flit.flit.vc &&
              q[k][0].data == inj_flit.flit.data) v = k;
        check(v >= 0, "injected flit does not match the front of a reserved VC");
        if (v >= 0) begin
          check(int'(inj_flit.layer) == rlay[v], "target layer tag");
          check(inj_flit.flit.ftype == q[v][0].ftype, "flit type");
          check((rlay[v] > MYZ) ? up_ready : down_ready, "flit sent to a lane that is not ready");
          if (rlay[v] > MYZ) n_up++; else n_dn++;
          if (is_tail(q[v][0])) begin resv[v] = 0; n_pkts_out++; end
          void'(q[v].pop_front());
          recv++;
        end
      end else begin
        bit any;
        any = 0;
        for (int k = 0; k < NVC; k++)
          if (resv[k] && q[k].size() > 0 &&
              ((rlay[k] > MYZ && up_ready) || (rlay[k] < MYZ && down_ready))) any = 1;
        check(!any, "a ready flit was not sent");
      end
      if (alloc_valid) begin
        resv[alloc_idx]  = 1;
        rvcid[alloc_idx] = alloc_vcid;
        rlay[alloc_idx]  = int'(dest_z(q[alloc_idx][0]));
      end
      if (in_valid) q[wv].push_back(in_flit);
      @(posedge clk);
      #1;
      for (int v = 0; v < NVC; v++) if (credit_out[v]) cred[v]++;
    end
    check(sent == recv + q[0].size() + q[1].size() + q[2].size() + q[3].size(), "flit count");
    check(n_pkts_out > 100 && n_va_blocked > 0 && n_up > 0 && n_dn > 0, "coverage");
    $display("packets out %0d, up %0d, down %0d, VA held back %0d", n_pkts_out, n_up, n_dn, n_va_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
