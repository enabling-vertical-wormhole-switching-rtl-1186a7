// Test of the per-layer BVA unit (layer 1 of a 4-layer pillar, 4 VCs).
//
// Random stimulus on both sides, checked against a reference model in the
// testbench:
//  - source side: bva_req is the OR of the VA requests; the locally granted
//    VC follows round-robin and only moves on after a BVA grant; while
//    granted, the unit drives that VC's target layer on the Target_layer_bus
//    and hands the VCID read from the BVA_result_bus to the UPDOWN buffer.
//  - target side: when bus_granted is high and the Target_layer_bus names
//    layer 1, the lowest free VC is driven on the BVA_result_bus and leaves the
//    free VC list; free_vc_exist is the OR of the list; released VCs return.
// The reservation completes in the same cycle as the grant.
module tb_bva_unit;
  import noc_pkg::*;
  localparam int MYZ = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NVC-1:0]  va_req;
  logic [Z_W-1:0]  des_layer [NVC];
  logic            bva_req, bva_grant;
  logic [NVC-1:0]  va_grant;
  logic            tl_drive_en;
  logic [Z_W-1:0]  tl_drive;
  logic [VC_W-1:0] bva_result_bus;
  logic            alloc_valid;
  logic [VC_W-1:0] alloc_idx, alloc_vcid;
  logic            bus_granted;
  logic [Z_W-1:0]  target_layer_bus;
  logic [NVC-1:0]  release_vc;
  logic            free_vc_exist;
  logic            res_drive_en;
  logic [VC_W-1:0] res_drive;

  bva_unit #(.MY_Z(MYZ)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int          ptr = 0;          // model of the V:1 round-robin pointer
  logic [NVC-1:0] free_m = '1;   // model of the free VC list
  int          n_alloc = 0, n_full = 0, n_src = 0;

  initial begin
    va_req = '0; bva_grant = 0; bva_result_bus = '0; bus_granted = 0;
    target_layer_bus = '0; release_vc = '0;
    foreach (des_layer[v]) des_layer[v] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int win;
      bit tgt;
      logic [NVC-1:0] busy;
      @(negedge clk);
      // source-side stimulus
      va_req    = NVC'($urandom);
      foreach (des_layer[v]) des_layer[v] = Z_W'($urandom);
      bva_grant = $urandom_range(1) && (va_req != 0);
      bva_result_bus = VC_W'($urandom);
      // target-side stimulus: release only busy VCs
      busy       = ~free_m;
      release_vc = ($urandom_range(3) == 0) ? (busy & NVC'($urandom)) : '0;
      tgt        = $urandom_range(1);
      bus_granted      = tgt ? (free_m != 0) : $urandom_range(1);
      target_layer_bus = tgt ? Z_W'(MYZ) : Z_W'((MYZ + 1 + $urandom_range(NZ-2)) % NZ);
      #1;
      // --- source checks
      win = -1;
      for (int k = 0; k < NVC; k++)
        if (win < 0 && va_req[(ptr + k) % NVC]) win = (ptr + k) % NVC;
      check(bva_req == (va_req != 0), "bva_req is not the OR of the VA requests");
      check(va_grant == ((win < 0) ? '0 : NVC'(1) << win), "local V:1 grant");
      check(tl_drive_en == (bva_grant && win >= 0), "Target_layer_bus enable");
      check(alloc_valid == (bva_grant && win >= 0), "alloc_valid");
      if (bva_grant && win >= 0) begin
        check(tl_drive == des_layer[win], "Target_layer_bus value");
        check(int'(alloc_idx) == win, "alloc_idx");
        check(alloc_vcid == bva_result_bus, "VCID not taken from BVA_result_bus");
        n_src++;
      end
      // --- target checks
      check(free_vc_exist == (free_m != 0), "free_vc_exist");
      if (bus_granted && target_layer_bus == Z_W'(MYZ) && free_m != 0) begin
        int pick;
        pick = -1;
        for (int v = NVC-1; v >= 0; v--) if (free_m[v]) pick = v;
        check(res_drive_en && int'(res_drive) == pick, "VCID picked from free VC list");
        free_m[pick] = 1'b0;
        n_alloc++;
      end else begin
        check(!res_drive_en, "BVA_result_bus driven without a request for this layer");
      end
      if (free_m == 0) n_full++;
      free_m |= release_vc;
      if (bva_grant && win >= 0) ptr = (win + 1) % NVC;
    end
    check(n_alloc > 50 && n_full > 10 && n_src > 50, "coverage of allocations");
    $display("allocations %0d, cycles with empty free list %0d, source grants %0d",
             n_alloc, n_full, n_src);
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
