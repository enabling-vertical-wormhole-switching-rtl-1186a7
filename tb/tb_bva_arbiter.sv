// Test of the BVA arbiter: random request patterns on 4 layers. Checks that
// at most one layer is granted, that a grant goes only to a requester, that
// some layer is granted whenever any requests (bus_granted), and that the
// grants rotate: under constant requests from all layers each layer is
// granted once every 4 cycles, and a reference round-robin model predicts
// every grant.
module tb_bva_arbiter;
  localparam int NL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NL-1:0] bva_req, bva_grant;
  logic          bus_granted;

  bva_arbiter #(.NL(NL)) dut (.*);

  int checks = 0, failures = 0;
  int ptr = 0;                 // reference priority pointer

  function automatic logic [NL-1:0] model(logic [NL-1:0] r, int p);
    for (int k = 0; k < NL; k++)
      if (r[(p + k) % NL]) return NL'(1) << ((p + k) % NL);
    return '0;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (req=%b gnt=%b)", msg, bva_req, bva_grant);
    end
  endtask

  initial begin
    int cnt [NL];
    bva_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // random requests
    for (int i = 0; i < 400; i++) begin
      logic [NL-1:0] exp;
      bva_req = NL'($urandom);
      #1;
      exp = model(bva_req, ptr);
      check(bva_grant == exp, "grant differs from round-robin model");
      check(bus_granted == (bva_req != '0), "bus_granted");
      check((bva_grant & ~bva_req) == '0, "grant without request");
      @(posedge clk);
      for (int k = 0; k < NL; k++) if (exp[k]) ptr = (k + 1) % NL;
      #1;
    end
    // all request: fair rotation
    foreach (cnt[k]) cnt[k] = 0;
    bva_req = '1;
    for (int i = 0; i < 4*NL; i++) begin
      #1;
      for (int k = 0; k < NL; k++) if (bva_grant[k]) cnt[k]++;
      @(posedge clk);
    end
    foreach (cnt[k]) check(cnt[k] == 4, "unfair rotation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
