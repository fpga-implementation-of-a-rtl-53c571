// tb_sgm_path_cost: the SGM path recursion for one disparity.
//
// Random neighbour cost triples and minima (each minimum no larger than the
// neighbour costs, as in a real array) are checked against
//   C + min(L(d), L(d-1)+P1, L(d+1)+P1, Lmin+P2) - Lmin
// including the ends of the search range (missing d-1 or d+1) and a
// neighbour outside the image (all costs at the maximum), where the result
// must be C.  Each candidate of the minimum must win at least once.
module tb_sgm_path_cost;
  localparam int C_W = 7, COST_W = 10, P1 = 10, P2 = 100, MAXC = (1 << COST_W) - 1;

  logic [C_W-1:0] c;
  logic [COST_W-1:0] prev_0, prev_m1, prev_p1, prev_min, l;
  logic has_m1, has_p1;
  int checks = 0, failures = 0;
  int wins [4];

  sgm_path_cost #(.C_W(C_W), .COST_W(COST_W), .P1(P1), .P2(P2)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int b, which, cand;
    #1;
    b = prev_0; which = 0;
    if (has_m1 && prev_m1 + P1 < b) begin b = prev_m1 + P1; which = 1; end
    if (has_p1 && prev_p1 + P1 < b) begin b = prev_p1 + P1; which = 2; end
    if (prev_min + P2 < b) begin b = prev_min + P2; which = 3; end
    wins[which]++;
    cand = c + b - prev_min;
    checks++;
    if (l != COST_W'(cand)) begin
      failures++;
      if (failures < 10) $display("c %0d prev %0d/%0d/%0d min %0d: %0d expected %0d",
                                  c, prev_m1, prev_0, prev_p1, prev_min, l, cand);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int mn = $urandom_range(0, 150);
      c = C_W'($urandom_range(0, 121));
      prev_min = COST_W'(mn);
      prev_0  = COST_W'(mn + $urandom_range(0, (t % 2) ? 15 : 200));
      prev_m1 = COST_W'(mn + $urandom_range(0, (t % 2) ? 15 : 200));
      prev_p1 = COST_W'(mn + $urandom_range(0, (t % 2) ? 15 : 200));
      has_m1 = ($urandom_range(0, 7) != 0);
      has_p1 = ($urandom_range(0, 7) != 0);
      check();
    end
    // neighbour outside the image
    for (int t = 0; t < 20; t++) begin
      c = C_W'($urandom_range(0, 121));
      prev_0 = MAXC; prev_m1 = MAXC; prev_p1 = MAXC; prev_min = MAXC;
      has_m1 = t[0]; has_p1 = t[1];
      check();
      checks++;
      if (l != COST_W'(c)) failures++;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (wins[i] == 0) begin failures++; $display("candidate %0d never the minimum", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
