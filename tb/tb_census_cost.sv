// tb_census_cost: Hamming distance of 121-bit census vectors.
//
// Random vector pairs, identical vectors (cost 0), complementary vectors
// (cost 121) and single-bit differences at every position are compared with a
// bit-by-bit count.
module tb_census_cost;
  localparam int N = 121;

  logic [N-1:0] a, b;
  logic [6:0] cost;
  int checks = 0, failures = 0;

  census_cost #(.N(N), .COST_W(7)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int e = 0;
    #1;
    for (int i = 0; i < N; i++) e += int'(a[i] != b[i]);
    checks++;
    if (cost != 7'(e)) begin
      failures++;
      if (failures < 10) $display("cost %0d expected %0d", cost, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom};
      check();
    end
    a = {$urandom, $urandom, $urandom}; b = a;  check();
    b = ~a; check();
    for (int i = 0; i < N; i++) begin b = a; b[i] = ~b[i]; check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
