// tb_census_transform: census vectors of random and hand-made windows.
//
// Each bit must be 1 exactly when its element is larger than the centre; the
// centre bit is always 0 and equal elements give 0.  Checked for an 11x11 window
// with random windows, a flat window and windows with few grey levels (many
// ties).
module tb_census_transform;
  localparam int WIN = 11, C = WIN / 2;

  logic [7:0] win [WIN][WIN];
  logic [WIN*WIN-1:0] vec;
  int checks = 0, failures = 0;

  census_transform #(.WIN(WIN), .PIX_W(8)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++)
          case (t % 3)
            0: win[i][j] = 8'($urandom);
            1: win[i][j] = 8'($urandom_range(0, 2) * 100);
            default: win[i][j] = (t < 3) ? 8'd77 : 8'($urandom_range(60, 64));
          endcase
      #1;
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++) begin
          checks++;
          if (vec[i*WIN+j] !== (win[i][j] > win[C][C])) begin
            failures++;
            if (failures < 10) $display("test %0d bit (%0d,%0d) wrong", t, i, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
