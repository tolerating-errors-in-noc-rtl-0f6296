// tb_region_rem: checks the hierarchical region error mask.
// 1. The worked example of an 8-bit flit in a 2x2 region: router R0 has bit 4
//    faulty, the local link of R0 bit 2, the north link of R5 bit 7. The
//    size-1 mask of R0 must be bits 2 and 4, that of R5 bit 7, and the size-2
//    mask bits 2, 4 and 7.
// 2. Random masks for regions of 2x2, 4x4 (quad tree of three levels) and 3x3
//    (flat OR): the region mask must have a bit set exactly when some router
//    mask of the region has it set.
module tb_region_rem;
  int checks = 0, failures = 0;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- worked example, 8-bit flits
  logic [7:0] em_r [4], em_l [4], em_n [4], em_e [4];
  logic [7:0] r1 [4];
  logic [7:0] r2;
  for (genvar i = 0; i < 4; i++) begin : g_ex
    rem1_unit #(.FLIT_W(8)) u1 (.em_router(em_r[i]), .em_local(em_l[i]),
                                .em_north(em_n[i]), .em_east(em_e[i]), .rem(r1[i]));
  end
  region_rem #(.FLIT_W(8), .REGION(2)) u_ex (.rem1(r1), .rem(r2));

  // ---- random, three sizes
  logic [63:0] a2 [4],  o2;
  logic [63:0] a4 [16], o4;
  logic [63:0] a3 [9],  o3;
  region_rem #(.FLIT_W(64), .REGION(2)) u2 (.rem1(a2), .rem(o2));
  region_rem #(.FLIT_W(64), .REGION(4)) u4 (.rem1(a4), .rem(o4));
  region_rem #(.FLIT_W(64), .REGION(3)) u3 (.rem1(a3), .rem(o3));

  function automatic logic [63:0] sparse();
    return {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // routers of the 2x2 region: index 0 = R0, 1 = R1, 2 = R4, 3 = R5
    for (int i = 0; i < 4; i++) begin em_r[i] = 0; em_l[i] = 0; em_n[i] = 0; em_e[i] = 0; end
    em_r[0][4] = 1'b1;
    em_l[0][2] = 1'b1;
    em_n[3][7] = 1'b1;
    #1;
    check(64'(r1[0]), 64'h14, "REM1 of R0");
    check(64'(r1[1]), 64'h00, "REM1 of R1");
    check(64'(r1[3]), 64'h80, "REM1 of R5");
    check(64'(r2),    64'h94, "REM2 of region 0");

    for (int t = 0; t < 300; t++) begin
      logic [63:0] e2, e4, e3;
      e2 = '0; e4 = '0; e3 = '0;
      foreach (a2[i]) a2[i] = (t % 3 == 0) ? 64'(1) << $urandom_range(63, 0) : sparse();
      foreach (a4[i]) a4[i] = (t % 3 == 0) ? 64'(1) << $urandom_range(63, 0) : sparse();
      foreach (a3[i]) a3[i] = (t % 3 == 0) ? 64'(1) << $urandom_range(63, 0) : sparse();
      // one router only, to catch a dropped input
      if (t % 5 == 1) begin
        int keep = $urandom_range(15, 0);
        foreach (a4[i]) if (i != keep) a4[i] = '0;
      end
      #1;
      for (int b = 0; b < 64; b++) begin
        foreach (a2[i]) if (a2[i][b]) e2[b] = 1'b1;
        foreach (a4[i]) if (a4[i][b]) e4[b] = 1'b1;
        foreach (a3[i]) if (a3[i][b]) e3[b] = 1'b1;
      end
      check(o2, e2, "2x2 region");
      check(o4, e4, "4x4 region");
      check(o3, e3, "3x3 region");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
