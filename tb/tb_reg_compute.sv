// tb_reg_compute: checks the S/D register computation.
// Four instances run side by side: 64-bit flits with 16, 8 and 4 subflits,
// and the 8-bit flit of 4 two-bit subflits of the illustrated example. Each is
// given random error masks (sparse and dense, including none and one faulty
// slot) and must:
//   * produce the placement of the reference model (rbisu_ref_pkg::ref_perm);
//   * give a de-shuffle selection that is the inverse of the shuffle one;
//   * place subflits so that a less significant subflit never sits in a slot
//     with a smaller fault key than a more significant one;
//   * pulse load exactly N*(N+2)+1 cycles after start, which is also within
//     the update latencies reported for a 1 GHz clock (370 ns for 16
//     subflits, 120 ns for 8, 44 ns for 4).
// The example: faults on bits 7 and 6 (the top slot) must exchange subflits
// 3 and 0 and leave 1 and 2 in place.
module tb_reg_compute;
  import rbisu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam int NCFG = 4;
  localparam int CFW [NCFG] = '{64, 64, 64, 8};
  localparam int CSW [NCFG] = '{4, 8, 16, 2};
  localparam int REPORTED_NS [NCFG] = '{370, 120, 44, 44};

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int FW = CFW[c], SW = CSW[c], N = FW / SW, SELW = $clog2(N);
    logic                   start, busy, load;
    logic [FW-1:0]          rem;
    logic [N-1:0][SELW-1:0] ssel, dsel;

    reg_compute #(.FLIT_W(FW), .SUBFLIT_W(SW)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .rem(rem),
      .busy(busy), .load(load), .ssel(ssel), .dsel(dsel));

    task automatic run(logic [FW-1:0] m, string tag);
      perm_t content, where;
      int lat;
      // lat counts falling edges after the edge that samples start; load,
      // set by the edge that ends the computation, is seen at edge lat.
      @(negedge clk);
      rem = m; start = 1;
      lat = 0;
      do begin
        @(negedge clk);
        if (lat == 0) begin start = 0; rem = ~m; end   // mask must be latched
        lat++;
      end while (!load && lat < 10000);
      check(lat == N*(N+2)+1, $sformatf("cfg %0d %s: latency %0d expected %0d", c, tag, lat, N*(N+2)+1));
      check(lat <= REPORTED_NS[c], $sformatf("cfg %0d: latency %0d above %0d", c, lat, REPORTED_NS[c]));
      ref_perm(64'(m), FW, SW, content, where);
      for (int j = 0; j < N; j++) begin
        check(int'(ssel[j]) == content[j], $sformatf("cfg %0d %s: ssel[%0d]=%0d expected %0d", c, tag, j, ssel[j], content[j]));
        check(int'(dsel[ssel[j]]) == j, $sformatf("cfg %0d %s: dsel not inverse at %0d", c, tag, j));
      end
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          if (ssel[a] < ssel[b])
            check(slot_key(64'(m), SW, a) >= slot_key(64'(m), SW, b),
                  $sformatf("cfg %0d %s: slot %0d (subflit %0d) less faulty than slot %0d", c, tag, a, ssel[a], b));
      @(negedge clk);
      check(!busy && !load, $sformatf("cfg %0d: idle after load", c));
    endtask

    initial begin
      start = 0; rem = '0;
      wait (rst_n);
      repeat (2) @(posedge clk);
      // no fault: identity
      run('0, "no fault");
      for (int j = 0; j < N; j++) check(int'(ssel[j]) == j, $sformatf("cfg %0d identity", c));
      if (c == 3) begin
        run(8'hC0, "example");
        check(ssel[0] == 3 && ssel[1] == 1 && ssel[2] == 2 && ssel[3] == 0,
              $sformatf("example placement %p", ssel));
      end
      for (int t = 0; t < 25; t++) begin
        logic [63:0] m;
        case (t % 4)
          0: m = 64'(1) << $urandom_range(FW - 1, 0);
          1: m = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
          2: m = {$urandom, $urandom};
          default: m = (64'(1) << $urandom_range(FW - 1, 0)) | (64'(1) << $urandom_range(FW - 1, 0));
        endcase
        run(FW'(m), $sformatf("random %0d", t));
      end
      done_cnt++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
