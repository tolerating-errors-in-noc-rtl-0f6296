// tb_sd_block: checks the shuffler / de-shuffler block. After reset the
// block must pass flits unchanged; after a cfg_load of a random permutation,
// output subflit j must be input subflit sel[j] from the next clock edge on,
// and not before. Loading a permutation into one block and its inverse into
// a second block in series must give back the original flit.
module tb_sd_block;
  import rbisu_ref_pkg::*;

  localparam int FW = 64, SW = 4, N = FW / SW, SELW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  load_a, load_b;
  logic [N-1:0][SELW-1:0] sel_a, sel_b;
  logic [FW-1:0]         din, mid, dout;

  sd_block #(.FLIT_W(FW), .SUBFLIT_W(SW)) dut_s (
    .clk(clk), .rst_n(rst_n), .cfg_load(load_a), .cfg_sel(sel_a), .din(din), .dout(mid));
  sd_block #(.FLIT_W(FW), .SUBFLIT_W(SW)) dut_d (
    .clk(clk), .rst_n(rst_n), .cfg_load(load_b), .cfg_sel(sel_b), .din(mid), .dout(dout));

  int checks = 0, failures = 0;

  task automatic check(logic [FW-1:0] got, logic [FW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  perm_t p, inv;

  initial begin
    load_a = 0; load_b = 0; sel_a = '0; sel_b = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 8; t++) begin
      din = {$urandom, $urandom};
      #1 check(mid, din, "identity after reset");
      @(posedge clk);
    end
    for (int round = 0; round < 40; round++) begin
      logic [FW-1:0] old_mid;
      // random permutation (Fisher-Yates)
      for (int i = 0; i < N; i++) p[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i, 0);
        t = p[i]; p[i] = p[j]; p[j] = t;
      end
      for (int i = 0; i < N; i++) inv[p[i]] = i;
      for (int i = 0; i < N; i++) begin
        sel_a[i] = SELW'(p[i]);
        sel_b[i] = SELW'(inv[i]);
      end
      @(negedge clk);
      old_mid = mid;
      load_a = 1; load_b = 1;
      #1 check(mid, old_mid, "no change before the load edge");
      @(posedge clk); #1;
      load_a = 0; load_b = 0;
      for (int t = 0; t < 6; t++) begin
        din = {$urandom, $urandom};
        #1;
        check(mid,  gather(64'(din), FW, SW, p), "shuffled subflits");
        check(dout, din, "de-shuffle restores flit");
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
