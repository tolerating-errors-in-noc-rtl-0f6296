// tb_rbisu_region_sizes: effect of the region size on fault mitigation.
//
// Three copies of the NoC, on a 4x4 mesh with 64-bit flits and 4-bit
// subflits, use regions of 1x1, 2x2 and 4x4 routers. They receive the same
// random permanent fault sets (0.25 and 0.5 faults per router on routers and
// local, north and east links, with the diagnosed masks equal to the faults)
// and the same tornado traffic of 16-flit packets (each IP to the node one
// column east and one row north, wrapping). For every copy each received
// flit must equal the value predicted by the reference path model. The
// testbench reports the mean square error of the flit values per region size
// and checks that, summed over all fault sets, it does not shrink as the
// regions grow: bigger regions merge more faults into one permutation.
module tb_rbisu_region_sizes;
  import rbisu_pkg::*;
  import rbisu_ref_pkg::*;

  localparam int W = 4, H = 4, NR = W * H;
  localparam int FW = FLIT_W_DEF, SW = SUBFLIT_W_DEF, N = FW / SW;
  localparam int CW = 2;
  localparam int PKT = PKT_FLITS;
  localparam int NCFG = 3;
  localparam int RSZ [NCFG] = '{1, 2, 4};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NR-1:0][FW-1:0] fi_router, fi_local, fi_north, fi_east;
  logic                  cfg_start;

  int checks = 0, failures = 0;
  real mse [NCFG];
  int  drained [NCFG];
  int  n_moved = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  typedef struct { logic [FW-1:0] d; bit h; bit t; } flit_t;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int RS = RSZ[c];
    localparam int NRX = (W + RS - 1) / RS, NREG = NRX * ((H + RS - 1) / RS);

    logic [NR-1:0]         inj_valid, inj_ready, inj_head, inj_tail;
    logic [NR-1:0][FW-1:0] inj_data;
    logic [NR-1:0]         ej_valid, ej_ready, ej_head, ej_tail;
    logic [NR-1:0][FW-1:0] ej_data;
    logic                  cfg_busy;

    rbisu_noc #(.MESH_W(W), .MESH_H(H), .REGION(RS)) dut (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_data(inj_data),
      .inj_head(inj_head), .inj_tail(inj_tail),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_data(ej_data),
      .ej_head(ej_head), .ej_tail(ej_tail),
      .em_router(fi_router), .em_local(fi_local), .em_north(fi_north), .em_east(fi_east),
      .fi_router(fi_router), .fi_local(fi_local), .fi_north(fi_north), .fi_east(fi_east),
      .cfg_start(cfg_start), .cfg_busy(cfg_busy));

    perm_t         where [NREG];
    flit_t         txq  [NR][$];
    logic [FW-1:0] expq [NR][NR][$];
    logic [FW-1:0] sent [NR][NR][$];
    int            cur_src [NR];
    int            outstanding = 0;

    function automatic int reg_of(int x, int y);
      return (y / RS) * NRX + (x / RS);
    endfunction

    function automatic logic [63:0] lg(logic [63:0] f, int g);
      return gather(f, FW, SW, where[g]);
    endfunction

    // placement of every region from the current fault masks
    function automatic int plan();
      logic [63:0] rem [NREG];
      perm_t content;
      int worst = 0;
      for (int g = 0; g < NREG; g++) rem[g] = '0;
      for (int r = 0; r < NR; r++)
        rem[reg_of(r % W, r / W)] |= fi_router[r] | fi_local[r] | fi_north[r] | fi_east[r];
      for (int g = 0; g < NREG; g++) begin
        int nf = 0;
        for (int s = 0; s < N; s++) if (slot_key(rem[g], SW, s) != 0) nf++;
        if (nf > worst) worst = nf;
        ref_perm(rem[g], FW, SW, content, where[g]);
      end
      return worst;
    endfunction

    function automatic void add_packet(int s, int d, int seq);
      int x = s % W, y = s / W, dx = d % W, dy = d / W;
      logic [63:0] err, raw;
      err = lg(fi_local[s], reg_of(x, y)) ^ lg(fi_router[s], reg_of(x, y));
      raw = fi_local[s] ^ fi_router[s];
      while (x != dx) begin
        int nx = (dx > x) ? x + 1 : x - 1;
        int lo = (nx < x) ? nx : x;
        err ^= lg(fi_east[y*W + lo], reg_of(lo, y)) ^ lg(fi_router[y*W + nx], reg_of(nx, y));
        raw ^= fi_east[y*W + lo] ^ fi_router[y*W + nx];
        x = nx;
      end
      while (y != dy) begin
        int ny = (dy > y) ? y + 1 : y - 1;
        int lo = (ny < y) ? ny : y;
        err ^= lg(fi_north[lo*W + x], reg_of(x, lo)) ^ lg(fi_router[ny*W + x], reg_of(x, ny));
        raw ^= fi_north[lo*W + x] ^ fi_router[ny*W + x];
        y = ny;
      end
      err ^= lg(fi_local[d], reg_of(dx, dy));
      raw ^= fi_local[d];
      if (c == 0 && raw != 0 && ($clog2(raw + 64'd1) > $clog2(err + 64'd1))) n_moved++;
      for (int f = 0; f < PKT; f++) begin
        flit_t fl;
        fl.d = {$urandom, $urandom};
        if (f == 0) begin
          fl.d[FW-1 -: CW]    = CW'(d / W);
          fl.d[FW-1-CW -: CW] = CW'(d % W);
          fl.d[55:48]         = 8'(s);
          fl.d[47:40]         = 8'(seq);
        end
        fl.h = (f == 0);
        fl.t = (f == PKT - 1);
        txq[s].push_back(fl);
        expq[d][s].push_back(fl.d ^ err);
        sent[d][s].push_back(fl.d);
        outstanding++;
      end
    endfunction

    always @(negedge clk) begin
      for (int r = 0; r < NR; r++) begin
        if (rst_n && txq[r].size() > 0 && ($urandom_range(4, 0) != 0)) begin
          inj_valid[r] <= 1'b1;
          inj_data[r]  <= txq[r][0].d;
          inj_head[r]  <= txq[r][0].h;
          inj_tail[r]  <= txq[r][0].t;
        end else begin
          inj_valid[r] <= 1'b0;
        end
        ej_ready[r] <= ($urandom_range(3, 0) != 0);
      end
    end

    always @(posedge clk) if (rst_n) begin
      for (int r = 0; r < NR; r++) begin
        if (inj_valid[r] && inj_ready[r]) void'(txq[r].pop_front());
        if (ej_valid[r] && ej_ready[r]) begin
          if (ej_head[r]) cur_src[r] = int'(ej_data[r][55:48]);
          if (cur_src[r] >= NR || expq[r][cur_src[r]].size() == 0) begin
            check(0, $sformatf("region %0d node %0d: unexpected flit %h", RS, r, ej_data[r]));
          end else begin
            logic [FW-1:0] e, sd;
            real dv;
            e  = expq[r][cur_src[r]].pop_front();
            sd = sent[r][cur_src[r]].pop_front();
            outstanding--;
            check(ej_data[r] == e, $sformatf("region %0d node %0d: got %h expected %h",
                                             RS, r, ej_data[r], e));
            dv = (ej_data[r] > sd) ? real'(ej_data[r] - sd) : real'(sd - ej_data[r]);
            mse[c] += dv * dv;
          end
        end
      end
    end

    initial begin
      inj_valid = '0; inj_data = '0; inj_head = '0; inj_tail = '0; ej_ready = '0;
      for (int g = 0; g < NREG; g++) for (int i = 0; i < MAXSF; i++) where[g][i] = i;
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sets, n_flits;
    bit stuck;
    n_sets = 0; n_flits = 0; stuck = 0;
    fi_router = '0; fi_local = '0; fi_north = '0; fi_east = '0;
    cfg_start = 0;
    for (int c = 0; c < NCFG; c++) mse[c] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int set = 0; set < 16 && !stuck; set++) begin
      int nf, worst, guard;
      nf = (set < 8) ? NR / 4 : NR / 2;
      // draw a fault set the header fields survive in every configuration
      do begin
        fi_router = '0; fi_local = '0; fi_north = '0; fi_east = '0;
        for (int k = 0; k < nf; k++) begin
          int r, b;
          r = $urandom_range(NR - 1, 0);
          b = $urandom_range(FW - 1, 0);
          case ($urandom_range(3, 0))
            0: fi_router[r][b] = 1'b1;
            1: fi_local[r][b]  = 1'b1;
            2: if (r / W < H - 1) fi_north[r][b] = 1'b1; else fi_router[r][b] = 1'b1;
            default: if (r % W < W - 1) fi_east[r][b] = 1'b1; else fi_router[r][b] = 1'b1;
          endcase
        end
        worst = g_cfg[0].plan();
        if (g_cfg[1].plan() > worst) worst = g_cfg[1].plan();
        if (g_cfg[2].plan() > worst) worst = g_cfg[2].plan();
      end while (worst > 8);
      // all copies update their registers
      @(negedge clk);
      cfg_start = 1;
      @(negedge clk);
      cfg_start = 0;
      guard = 0;
      while ((g_cfg[0].cfg_busy || g_cfg[1].cfg_busy || g_cfg[2].cfg_busy) && guard < 2000) begin
        guard++;
        @(negedge clk);
      end
      check(guard == N * (N + 2) + 1, $sformatf("register update took %0d cycles", guard));
      // same tornado traffic into every copy
      for (int s = 0; s < NR; s++) begin
        int d;
        d = (((s / W) + H/2 - 1) % H) * W + ((s % W) + W/2 - 1) % W;
        process::self().srandom(set * 1000 + s);
        g_cfg[0].add_packet(s, d, set);
        process::self().srandom(set * 1000 + s);
        g_cfg[1].add_packet(s, d, set);
        process::self().srandom(set * 1000 + s);
        g_cfg[2].add_packet(s, d, set);
        n_flits += PKT;
      end
      guard = 0;
      while ((g_cfg[0].outstanding + g_cfg[1].outstanding + g_cfg[2].outstanding) > 0 && guard < 20000) begin
        guard++;
        @(posedge clk);
      end
      stuck = (guard >= 20000);
      check(!stuck, $sformatf("set %0d: all packets delivered in every copy", set));
      n_sets++;
    end
    for (int c = 0; c < NCFG; c++)
      $display("region %0dx%0d: MSE %e over %0d flits and %0d fault sets",
               RSZ[c], RSZ[c], mse[c] / n_flits, n_flits, n_sets);
    check(mse[0] <= mse[1] && mse[1] <= mse[2], "MSE does not shrink as regions grow");
    check(n_moved > 0, "fault impact moved to lower bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
