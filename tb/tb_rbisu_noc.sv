// tb_rbisu_noc: end-to-end test of the R-BiSu mesh at its default size
// (8x8 routers, 64-bit flits, 4-bit subflits, 2x2 regions).
//
// Every IP sends 16-flit packets: one with the tornado pattern (to the node
// three columns east and three rows north, wrapping) and one to a random
// node. Ejection ports apply random back-pressure. Three phases:
//   1. no fault, registers at reset (no shuffling): all data must arrive
//      unchanged;
//   2. and 3. a random set of permanent faults (bit flips on routers and on
//      local, north and east links), fewer in phase 2 than in phase 3. The
//      same masks are given as the diagnosed error masks, every region
//      recomputes its S/D registers (the update must take N*(N+2)+1 = 289
//      cycles), then the traffic runs again.
// For each flit the testbench predicts the exact value that must arrive: it
// follows the XY path, and for each router and link crossed maps the fault
// mask of that element through the placement of the region that owns it
// (reference model in rbisu_ref_pkg), XORing the results. It also checks that
// the error stays in the subflits that the regions on the path gave to their
// faulty slots. Fault sets are drawn so that no region has more than 8 faulty
// slots, which keeps the header fields (top 4 logical subflits) clean.
//
// Mechanisms counted, each must occur: register updates, packets crossing a
// region border, regions using a non-identity shuffle, flits whose error was
// moved to less significant bits than without shuffling, injection stalls
// and ejection stalls.
module tb_rbisu_noc;
  import rbisu_pkg::*;
  import rbisu_ref_pkg::*;

  localparam int W = MESH_W_DEF, H = MESH_H_DEF, NR = W * H;
  localparam int FW = FLIT_W_DEF, SW = SUBFLIT_W_DEF, RS = REGION_DEF;
  localparam int N = FW / SW;
  localparam int NRX = (W + RS - 1) / RS, NREG = NRX * ((H + RS - 1) / RS);
  localparam int CW = 3;
  localparam int PKT = PKT_FLITS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NR-1:0]          inj_valid, inj_ready, inj_head, inj_tail;
  logic [NR-1:0][FW-1:0]  inj_data;
  logic [NR-1:0]          ej_valid, ej_ready, ej_head, ej_tail;
  logic [NR-1:0][FW-1:0]  ej_data;
  logic [NR-1:0][FW-1:0]  em_router, em_local, em_north, em_east;
  logic [NR-1:0][FW-1:0]  fi_router, fi_local, fi_north, fi_east;
  logic                   cfg_start, cfg_busy;

  rbisu_noc dut (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_data(inj_data),
    .inj_head(inj_head), .inj_tail(inj_tail),
    .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_data(ej_data),
    .ej_head(ej_head), .ej_tail(ej_tail),
    .em_router(em_router), .em_local(em_local), .em_north(em_north), .em_east(em_east),
    .fi_router(fi_router), .fi_local(fi_local), .fi_north(fi_north), .fi_east(fi_east),
    .cfg_start(cfg_start), .cfg_busy(cfg_busy));

  int checks = 0, failures = 0;
  int n_updates = 0, n_border = 0, n_shuffled_regions = 0, n_moved = 0;
  int n_inj_stall = 0, n_ej_stall = 0, n_flits = 0, n_faulty_flits = 0;
  int n_outstanding = 0;   // flits sent and not yet received
  int n_queued = 0;        // flits not yet accepted by the NoC
  bit stuck = 0;           // a phase did not drain: skip the rest

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------ reference state
  perm_t content [NREG], where [NREG];
  int    nfaulty [NREG];

  function automatic int reg_of(int x, int y);
    return (y / RS) * NRX + (x / RS);
  endfunction

  function automatic logic [63:0] to_logical(logic [63:0] f, int g);
    return gather(f, FW, SW, where[g]);
  endfunction

  function automatic int top_bit(logic [63:0] v);
    for (int b = 63; b >= 0; b--) if (v[b]) return b;
    return -1;
  endfunction

  // Error a flit from s to d picks up, in logical order; raw is the same
  // with no shuffling; lim is the largest count of faulty slots on the path.
  function automatic void path_error(int s, int d, output logic [63:0] err,
                                     output logic [63:0] raw, output int lim,
                                     output bit crosses);
    int x = s % W, y = s / W, dx = d % W, dy = d / W;
    int g0 = reg_of(x, y);
    err = to_logical(fi_local[s], g0) ^ to_logical(fi_router[s], g0);
    raw = fi_local[s] ^ fi_router[s];
    lim = nfaulty[g0];
    crosses = 0;
    while (x != dx) begin
      int nx = (dx > x) ? x + 1 : x - 1;
      int lo = (nx < x) ? nx : x;
      int gl = reg_of(lo, y), gn = reg_of(nx, y);
      err ^= to_logical(fi_east[y*W + lo], gl) ^ to_logical(fi_router[y*W + nx], gn);
      raw ^= fi_east[y*W + lo] ^ fi_router[y*W + nx];
      if (nfaulty[gl] > lim) lim = nfaulty[gl];
      if (nfaulty[gn] > lim) lim = nfaulty[gn];
      if (gn != reg_of(x, y)) crosses = 1;
      x = nx;
    end
    while (y != dy) begin
      int ny = (dy > y) ? y + 1 : y - 1;
      int lo = (ny < y) ? ny : y;
      int gl = reg_of(x, lo), gn = reg_of(x, ny);
      err ^= to_logical(fi_north[lo*W + x], gl) ^ to_logical(fi_router[ny*W + x], gn);
      raw ^= fi_north[lo*W + x] ^ fi_router[ny*W + x];
      if (nfaulty[gl] > lim) lim = nfaulty[gl];
      if (nfaulty[gn] > lim) lim = nfaulty[gn];
      if (gn != reg_of(x, y)) crosses = 1;
      y = ny;
    end
    err ^= to_logical(fi_local[d], reg_of(dx, dy));
    raw ^= fi_local[d];
  endfunction

  // ------------------------------------------------ traffic
  typedef struct { logic [FW-1:0] d; bit h; bit t; } flit_t;
  flit_t         txq  [NR][$];
  logic [FW-1:0] expq [NR][NR][$];   // [dst][src] values that must arrive
  logic [FW-1:0] sent [NR][NR][$];   // [dst][src] values sent (for raw error)
  int            limq [NR][NR][$];

  task automatic add_packet(int s, int d, int seq);
    logic [63:0] err, raw;
    int lim;
    bit crosses;
    path_error(s, d, err, raw, lim, crosses);
    if (crosses) n_border++;
    for (int f = 0; f < PKT; f++) begin
      flit_t fl;
      fl.d = {$urandom, $urandom};
      if (f == 0) begin
        fl.d[FW-1 -: CW]      = CW'(d / W);
        fl.d[FW-1-CW -: CW]   = CW'(d % W);
        fl.d[55:48]           = 8'(s);
        fl.d[47:40]           = 8'(seq);
      end
      fl.h = (f == 0);
      fl.t = (f == PKT - 1);
      txq[s].push_back(fl);
      n_outstanding++;
      n_queued++;
      expq[d][s].push_back(fl.d ^ err);
      sent[d][s].push_back(fl.d);
      limq[d][s].push_back(lim);
      if ((fl.d ^ raw) != fl.d && top_bit(raw) > top_bit(err)) n_moved++;
    end
  endtask

  task automatic receive(int r);
    if (ej_head[r]) begin
      cur_src[r] = int'(ej_data[r][55:48]);
      check(int'(ej_data[r][FW-1 -: CW]) == r / W && int'(ej_data[r][FW-1-CW -: CW]) == r % W,
            $sformatf("node %0d: head for another node %h", r, ej_data[r]));
    end
    if (cur_src[r] >= NR || expq[r][cur_src[r]].size() == 0) begin
      check(0, $sformatf("node %0d: unexpected flit %h", r, ej_data[r]));
    end else begin
      logic [FW-1:0] e, sd;
      int lim;
      e = expq[r][cur_src[r]].pop_front();
      n_outstanding--;
      sd = sent[r][cur_src[r]].pop_front();
      lim = limq[r][cur_src[r]].pop_front();
      n_flits++;
      if (ej_data[r] != sd) n_faulty_flits++;
      check(ej_data[r] == e, $sformatf("node %0d from %0d: got %h expected %h",
                                       r, cur_src[r], ej_data[r], e));
      check(lim >= N || ((ej_data[r] ^ sd) >> (SW * lim)) == 0,
            $sformatf("node %0d: error %h beyond %0d faulty subflits",
                      r, ej_data[r] ^ sd, lim));
    end
  endtask

  int cur_src [NR];

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
      if (inj_valid[r] && !inj_ready[r]) n_inj_stall++;
      if (ej_valid[r] && !ej_ready[r]) n_ej_stall++;
      if (inj_valid[r] && inj_ready[r]) begin
        void'(txq[r].pop_front());
        n_queued--;
      end
      if (ej_valid[r] && ej_ready[r]) receive(r);
    end
  end

  task automatic run_traffic(int phase);
    int guard = 0;
    bit busy;
    for (int s = 0; s < NR; s++) begin
      int x = s % W, y = s / W;
      add_packet(s, ((y + H/2 - 1) % H) * W + (x + W/2 - 1) % W, 2 * phase);
      add_packet(s, $urandom_range(NR - 1, 0), 2 * phase + 1);
    end
    if (stuck) return;
    // a phase needs a few thousand cycles; give up well before the watchdog
    do begin
      @(posedge clk);
      guard++;
    end while ((n_outstanding > 0 || n_queued > 0) && guard < 30000);
    repeat (20) @(posedge clk);   // nothing further may arrive
    busy = (n_outstanding != 0 || n_queued != 0);
    if (busy) stuck = 1;
    check(!busy, $sformatf("phase %0d: all packets delivered (%0d cycles, %0d flits missing)",
                           phase, guard, n_outstanding));
  endtask

  // Draw nf faults; retry until no region has more than 8 faulty slots.
  task automatic draw_faults(int nf);
    logic [63:0] rem [NREG];
    int worst;
    do begin
      fi_router = '0; fi_local = '0; fi_north = '0; fi_east = '0;
      for (int k = 0; k < nf; k++) begin
        int r = $urandom_range(NR - 1, 0), b = $urandom_range(FW - 1, 0);
        case ($urandom_range(3, 0))
          0: fi_router[r][b] = 1'b1;
          1: fi_local[r][b]  = 1'b1;
          2: if (r / W < H - 1) fi_north[r][b] = 1'b1; else fi_router[r][b] = 1'b1;
          default: if (r % W < W - 1) fi_east[r][b] = 1'b1; else fi_router[r][b] = 1'b1;
        endcase
      end
      for (int g = 0; g < NREG; g++) rem[g] = '0;
      for (int r = 0; r < NR; r++)
        rem[reg_of(r % W, r / W)] |= fi_router[r] | fi_local[r] | fi_north[r] | fi_east[r];
      worst = 0;
      n_shuffled_regions = 0;
      for (int g = 0; g < NREG; g++) begin
        nfaulty[g] = 0;
        for (int s = 0; s < N; s++) if (slot_key(rem[g], SW, s) != 0) nfaulty[g]++;
        if (nfaulty[g] > worst) worst = nfaulty[g];
        ref_perm(rem[g], FW, SW, content[g], where[g]);
        for (int s = 0; s < N; s++) if (content[g][s] != s) begin n_shuffled_regions++; break; end
      end
    end while (worst > 8);
    em_router = fi_router; em_local = fi_local; em_north = fi_north; em_east = fi_east;
  endtask

  task automatic update_registers();
    int busy_cycles = 0;
    @(negedge clk);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    while (cfg_busy && busy_cycles < 2000) begin
      busy_cycles++;
      @(negedge clk);
    end
    n_updates++;
    check(busy_cycles == N * (N + 2) + 1,
          $sformatf("register update took %0d cycles, expected %0d", busy_cycles, N * (N + 2) + 1));
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inj_valid = '0; inj_data = '0; inj_head = '0; inj_tail = '0; ej_ready = '0;
    em_router = '0; em_local = '0; em_north = '0; em_east = '0;
    fi_router = '0; fi_local = '0; fi_north = '0; fi_east = '0;
    cfg_start = 0;
    for (int g = 0; g < NREG; g++) begin
      nfaulty[g] = 0;
      for (int i = 0; i < MAXSF; i++) begin content[g][i] = i; where[g][i] = i; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run_traffic(0);
    draw_faults(NR / 2);
    update_registers();
    run_traffic(1);
    draw_faults(NR);
    update_registers();
    run_traffic(2);

    $display("flits %0d (with error %0d), updates %0d, border packets %0d, shuffled regions %0d, moved %0d, inj stalls %0d, ej stalls %0d",
             n_flits, n_faulty_flits, n_updates, n_border, n_shuffled_regions, n_moved, n_inj_stall, n_ej_stall);
    check(n_updates > 0, "register update happened");
    check(n_border > 0, "region border crossing happened");
    check(n_shuffled_regions > 0, "non-identity shuffle in use");
    check(n_moved > 0, "fault impact moved to lower bits");
    check(n_faulty_flits > 0, "faults reached the data");
    check(n_inj_stall > 0, "injection back-pressure happened");
    check(n_ej_stall > 0, "ejection back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
