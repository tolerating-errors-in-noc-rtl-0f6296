// tb_xy_router: checks one router (column 1, row 1 of a 4x4 mesh).
// All five inputs inject packets of 1 to 5 flits at random destinations while
// the outputs apply random back-pressure. A monitor on every output checks
// that each packet leaves through the port given by XY routing, whole, in
// order and not interleaved with another packet, and that packets from one
// input to one output keep their order. Three phases:
//   A. identity de-shuffle in the routing controller, no fault;
//   B. a random permutation loaded into the CTRL de-shufflers, with all flits
//      shuffled accordingly before injection (the router must route on the
//      de-shuffled header and forward the shuffled data unchanged);
//   C. as B plus a router fault mask, which must flip the same bits of every
//      flit leaving the router.
// It counts output conflicts (two inputs asking for one free output) and
// back-pressure stalls; each must occur.
module tb_xy_router;
  import rbisu_pkg::*;
  import rbisu_ref_pkg::*;

  localparam int FW = 64, SW = 4, N = FW / SW, SELW = $clog2(N);
  localparam int MW = 4, MH = 4, RX = 1, RY = 1, CW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                      cfg_load;
  logic [N-1:0][SELW-1:0]    cfg_dsel;
  logic [FW-1:0]             fi_mask;
  logic [NPORTS-1:0]         in_valid, in_ready, in_head, in_tail;
  logic [NPORTS-1:0][FW-1:0] in_data;
  logic [NPORTS-1:0]         out_valid, out_ready, out_head, out_tail;
  logic [NPORTS-1:0][FW-1:0] out_data;

  xy_router #(.FLIT_W(FW), .SUBFLIT_W(SW), .MESH_W(MW), .MESH_H(MH), .X(RX), .Y(RY)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_dsel(cfg_dsel), .fi_mask(fi_mask),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_head(in_head), .in_tail(in_tail),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_head(out_head), .out_tail(out_tail));

  int checks = 0, failures = 0;
  int conflicts = 0, stalls = 0, received = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { logic [FW-1:0] d; bit h; bit t; } flit_t;
  flit_t inq [NPORTS][$];                 // flits waiting to be injected
  logic [FW-1:0] expq [NPORTS][NPORTS][$]; // [in][out] logical flits expected
  perm_t content, where;                   // current shuffle (slot <- subflit)
  logic [FW-1:0] cur_fi;

  function automatic int xy_port(int dx, int dy);
    if (dx > RX) return P_EAST;
    if (dx < RX) return P_WEST;
    if (dy > RY) return P_NORTH;
    if (dy < RY) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // ---- drivers: change on the falling edge, handshake sampled on the rising
  for (genvar i = 0; i < NPORTS; i++) begin : g_drv
    always @(negedge clk) begin
      if (inq[i].size() > 0 && ($urandom_range(3, 0) != 0)) begin
        in_valid[i] <= 1'b1;
        in_data[i]  <= gather(64'(inq[i][0].d), FW, SW, content);
        in_head[i]  <= inq[i][0].h;
        in_tail[i]  <= inq[i][0].t;
      end else begin
        in_valid[i] <= 1'b0;
      end
    end
    always @(posedge clk) if (rst_n && in_valid[i] && in_ready[i]) void'(inq[i].pop_front());
  end

  // ---- monitors
  int cur_src [NPORTS];
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    always @(negedge clk) out_ready[o] <= ($urandom_range(3, 0) != 0);
    always @(posedge clk) begin
      if (rst_n && out_valid[o] && !out_ready[o]) stalls++;
      if (rst_n && out_valid[o] && out_ready[o]) begin
        logic [FW-1:0] logical;
        logical = gather(64'(out_data[o] ^ cur_fi), FW, SW, where);
        if (out_head[o]) cur_src[o] = int'(logical[47:40]);
        if (cur_src[o] >= NPORTS || expq[cur_src[o]][o].size() == 0) begin
          check(0, $sformatf("out %0d: unexpected flit %h", o, logical));
        end else begin
          logic [FW-1:0] e;
          e = expq[cur_src[o]][o].pop_front();
          check(logical == e, $sformatf("out %0d: flit %h expected %h", o, logical, e));
          check(out_data[o] == (gather(64'(e), FW, SW, content) ^ cur_fi),
                $sformatf("out %0d: fault mask not applied as expected", o));
          received++;
        end
      end
    end
  end

  // conflicts: two inputs with a head flit for the same unlocked output
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++)
      if (!dut.lock[o] && $countones(dut.req[o]) > 1) conflicts++;

  task automatic make_packets(int count);
    for (int k = 0; k < count; k++) begin
      int src, dx, dy, len, op;
      src = $urandom_range(NPORTS - 1, 0);
      dx = $urandom_range(MW - 1, 0);
      dy = $urandom_range(MH - 1, 0);
      len = $urandom_range(5, 1);
      op = xy_port(dx, dy);
      for (int f = 0; f < len; f++) begin
        flit_t fl;
        fl.d = {$urandom, $urandom};
        if (f == 0) begin
          fl.d[FW-1 -: CW]    = CW'(dy);
          fl.d[FW-1-CW -: CW] = CW'(dx);
        end
        fl.d[47:40] = 8'(src);
        fl.d[39:24] = 16'(k);
        fl.h = (f == 0);
        fl.t = (f == len - 1);
        inq[src].push_back(fl);
        expq[src][op].push_back(fl.d);
      end
    end
  endtask

  task automatic drain(string phase);
    int guard = 0;
    bit busy;
    do begin
      @(posedge clk);
      guard++;
      busy = 0;
      for (int i = 0; i < NPORTS; i++) if (inq[i].size() > 0) busy = 1;
      for (int i = 0; i < NPORTS; i++) for (int o = 0; o < NPORTS; o++)
        if (expq[i][o].size() > 0) busy = 1;
    end while (busy && guard < 20000);
    check(!busy, $sformatf("%s: all packets delivered", phase));
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MAXSF; i++) begin content[i] = i; where[i] = i; end
    cur_fi = '0; fi_mask = '0; cfg_load = 0; cfg_dsel = '0;
    in_valid = '0; in_data = '0; in_head = '0; in_tail = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A: identity
    make_packets(150);
    drain("phase A");
    // B: random permutation
    for (int i = 0; i < N; i++) content[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0);
      t = content[i]; content[i] = content[j]; content[j] = t;
    end
    for (int i = 0; i < N; i++) where[content[i]] = i;
    @(negedge clk);
    for (int i = 0; i < N; i++) cfg_dsel[i] = SELW'(where[i]);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    make_packets(150);
    drain("phase B");
    // C: permutation plus router fault; keep header destination bits clean
    @(negedge clk);
    cur_fi = {$urandom, $urandom} & {$urandom, $urandom};
    for (int b = 0; b < FW; b++)
      if (content[b / SW] >= N - 4) cur_fi[b] = 1'b0;  // slots carrying the top 16 logical bits
    fi_mask = cur_fi;
    make_packets(150);
    drain("phase C");
    check(conflicts > 0, "output conflicts occurred");
    check(stalls > 0, "back-pressure stalls occurred");
    $display("received %0d flits, %0d conflicts, %0d stalls", received, conflicts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
