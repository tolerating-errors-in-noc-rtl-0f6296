// sd_block: shuffler (S) or de-shuffler (D) block.
//
// A flit of FLIT_W bits is seen as N_SF = FLIT_W/SUBFLIT_W subflits. Output
// subflit j is input subflit sel[j]: N_SF multiplexers, each N_SF subflits
// wide, whose selections come from N_SF registers of log2(N_SF) bits. An S
// block and a D block are the same hardware; they differ only in the values
// loaded into their registers (a permutation and its inverse). That structure
// is the one of the BiSu method. The load port and the reset value are this
// design's choices: on reset the registers hold the identity mapping (no
// shuffling), and a one-cycle cfg_load pulse copies cfg_sel into them.
//
// Timing: the data path is purely combinational (flit in, flit out in the
// same cycle); cfg_load takes effect on the next clock edge.
module sd_block #(
  parameter int unsigned FLIT_W    = 64,
  parameter int unsigned SUBFLIT_W = 4,
  localparam int unsigned NSF      = FLIT_W / SUBFLIT_W,
  localparam int unsigned SELW     = (NSF > 1) ? $clog2(NSF) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_load,
  input  logic [NSF-1:0][SELW-1:0]   cfg_sel,
  input  logic [FLIT_W-1:0]          din,
  output logic [FLIT_W-1:0]          dout
);

  logic [NSF-1:0][SELW-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NSF; j++) sel_q[j] <= SELW'(j);
    end else if (cfg_load) begin
      sel_q <= cfg_sel;
    end
  end

  logic [NSF-1:0][SUBFLIT_W-1:0] sf_in, sf_out;
  assign sf_in = din;

  always_comb begin
    for (int j = 0; j < NSF; j++) sf_out[j] = sf_in[sel_q[j]];
  end

  assign dout = sf_out;

endmodule
