// reg_compute: computes the register values of the S and D blocks of a
// region from its region error mask (REM).
//
// The flit is N_SF physical subflit slots. The key of slot s is the slice of
// the REM that falls in it, read as an unsigned number, so a fault on a higher
// bit of a slot always outweighs any faults on lower bits of it. The block
// gives the least significant logical subflits to the slots with the largest
// keys, pushing the effect of faults onto the least significant bits. It runs
// a selection sort, one slot per clock cycle:
//
//   perm = identity (perm[slot] = logical subflit placed there)
//   for r = 0 .. N_SF-1:
//     best = slot now holding r
//     for each slot s still holding a logical subflit >= r:
//       if key[s] > key[best] then best = s          (strict: ties keep r)
//     swap the contents of best and of the slot holding r
//
// With no fault the identity is kept, and with faults in one slot only that
// slot and slot 0 are exchanged. The method asks only for an algorithm that
// minimises the impact of the faults; the sort, its tie rule and the
// sequential schedule are this design's choices.
//
// Interface: a start pulse latches rem and begins the computation (ignored
// while busy). ssel[j] = perm[j] is the shuffler selection of output slot j,
// dsel[l] is the slot that holds logical subflit l, the de-shuffler
// selection. load pulses for one cycle when both are final; the S and D
// registers copy them on that pulse.
//
// Timing: load rises N_SF*(N_SF+2)+1 cycles after the start cycle (one
// set-up cycle, N_SF scan cycles and one swap cycle per rank, one final
// cycle): 289 cycles for 16 subflits, 81 for 8 and 25 for 4.
module reg_compute #(
  parameter int unsigned FLIT_W    = 64,
  parameter int unsigned SUBFLIT_W = 4,
  localparam int unsigned NSF      = FLIT_W / SUBFLIT_W,
  localparam int unsigned SELW     = (NSF > 1) ? $clog2(NSF) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [FLIT_W-1:0]        rem,
  output logic                     busy,
  output logic                     load,
  output logic [NSF-1:0][SELW-1:0] ssel,
  output logic [NSF-1:0][SELW-1:0] dsel
);

  typedef enum logic [2:0] {S_IDLE, S_RANK, S_SCAN, S_SWAP, S_DONE} state_e;

  state_e                          state;
  logic [NSF-1:0][SUBFLIT_W-1:0]   key;     // latched REM, one slice per slot
  logic [NSF-1:0][SELW-1:0]        perm;    // slot -> logical subflit
  logic [NSF-1:0][SELW-1:0]        pos;     // logical subflit -> slot
  logic [SELW-1:0]                 rank;    // logical subflit being placed
  logic [SELW-1:0]                 scan;    // slot being examined
  logic [SELW-1:0]                 best;    // worst slot found so far
  logic [SUBFLIT_W-1:0]            best_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      key      <= '0;
      rank     <= '0;
      scan     <= '0;
      best     <= '0;
      best_key <= '0;
      for (int i = 0; i < NSF; i++) begin
        perm[i] <= SELW'(i);
        pos[i]  <= SELW'(i);
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            key  <= rem;
            rank <= '0;
            for (int i = 0; i < NSF; i++) begin
              perm[i] <= SELW'(i);
              pos[i]  <= SELW'(i);
            end
            state <= S_RANK;
          end
        end
        S_RANK: begin
          best     <= pos[rank];
          best_key <= key[pos[rank]];
          scan     <= '0;
          state    <= S_SCAN;
        end
        S_SCAN: begin
          if (perm[scan] >= rank && key[scan] > best_key) begin
            best     <= scan;
            best_key <= key[scan];
          end
          scan <= scan + 1'b1;
          if (scan == SELW'(NSF-1)) state <= S_SWAP;
        end
        S_SWAP: begin
          // slot pos[rank] takes the subflit held by best, best takes rank
          perm[pos[rank]] <= perm[best];
          perm[best]      <= rank;
          pos[perm[best]] <= pos[rank];
          pos[rank]       <= best;
          rank            <= rank + 1'b1;
          state           <= (rank == SELW'(NSF-1)) ? S_DONE : S_RANK;
        end
        S_DONE: begin
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign load = (state == S_DONE);
  assign ssel = perm;
  assign dsel = pos;

endmodule
