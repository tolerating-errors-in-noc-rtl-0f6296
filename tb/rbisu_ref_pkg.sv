// rbisu_ref_pkg: reference models used by the testbenches, written
// separately from the RTL.
//
// ref_perm gives, for an error mask, the subflit placement the register
// computation must produce: subflits are placed from the least significant
// one up, each into the not yet used slot with the largest fault key
// (the slice of the mask in that slot, as an unsigned number); a tie keeps
// the subflit where it already is, otherwise the lowest-numbered slot wins,
// and the subflit that was there moves into the freed slot.
package rbisu_ref_pkg;

  localparam int MAXSF = 64;

  typedef int perm_t [MAXSF];

  function automatic longint unsigned slot_key(logic [63:0] m, int sw, int s);
    longint unsigned k = 0;
    for (int b = 0; b < sw; b++) k |= longint'(m[s*sw + b]) << b;
    return k;
  endfunction

  // content[s]: logical subflit placed in slot s; where[l]: slot of subflit l
  function automatic void ref_perm(input logic [63:0] m, input int fw, input int sw,
                                   output perm_t content, output perm_t where);
    int n = fw / sw;
    for (int i = 0; i < MAXSF; i++) begin content[i] = i; where[i] = i; end
    for (int r = 0; r < n; r++) begin
      int cur = where[r];
      int pick = cur;
      for (int s = 0; s < n; s++)
        if (content[s] >= r && slot_key(m, sw, s) > slot_key(m, sw, pick)) pick = s;
      if (pick != cur) begin
        int moved = content[pick];
        content[cur]  = moved;
        where[moved]  = cur;
        content[pick] = r;
        where[r]      = pick;
      end
    end
  endfunction

  // Gather: output subflit j = input subflit idx[j].
  function automatic logic [63:0] gather(logic [63:0] d, int fw, int sw, perm_t idx);
    logic [63:0] o = '0;
    for (int j = 0; j < fw / sw; j++)
      for (int b = 0; b < sw; b++) o[j*sw + b] = d[idx[j]*sw + b];
    return o;
  endfunction

endpackage
