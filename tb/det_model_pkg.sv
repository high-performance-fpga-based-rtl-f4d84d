// det_model_pkg: reference model of the detection stage for the testbenches.
// It keeps the rule table as the testbench loaded it (one key and a list of
// partial signatures per CAM address) and predicts, for a 64-bit sub-string,
// the result, the reported number and the latency in cycles, straight from
// the rules: lowest CAM address holding the key; slots examined in order;
// a match reports {address, slot}; a mismatch in slot 7 reports the address
// as suspicious information; a mismatch on a finish row or a missing key is
// clean. Latency = 2 + slot where the search ended (1 for a missing key).
package det_model_pkg;
  import ids_pkg::*;

  class det_model;
    int unsigned cam_aw;
    bit          key_valid [int unsigned];
    logic [15:0] key_of    [int unsigned];
    logic [47:0] sigs      [int unsigned][$];

    function new(int unsigned aw);
      cam_aw = aw;
    endfunction

    // Add one signature (its 16-bit key and 48-bit remainder) to group g.
    function void add(int unsigned g, logic [15:0] key, logic [47:0] sig);
      key_valid[g] = 1'b1;
      key_of[g]    = key;
      sigs[g].push_back(sig);
    endfunction

    // Finish bit of row (g, slot): last signature of the group.
    function bit finish(int unsigned g, int unsigned slot);
      return slot == sigs[g].size() - 1;
    endfunction

    function void predict(input logic [63:0] d, output result_e res,
                          output logic [31:0] id, output int lat);
      int found;
      found = -1;
      foreach (key_valid[g])
        if (found < 0 && key_valid[g] && key_of[g] == d[63:48]) found = int'(g);
      res = RES_CLEAN; id = 0; lat = 1;
      if (found < 0) return;
      for (int s = 0; s < sigs[found].size() && s < 8; s++) begin
        lat = 2 + s;
        if (sigs[found][s] == d[47:0]) begin
          res = RES_MATCH; id = (found << 3) | s; return;
        end
        if (s == 7) begin
          res = RES_SUSPECT; id = found; return;
        end
      end
    endfunction
  endclass
endpackage
