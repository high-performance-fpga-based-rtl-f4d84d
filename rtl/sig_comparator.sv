// sig_comparator: compares the 48 bits of the incoming sub-string that did
// not go to the CAM with the partial signature read from the signature RAM,
// and reports whether the stored row is the last of its key group.
//
// Purely combinational: eq is high when all 48 bits are equal, last repeats
// the row's finish bit. The detection controller samples both in the cycle
// the RAM data is valid. Width and function follow the published design.
module sig_comparator
  import ids_pkg::*;
(
  input  logic [SIG_W-1:0] data,   // bits 47:0 of the incoming sub-string
  input  sig_entry_t       entry,  // row read from the signature RAM
  output logic             eq,     // data equals entry.sig
  output logic             last    // entry is the last of its key group
);

  assign eq   = (data == entry.sig);
  assign last = entry.finish;

endmodule
