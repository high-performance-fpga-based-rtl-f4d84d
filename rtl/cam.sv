// cam: content-addressable memory that turns a 16-bit key into the 16-bit
// address at which that key is stored.
//
// The detector supplies the first two bytes of a suspicious sub-string; the
// CAM returns where that key is stored plus a hit flag, so the signature
// memory never has to be searched from top to bottom. The published design
// builds a 16-bit CAM out of the FPGA's embedded CAM blocks plus glue logic;
// here it is written directly as DEPTH key registers with a valid bit each,
// all compared in parallel with the search key. If several entries hold the
// same key the lowest address wins (a correctly loaded table never has
// duplicates).
//
// Interface and timing:
//   wr_en/wr_addr/wr_key/wr_valid  load (wr_valid=1) or invalidate an entry;
//                                  takes effect at the clock edge.
//   search_en/search_key           a search issued in cycle t returns
//   hit/hit_addr                   hit and hit_addr after the edge ending t
//                                  (one cycle latency, registered outputs).
//   rst_n                          synchronous, active low; invalidates every
//                                  entry (this design's choice).
module cam #(
  parameter int unsigned KEY_W = 16,
  parameter int unsigned AW    = 16,
  parameter int unsigned DEPTH = 2 ** AW
) (
  input  logic             clk,
  input  logic             rst_n,
  // load port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [KEY_W-1:0] wr_key,
  input  logic             wr_valid,
  // search port
  input  logic             search_en,
  input  logic [KEY_W-1:0] search_key,
  output logic             hit,
  output logic [AW-1:0]    hit_addr
);

  logic [KEY_W-1:0] keys  [DEPTH];
  logic [DEPTH-1:0] valid;

  logic          found;
  logic [AW-1:0] found_addr;

  // Parallel compare of every entry; priority to the lowest address.
  always_comb begin
    found      = 1'b0;
    found_addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == search_key) begin
        found      = 1'b1;
        found_addr = AW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) keys[wr_addr] <= wr_key;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) valid[i] <= 1'b0;
      hit      <= 1'b0;
      hit_addr <= '0;
    end else begin
      if (wr_en) valid[wr_addr] <= wr_valid;
      if (search_en) begin
        hit      <= found;
        hit_addr <= found_addr;
      end
    end
  end

endmodule
