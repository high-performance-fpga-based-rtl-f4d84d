// ids_pkg: widths, record types and the Bloom filter hash shared by the
// signature-matching datapath.
//
// The detector works on 64-bit (8-byte) sub-strings. The first two bytes of a
// sub-string (bits 63:48) are the 16-bit key looked up in the CAM; the other
// six bytes (bits 47:0) are compared with the 48-bit partial signatures held
// in the signature RAM. A RAM row is addressed by the 16-bit CAM address
// extended with a 3-bit slot number (19 bits), so up to eight signatures can
// share one key. Each row carries a finish bit that marks the last signature
// of its key group. These numbers follow the published architecture.
//
// The hash used by the Bloom filter is this design's own choice (the source
// architecture only says "hash function"): an H3-class hash, i.e. the XOR of
// a pseudo-random constant per set input bit, with the constants taken from a
// multiplicative (golden-ratio) hash of the bit position and hash index.
package ids_pkg;

  localparam int unsigned DATA_W = 64;  // incoming sub-string width
  localparam int unsigned KEY_W  = 16;  // bits sent to the CAM
  localparam int unsigned SIG_W  = 48;  // bits sent to the comparator
  localparam int unsigned SLOT_W = 3;   // address extension: 8 slots per key

  // One row of the signature RAM: finish bit (leftmost) and partial signature.
  typedef struct packed {
    logic             finish;
    logic [SIG_W-1:0] sig;
  } sig_entry_t;

  // Result of examining one suspicious sub-string.
  typedef enum logic [1:0] {
    RES_CLEAN   = 2'd0,  // no stored signature: not suspicious
    RES_MATCH   = 2'd1,  // a stored signature matched, rule number given
    RES_SUSPECT = 2'd2   // the eighth slot of a full key group failed
  } result_e;

  // Bloom filter hash constant for input bit b of hash function i:
  // the top MW bits of (b*NH + i + 1) * 0x9E3779B1 (mod 2^32).
  function automatic logic [31:0] bf_const(int unsigned i, int unsigned b, int unsigned nh);
    logic [31:0] p;
    p = 32'((b * nh + i + 1) * 32'h9E37_79B1);
    return p;
  endfunction

  // H3 hash of a 64-bit window to an MW-bit index (MW <= 32).
  function automatic logic [31:0] bf_hash(int unsigned i, logic [DATA_W-1:0] x,
                                          int unsigned mw, int unsigned nh);
    logic [31:0] h;
    h = '0;
    for (int unsigned b = 0; b < DATA_W; b++) begin
      if (x[b]) h = h ^ (bf_const(i, b, nh) >> (32 - mw));
    end
    return h;
  endfunction

endpackage
