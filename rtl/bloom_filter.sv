// bloom_filter: the first stage of the detector. It slides an 8-byte window
// over the payload one byte at a time and flags every window whose hashes
// all land on set bits, i.e. every 64-bit sub-string that may be the head of
// a stored signature.
//
// The published architecture gives only the function (collect fixed-length
// data, hash it against the rule set, shift one byte when nothing is found).
// The realisation is this design's own: NH independent hash functions, each
// indexing its own 2^MW-bit vector; a window is suspicious when all NH bits
// are set. The hash is the H3-class ids_pkg::bf_hash. Software loads the
// rule set by setting, for every signature's first 8 bytes s, bit
// bf_hash(i, s) of vector i for each i.
//
// Interface and timing:
//   pkt_start   with byte_valid: this byte starts a new payload, the window
//               restarts (windows never straddle two payloads).
//   byte_valid/byte_in  one payload byte per cycle; the first byte of a
//               window ends up in bits 63:56.
//   wr_en/wr_sel/wr_idx/wr_bit  set or clear one bit of vector wr_sel.
//   sus_valid/sus_data  registered, one cycle after the byte that completed
//               the window was taken; window_tested pulses with every window
//               checked (hit or not).
//   rst_n       synchronous, clears all vectors and the window.
module bloom_filter
  import ids_pkg::*;
#(
  parameter int unsigned NH = 4,   // number of hash functions
  parameter int unsigned MW = 16,  // bits of a hash index: vectors of 2^MW bits
  localparam int unsigned SEL_W = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // payload bytes
  input  logic              pkt_start,
  input  logic              byte_valid,
  input  logic [7:0]        byte_in,
  // rule-set loading
  input  logic              wr_en,
  input  logic [SEL_W-1:0]  wr_sel,
  input  logic [MW-1:0]     wr_idx,
  input  logic              wr_bit,
  // suspicious sub-strings
  output logic              sus_valid,
  output logic [DATA_W-1:0] sus_data,
  output logic              window_tested
);

  localparam int unsigned NBYTES = DATA_W / 8;

  logic [2**MW-1:0]  vec [NH];
  logic [DATA_W-1:0] window;
  logic [$clog2(NBYTES+1)-1:0] fill;  // bytes in the window, saturates at 8
  logic              check_q;         // window changed and is full

  logic [$clog2(NBYTES+1)-1:0] fill_next;
  always_comb begin
    if (pkt_start)                        fill_next = 1;
    else if (fill == ($bits(fill))'(NBYTES)) fill_next = fill;
    else                                  fill_next = fill + 1'b1;
  end

  logic all_hit;
  always_comb begin
    all_hit = 1'b1;
    for (int unsigned i = 0; i < NH; i++) begin
      if (!vec[i][MW'(bf_hash(i, window, MW, NH))]) all_hit = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NH; i++) vec[i] <= '0;
    end else if (wr_en) begin
      vec[wr_sel][wr_idx] <= wr_bit;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window        <= '0;
      fill          <= '0;
      check_q       <= 1'b0;
      sus_valid     <= 1'b0;
      sus_data      <= '0;
      window_tested <= 1'b0;
    end else begin
      check_q <= 1'b0;
      if (byte_valid) begin
        window  <= {window[DATA_W-9:0], byte_in};
        fill    <= fill_next;
        check_q <= (fill_next == ($bits(fill))'(NBYTES));
      end
      window_tested <= check_q;
      sus_valid     <= check_q && all_hit;
      if (check_q && all_hit) sus_data <= window;
    end
  end

endmodule
