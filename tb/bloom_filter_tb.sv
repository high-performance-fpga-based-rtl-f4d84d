// bloom_filter_tb: self-checking test of the Bloom filter (4 hashes, 256-bit
// vectors). Three 8-byte signatures are loaded by setting their hash bits.
// A random payload with the signatures embedded is streamed with gaps in
// byte_valid and packet restarts; for every cycle the testbench predicts,
// from its own window and its own copy of the bit vectors, whether a window
// was tested and whether it is suspicious, one cycle after the byte that
// completed it was taken. A string present in all vectors but one, and a
// signature with one bit cleared, must not be flagged.
module bloom_filter_tb;
  import ids_pkg::*;
  localparam int unsigned NH = 4;
  localparam int unsigned MW = 8;

  logic clk = 1'b0;
  logic rst_n, pkt_start, byte_valid, wr_en, wr_bit;
  logic [7:0] byte_in;
  logic [1:0] wr_sel;
  logic [MW-1:0] wr_idx;
  logic sus_valid, window_tested;
  logic [63:0] sus_data;

  int checks = 0, failures = 0, hits = 0, tested = 0;

  bloom_filter #(.NH(NH), .MW(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference hash: XOR over the set input bits b of the top MW bits of
  // (b*NH + i + 1) * 0x9E3779B1 mod 2^32.
  function automatic int unsigned ref_hash(int unsigned i, logic [63:0] x);
    logic [31:0] h, c;
    h = 0;
    for (int b = 0; b < 64; b++) begin
      c = 32'((b * NH + i + 1) * 32'h9E37_79B1);
      if (x[b]) h ^= c >> (32 - MW);
    end
    return h;
  endfunction

  bit vecs [NH][2 ** MW];
  logic [63:0] sigs [3] = '{64'h558becc746020040, 64'h50558becc7460202, 64'h0231944201d1c24e};

  task automatic setbit(input int i, input int idx, input bit v);
    // let the pipeline drain so the change cannot affect a window in flight
    step(1'b0, 8'h00, 1'b0);
    step(1'b0, 8'h00, 1'b0);
    @(negedge clk);
    byte_valid = 1'b0;
    wr_en = 1'b1; wr_sel = 2'(i); wr_idx = MW'(idx); wr_bit = v;
    @(negedge clk);
    wr_en = 1'b0;
    vecs[i][idx] = v;
  endtask

  logic [63:0] mwin;
  int          mfill;
  // expectation for the byte driven in the previous step (p1) and the one
  // before it (p2): outputs appear two edges after the byte is presented
  logic        exp_t, exp_v, p1_t, p1_v;
  logic [63:0] exp_d, p1_d;

  task automatic step(input logic v, input logic [7:0] b, input logic st);
    bit all;
    @(negedge clk);
    checks++;
    if (window_tested !== exp_t || sus_valid !== exp_v || (exp_v && sus_data !== exp_d)) begin
      failures++;
      $display("t=%0t tested=%b/%b sus=%b/%b data=%h/%h", $time, window_tested, exp_t, sus_valid, exp_v, sus_data, exp_d);
    end
    byte_valid = v; byte_in = b; pkt_start = st;
    exp_t = p1_t; exp_v = p1_v; exp_d = p1_d;
    p1_t = 1'b0; p1_v = 1'b0;
    if (v) begin
      mfill = st ? 1 : (mfill < 8 ? mfill + 1 : 8);
      mwin  = {mwin[55:0], b};
      if (mfill == 8) begin
        all = 1'b1;
        for (int i = 0; i < NH; i++) if (!vecs[i][ref_hash(i, mwin)]) all = 1'b0;
        p1_t = 1'b1; p1_v = all; p1_d = mwin;
        tested++;
        if (all) hits++;
      end
    end
    @(posedge clk);
  endtask

  task automatic send_bytes(input logic [63:0] s);
    for (int k = 7; k >= 0; k--) step(1'b1, s[8*k +: 8], 1'b0);
  endtask

  initial begin
    rst_n = 1'b0; pkt_start = 1'b0; byte_valid = 1'b0; byte_in = '0;
    wr_en = 1'b0; wr_sel = '0; wr_idx = '0; wr_bit = 1'b0;
    foreach (vecs[i, j]) vecs[i][j] = 1'b0;
    mwin = '0; mfill = 0; exp_t = 1'b0; exp_v = 1'b0; exp_d = '0;
    p1_t = 1'b0; p1_v = 1'b0; p1_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (sigs[s]) for (int i = 0; i < NH; i++) setbit(i, ref_hash(i, sigs[s]), 1'b1);
    // packet 1: random bytes with the signatures embedded, gaps in valid
    step(1'b1, 8'h11, 1'b1);
    for (int r = 0; r < 6; r++) begin
      for (int n = 0; n < 20; n++) step(1'($urandom_range(0, 3) != 0), 8'($urandom), 1'b0);
      send_bytes(sigs[r % 3]);
    end
    // packet restart in the middle of a signature: no window straddles it
    for (int k = 7; k >= 4; k--) step(1'b1, sigs[0][8*k +: 8], 1'b0);
    step(1'b1, sigs[0][31:24], 1'b1);
    for (int k = 2; k >= 0; k--) step(1'b1, sigs[0][8*k +: 8], 1'b0);
    send_bytes(sigs[1]);
    // strings whose hash bits are set in all vectors but one: never flagged
    for (int miss = 0; miss < NH; miss++) begin
      logic [63:0] p;
      p = {32'($urandom), 32'($urandom)};
      for (int i = 0; i < NH; i++) if (i != miss) setbit(i, ref_hash(i, p), 1'b1);
      send_bytes(p);
      for (int n = 0; n < 4; n++) step(1'($urandom_range(0, 1)), 8'($urandom), 1'b0);
    end
    // clear one bit of signature 2: it must no longer be reported
    setbit(2, ref_hash(2, sigs[2]), 1'b0);
    send_bytes(sigs[2]);
    send_bytes(sigs[0]);
    step(1'b0, 8'h00, 1'b0);
    step(1'b0, 8'h00, 1'b0);
    checks++;
    if (hits < 8 || tested < 100) begin
      failures++;
      $display("coverage: hits=%0d tested=%0d", hits, tested);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
