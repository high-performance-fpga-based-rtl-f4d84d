// ids_top_tb: end-to-end test of the whole detector at its default (full)
// size. A small rule set is loaded into the Bloom filter, the CAM and the
// signature RAM; two payloads are streamed byte by byte:
//   1. random bytes with embedded sub-strings that give a unique-key match,
//      a match in the second slot of a shared key (558becc746020040 ->
//      rule 00001), a full eight-signature group with no match
//      (50558becc7460202 -> suspicious information 2001), a Bloom false
//      positive whose key is not in the CAM, and one whose key is in the CAM
//      but no signature matches; a packet restart;
//   2. a run of identical bytes whose every window is flagged, which fills
//      the buffer faster than the detection stage drains it and forces
//      overflow.
// The testbench predicts the flagged windows with its own Bloom model, keeps
// its own copy of the buffer (push unless full, else expect an overflow
// pulse) and checks every result against det_model_pkg. Each mechanism is
// counted and must occur at least once.
module ids_top_tb;
  import ids_pkg::*;
  import det_model_pkg::*;
  localparam int unsigned CAM_AW = 16;
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W;
  localparam int unsigned NH = 4;
  localparam int unsigned MW = 16;
  localparam int unsigned FIFO_DEPTH = 8;

  logic clk = 1'b0;
  logic rst_n, pkt_start, byte_valid;
  logic [7:0] byte_in;
  logic bf_wr_en, bf_wr_bit;
  logic [1:0] bf_wr_sel;
  logic [MW-1:0] bf_wr_idx;
  logic cam_wr_en, cam_wr_valid, ram_wr_en;
  logic [CAM_AW-1:0] cam_wr_addr;
  logic [KEY_W-1:0] cam_wr_key;
  logic [RAM_AW-1:0] ram_wr_addr;
  sig_entry_t ram_wr_data;
  logic sus_valid, window_tested, buf_full, overflow;
  logic [DATA_W-1:0] sus_data;
  logic res_valid, match, susp;
  result_e result;
  logic [RAM_AW-1:0] which;
  logic [CAM_AW-1:0] susp_info;

  ids_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_tested = 0, n_flagged = 0, n_restart = 0, n_cam_miss = 0, n_group_miss = 0;
  int n_match0 = 0, n_match_later = 0, n_susp = 0, n_queued = 0, n_full = 0, n_overflow = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  det_model m = new(CAM_AW);

  // Reference Bloom hash (same formula as the design's H3 constants).
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

  task automatic bloom_add(input logic [63:0] s);
    for (int i = 0; i < NH; i++) begin
      @(negedge clk);
      bf_wr_en = 1'b1; bf_wr_sel = 2'(i); bf_wr_idx = MW'(ref_hash(i, s)); bf_wr_bit = 1'b1;
      vecs[i][ref_hash(i, s)] = 1'b1;
    end
    @(negedge clk);
    bf_wr_en = 1'b0;
  endtask

  task automatic load_group(input int unsigned g, input logic [15:0] key, input logic [47:0] s [$]);
    @(negedge clk);
    cam_wr_en = 1'b1; cam_wr_addr = CAM_AW'(g); cam_wr_key = key; cam_wr_valid = 1'b1;
    @(negedge clk);
    cam_wr_en = 1'b0;
    foreach (s[k]) begin
      m.add(g, key, s[k]);
      ram_wr_en = 1'b1; ram_wr_addr = {CAM_AW'(g), SLOT_W'(k)};
      ram_wr_data.sig = s[k]; ram_wr_data.finish = (k == s.size() - 1);
      @(negedge clk);
    end
    ram_wr_en = 1'b0;
  endtask

  // Stream model: windows expected from the Bloom filter, in order.
  logic [63:0] mwin;
  int          mfill;
  logic [63:0] flag_q [$];   // expected flagged windows, not yet seen
  logic [63:0] buf_q  [$];   // model of the buffer + window in detection
  int          exp_ovf = 0;  // overflow pulses expected next cycle

  task automatic put_byte(input logic v, input logic [7:0] b, input logic st);
    bit all;
    @(negedge clk);
    byte_valid = v; byte_in = b; pkt_start = st;
    if (v) begin
      if (st) n_restart++;
      mfill = st ? 1 : (mfill < 8 ? mfill + 1 : 8);
      mwin  = {mwin[55:0], b};
      if (mfill == 8) begin
        all = 1'b1;
        for (int i = 0; i < NH; i++) if (!vecs[i][ref_hash(i, mwin)]) all = 1'b0;
        if (all) flag_q.push_back(mwin);
      end
    end
  endtask

  task automatic put_string(input logic [63:0] s);
    for (int k = 7; k >= 0; k--) put_byte(1'b1, s[8*k +: 8], 1'b0);
  endtask

  // Monitor: sample every cycle at the negedge.
  always @(negedge clk) if (rst_n) begin
    if (window_tested) n_tested++;
    if (overflow) n_overflow++;
    checks++;
    if (overflow !== (exp_ovf != 0)) begin failures++; $display("t=%0t overflow=%b expected %0d", $time, overflow, exp_ovf); end
    exp_ovf = 0;
    if (sus_valid) begin
      n_flagged++;
      checks++;
      if (flag_q.size() == 0 || sus_data !== flag_q[0]) begin
        failures++; $display("t=%0t unexpected flagged window %h", $time, sus_data);
      end
      if (flag_q.size() != 0) void'(flag_q.pop_front());
      if (buf_full) begin
        n_full++;
        exp_ovf = 1;
      end else begin
        if (buf_q.size() != 0) n_queued++;
        buf_q.push_back(sus_data);
      end
    end
    if (res_valid) begin
      result_e er; logic [31:0] eid; int elat;
      checks++;
      if (buf_q.size() == 0) begin
        failures++; $display("t=%0t result with no window pending", $time);
      end else begin
        m.predict(buf_q[0], er, eid, elat);
        if (result !== er
            || (er == RES_MATCH && (!match || which !== RAM_AW'(eid)))
            || (er == RES_SUSPECT && (!susp || susp_info !== CAM_AW'(eid)))) begin
          failures++;
          $display("t=%0t window %h: result %0d which %h info %h, expected %0d id %h", $time, buf_q[0], result, which, susp_info, er, eid);
        end
        case (er)
          RES_MATCH:   if (eid % 8 == 0) n_match0++; else n_match_later++;
          RES_SUSPECT: n_susp++;
          default:     if (elat == 1) n_cam_miss++; else n_group_miss++;
        endcase
        void'(buf_q.pop_front());
      end
    end
  end

  task automatic expect_nonzero(input string name, input int n);
    checks++;
    $display("%-28s %0d", name, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", name); end
  endtask

  localparam logic [63:0] S_UNIQUE  = 64'h0231944201d1c24e;
  localparam logic [63:0] S_SHARED  = 64'h558becc746020040;
  localparam logic [63:0] S_SUSPECT = 64'h50558becc7460202;
  localparam logic [63:0] S_FALSEP  = 64'hdeadbeef00112233;
  localparam logic [63:0] S_GRPMISS = 64'h558b000000000000;
  localparam logic [63:0] S_FLOOD   = 64'h4141414141414141;

  initial begin
    logic [47:0] grp [$];
    rst_n = 1'b0; pkt_start = 1'b0; byte_valid = 1'b0; byte_in = '0;
    bf_wr_en = 1'b0; bf_wr_bit = 1'b0; bf_wr_sel = '0; bf_wr_idx = '0;
    cam_wr_en = 1'b0; cam_wr_valid = 1'b0; cam_wr_addr = '0; cam_wr_key = '0;
    ram_wr_en = 1'b0; ram_wr_addr = '0; ram_wr_data = '0;
    foreach (vecs[i, j]) vecs[i][j] = 1'b0;
    mwin = '0; mfill = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // rule set
    grp = '{48'hecc746020000, 48'hecc746020040};
    load_group(32'h0000, 16'h558b, grp);
    grp = {};
    for (int k = 0; k < 8; k++) grp.push_back(48'h8becc7461000 + 48'(k));
    load_group(32'h2001, 16'h5055, grp);
    grp = '{48'h944201d1c24e};
    load_group(32'h0123, 16'h0231, grp);
    grp = '{48'h414141414141};
    load_group(32'h0041, 16'h4141, grp);
    bloom_add(S_UNIQUE);
    bloom_add(S_SHARED);
    bloom_add(S_SUSPECT);
    bloom_add(S_FALSEP);
    bloom_add(S_GRPMISS);
    bloom_add(S_FLOOD);
    // payload 1
    put_byte(1'b1, 8'h45, 1'b1);
    for (int r = 0; r < 10; r++) begin
      for (int n = 0; n < 12; n++) put_byte(1'($urandom_range(0, 4) != 0), 8'($urandom), 1'b0);
      case (r % 5)
        0: put_string(S_UNIQUE);
        1: put_string(S_SHARED);
        2: put_string(S_SUSPECT);
        3: put_string(S_FALSEP);
        default: put_string(S_GRPMISS);
      endcase
    end
    // restart inside a sub-string: the partial string must not be flagged
    for (int k = 7; k >= 3; k--) put_byte(1'b1, S_SHARED[8*k +: 8], 1'b0);
    put_byte(1'b1, 8'h00, 1'b1);
    put_string(S_SHARED);
    for (int n = 0; n < 30; n++) put_byte(1'b0, 8'h00, 1'b0);
    // payload 2: flood of identical bytes, then quiet
    put_byte(1'b1, 8'h41, 1'b1);
    for (int n = 0; n < 60; n++) put_byte(1'b1, 8'h41, 1'b0);
    for (int n = 0; n < 6; n++) put_byte(1'b1, 8'($urandom_range(0, 8'h40)), 1'b0);
    put_byte(1'b0, 8'h00, 1'b0);
    repeat (400) @(negedge clk);
    checks++;
    if (flag_q.size() != 0 || buf_q.size() != 0) begin
      failures++; $display("left over: %0d flagged windows not seen, %0d without result", flag_q.size(), buf_q.size());
    end
    expect_nonzero("windows tested", n_tested);
    expect_nonzero("windows flagged", n_flagged);
    expect_nonzero("packet restarts", n_restart);
    expect_nonzero("false positive, key absent", n_cam_miss);
    expect_nonzero("false positive, group miss", n_group_miss);
    expect_nonzero("match in first slot", n_match0);
    expect_nonzero("match after address+1", n_match_later);
    expect_nonzero("suspicious information", n_susp);
    expect_nonzero("window waited in buffer", n_queued);
    expect_nonzero("window met full buffer", n_full);
    expect_nonzero("overflow pulses", n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
