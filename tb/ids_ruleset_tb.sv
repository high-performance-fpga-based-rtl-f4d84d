// ids_ruleset_tb: the detector at full size with a rule set of 20000 random
// 8-byte signatures, the rule-set size the architecture was evaluated with.
//
// Signatures get random 16-bit keys, so some keys are shared by two or three
// signatures; four keys are forced to carry eleven signatures, of which only
// eight fit the hardware group (the rest stay with software). All 20000 go
// into the Bloom filter. A 4000-byte payload of random bytes with 120
// embedded signatures (stored ones and ones beyond the eighth slot) is
// streamed. Every flagged window and every result is checked against the
// testbench's own Bloom model and det_model_pkg. Reported: Bloom filter
// false-positive rate (must stay below 2 %), matches, suspicious
// information, and detection cycles per flagged window.
module ids_ruleset_tb;
  import ids_pkg::*;
  import det_model_pkg::*;
  localparam int unsigned CAM_AW = 16;
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W;
  localparam int unsigned NH = 4;
  localparam int unsigned MW = 16;
  localparam int NSIG = 20000;
  localparam int NBIG = 4;     // keys with more signatures than slots
  localparam int BIGSZ = 11;
  localparam int NEMBED = 120;
  localparam int PAYLOAD = 4000;

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
  int n_tested = 0, n_flagged = 0, n_match = 0, n_susp = 0, n_clean = 0, n_ovf = 0;
  int busy_cycles = 0, n_results = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  det_model m = new(CAM_AW);

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
  logic [63:0] all_sigs [$];        // the whole rule set
  int unsigned group_of [logic [15:0]];
  int          size_of  [int unsigned];

  logic [63:0] mwin;
  int          mfill;
  logic [63:0] flag_q [$];
  logic [63:0] buf_q  [$];
  int          exp_ovf = 0;
  bit          is_sig [logic [63:0]];
  int          n_fp = 0;

  task automatic put_byte(input logic v, input logic [7:0] b, input logic st);
    bit all;
    @(negedge clk);
    byte_valid = v; byte_in = b; pkt_start = st;
    if (v) begin
      mfill = st ? 1 : (mfill < 8 ? mfill + 1 : 8);
      mwin  = {mwin[55:0], b};
      if (mfill == 8) begin
        all = 1'b1;
        for (int i = 0; i < NH; i++) if (!vecs[i][ref_hash(i, mwin)]) all = 1'b0;
        if (all) begin
          flag_q.push_back(mwin);
          if (!is_sig.exists(mwin)) n_fp++;
        end
      end
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (window_tested) n_tested++;
    if (overflow) n_ovf++;
    if (buf_q.size() != 0) busy_cycles++;
    if (overflow !== (exp_ovf != 0)) begin failures++; $display("t=%0t overflow=%b expected %0d", $time, overflow, exp_ovf); end
    exp_ovf = 0;
    if (sus_valid) begin
      n_flagged++;
      checks++;
      if (flag_q.size() == 0 || sus_data !== flag_q[0]) begin
        failures++; $display("t=%0t unexpected flagged window %h", $time, sus_data);
      end
      if (flag_q.size() != 0) void'(flag_q.pop_front());
      if (buf_full) exp_ovf = 1;
      else buf_q.push_back(sus_data);
    end
    if (res_valid) begin
      result_e er; logic [31:0] eid; int elat;
      checks++;
      n_results++;
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
          RES_MATCH:   n_match++;
          RES_SUSPECT: n_susp++;
          default:     n_clean++;
        endcase
        void'(buf_q.pop_front());
      end
    end
  end

  initial begin
    int unsigned next_g;
    logic [63:0] s;
    rst_n = 1'b0; pkt_start = 1'b0; byte_valid = 1'b0; byte_in = '0;
    bf_wr_en = 1'b0; bf_wr_bit = 1'b1; bf_wr_sel = '0; bf_wr_idx = '0;
    cam_wr_en = 1'b0; cam_wr_valid = 1'b1; cam_wr_addr = '0; cam_wr_key = '0;
    ram_wr_en = 1'b0; ram_wr_addr = '0; ram_wr_data = '0;
    foreach (vecs[i, j]) vecs[i][j] = 1'b0;
    mwin = '0; mfill = 0;
    // build the rule set
    for (int k = 0; k < NBIG; k++)
      for (int n = 0; n < BIGSZ; n++) all_sigs.push_back({16'hb000 + 16'(k), 16'($urandom), 32'($urandom)});
    while (all_sigs.size() < NSIG) begin
      s = {16'($urandom), 16'($urandom), 32'($urandom)};
      if (s[63:56] != 8'hb0 && !is_sig.exists(s)) begin all_sigs.push_back(s); is_sig[s] = 1'b1; end
    end
    foreach (all_sigs[n]) is_sig[all_sigs[n]] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load: CAM entry on a key's first signature, RAM row while slots remain
    next_g = 0;
    foreach (all_sigs[n]) begin
      logic [15:0] key;
      int unsigned g;
      key = all_sigs[n][63:48];
      if (!group_of.exists(key)) begin
        group_of[key] = next_g;
        size_of[next_g] = 0;
        @(negedge clk);
        cam_wr_en = 1'b1; cam_wr_addr = CAM_AW'(next_g); cam_wr_key = key;
        @(negedge clk);
        cam_wr_en = 1'b0;
        next_g++;
      end
      g = group_of[key];
      if (size_of[g] < 8) begin
        m.add(g, key, all_sigs[n][47:0]);
        size_of[g]++;
      end
    end
    // RAM rows, finish bit on each group's last stored row
    foreach (m.sigs[g]) begin
      foreach (m.sigs[g][k]) begin
        @(negedge clk);
        ram_wr_en = 1'b1; ram_wr_addr = {CAM_AW'(g), SLOT_W'(k)};
        ram_wr_data.sig = m.sigs[g][k]; ram_wr_data.finish = m.finish(g, k);
      end
    end
    @(negedge clk);
    ram_wr_en = 1'b0;
    // Bloom vectors
    foreach (all_sigs[n]) for (int i = 0; i < NH; i++) begin
      @(negedge clk);
      bf_wr_en = 1'b1; bf_wr_sel = 2'(i); bf_wr_idx = MW'(ref_hash(i, all_sigs[n]));
      vecs[i][ref_hash(i, all_sigs[n])] = 1'b1;
    end
    @(negedge clk);
    bf_wr_en = 1'b0;
    $display("loaded %0d signatures in %0d key groups", all_sigs.size(), next_g);
    // payload
    put_byte(1'b1, 8'h00, 1'b1);
    for (int e = 0; e < NEMBED; e++) begin
      for (int n = 0; n < PAYLOAD / NEMBED - 8; n++) put_byte(1'($urandom_range(0, 5) != 0), 8'($urandom), 1'b0);
      // every fourth embedded signature comes from an overfull key group
      s = (e % 4 == 0) ? all_sigs[$urandom_range(0, NBIG * BIGSZ - 1)]
                       : all_sigs[$urandom_range(NBIG * BIGSZ, NSIG - 1)];
      for (int k = 7; k >= 0; k--) put_byte(1'b1, s[8*k +: 8], 1'b0);
    end
    put_byte(1'b0, 8'h00, 1'b0);
    repeat (200) @(negedge clk);
    checks++;
    if (flag_q.size() != 0 || buf_q.size() != 0) begin
      failures++; $display("left over: %0d flagged windows not seen, %0d without result", flag_q.size(), buf_q.size());
    end
    $display("windows tested %0d, flagged %0d (false positives %0d), overflows %0d", n_tested, n_flagged, n_fp, n_ovf);
    $display("results: match %0d, suspicious %0d, clean %0d; detection busy %0d cycles for %0d windows",
             n_match, n_susp, n_clean, busy_cycles, n_results);
    checks++;
    if (n_fp * 50 > n_tested) begin failures++; $display("false-positive rate above 2 %%"); end
    checks++;
    if (n_match < NEMBED / 2 || n_susp == 0) begin failures++; $display("too few matches or no suspicious information"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
