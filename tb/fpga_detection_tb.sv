// fpga_detection_tb: self-checking test of the complete detection stage at
// its full size (16-bit CAM address, 19-bit RAM address), loaded through its
// own load ports. It reproduces the two worked examples of the design:
//   - 558becc746020040: key 558b is shared by two signatures at CAM address
//     0000; the sub-string matches the second, rule number 00001, after two
//     RAM reads;
//   - 50558becc7460202: key 5055 at CAM address 2001 holds eight signatures,
//     none equal, so suspicious information 2001 is reported after eight.
// Then random groups and random sub-strings are checked against
// det_model_pkg: result, rule number / information and latency.
module fpga_detection_tb;
  import ids_pkg::*;
  import det_model_pkg::*;
  localparam int unsigned CAM_AW = 16;
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready;
  logic [DATA_W-1:0] in_data;
  logic cam_wr_en, cam_wr_valid, ram_wr_en;
  logic [CAM_AW-1:0] cam_wr_addr;
  logic [KEY_W-1:0] cam_wr_key;
  logic [RAM_AW-1:0] ram_wr_addr;
  sig_entry_t ram_wr_data;
  logic res_valid, match, susp;
  result_e result;
  logic [RAM_AW-1:0] which;
  logic [CAM_AW-1:0] susp_info;

  int checks = 0, failures = 0;
  int n_match = 0, n_susp = 0, n_clean = 0;

  det_model m = new(CAM_AW);

  fpga_detection dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load a whole key group into CAM address g and RAM rows {g, slot}.
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

  task automatic send(input logic [63:0] d);
    result_e er; logic [31:0] eid; int elat, n;
    m.predict(d, er, eid, elat);
    @(negedge clk);
    in_valid = 1'b1; in_data = d;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    n = 0;
    while (!res_valid && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (!res_valid || result !== er || n != elat) begin
      failures++;
      $display("%h: result %0d after %0d, expected %0d after %0d", d, result, n, er, elat);
    end
    checks++;
    case (er)
      RES_MATCH: begin
        n_match++;
        if (!match || which !== RAM_AW'(eid)) begin failures++; $display("%h: which %h expected %h", d, which, eid); end
      end
      RES_SUSPECT: begin
        n_susp++;
        if (!susp || susp_info !== CAM_AW'(eid)) begin failures++; $display("%h: info %h expected %h", d, susp_info, eid); end
      end
      default: begin
        n_clean++;
        if (match || susp) begin failures++; $display("%h: flags on clean result", d); end
      end
    endcase
  endtask

  initial begin
    logic [47:0] grp [$];
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    cam_wr_en = 1'b0; cam_wr_valid = 1'b0; cam_wr_addr = '0; cam_wr_key = '0;
    ram_wr_en = 1'b0; ram_wr_addr = '0; ram_wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the two worked examples
    grp = '{48'hecc746020000, 48'hecc746020040};
    load_group(32'h0000, 16'h558b, grp);
    grp = {};
    for (int k = 0; k < 8; k++) grp.push_back(48'h8becc7461000 + 48'(k));
    load_group(32'h2001, 16'h5055, grp);
    send(64'h558becc746020040);
    checks++;
    if (!match || which !== 19'h00001) begin failures++; $display("example 1 failed"); end
    send(64'h50558becc7460202);
    checks++;
    if (!susp || susp_info !== 16'h2001) begin failures++; $display("example 2 failed"); end
    // random groups at scattered CAM addresses
    for (int n = 0; n < 40; n++) begin
      int unsigned g;
      g = $urandom_range(32'h0100, 32'hfff0);
      if (m.key_valid.exists(g)) continue;
      grp = {};
      for (int k = 0; k < int'($urandom_range(1, 8)); k++) grp.push_back({16'($urandom), 32'($urandom)});
      load_group(g, 16'(16'h6000 + n), grp);
    end
    for (int n = 0; n < 300; n++) begin
      int unsigned idx;
      int unsigned gs [$];
      foreach (m.key_valid[g]) gs.push_back(g);
      idx = gs[$urandom_range(0, gs.size() - 1)];
      case ($urandom_range(0, 2))
        0: send({m.key_of[idx], m.sigs[idx][$urandom_range(0, m.sigs[idx].size() - 1)]});
        1: send({m.key_of[idx], 16'($urandom), 32'($urandom)});
        default: send({16'($urandom_range(16'h7000, 16'hffff)), 16'($urandom), 32'($urandom)});
      endcase
    end
    checks++;
    if (n_match == 0 || n_susp == 0 || n_clean == 0) begin
      failures++;
      $display("coverage: match=%0d susp=%0d clean=%0d", n_match, n_susp, n_clean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
