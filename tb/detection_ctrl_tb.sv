// detection_ctrl_tb: self-checking test of the match controller on its own.
// The CAM and signature RAM are modelled in the testbench (one-cycle
// registered search and read, as the real blocks), the comparator is the
// real one. Eight key groups of 1..8 signatures (some full, to reach the
// eighth-slot rule) are built at random; sub-strings that hit each slot,
// miss inside a group, or carry an unknown key are sent, and result, rule
// number / suspicious information and latency (2 + final slot) are compared
// with det_model_pkg (a CAM miss is reported after one cycle).
module detection_ctrl_tb;
  import ids_pkg::*;
  import det_model_pkg::*;
  localparam int unsigned CAM_AW = 3;
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready;
  logic [DATA_W-1:0] in_data;
  logic cam_search_en, cam_hit;
  logic [KEY_W-1:0] cam_search_key;
  logic [CAM_AW-1:0] cam_hit_addr;
  logic ram_rd_en;
  logic [RAM_AW-1:0] ram_rd_addr;
  sig_entry_t ram_rd_data;
  logic [SIG_W-1:0] cmp_data;
  logic cmp_eq, cmp_last;
  logic res_valid, match, susp;
  result_e result;
  logic [RAM_AW-1:0] which;
  logic [CAM_AW-1:0] susp_info;

  int checks = 0, failures = 0;
  int n_match = 0, n_susp = 0, n_clean = 0, n_miss = 0, max_slot = 0;

  det_model m = new(CAM_AW);
  logic [15:0] cam_key [2 ** CAM_AW];
  sig_entry_t  ram     [2 ** RAM_AW];

  detection_ctrl #(.CAM_AW(CAM_AW)) dut (.*);
  sig_comparator u_cmp (.data(cmp_data), .entry(ram_rd_data), .eq(cmp_eq), .last(cmp_last));

  // CAM and RAM models: registered, one cycle.
  always_ff @(posedge clk) begin
    if (cam_search_en) begin
      cam_hit <= 1'b0;
      cam_hit_addr <= '0;
      for (int g = 2 ** CAM_AW - 1; g >= 0; g--)
        if (m.key_valid.exists(g) && cam_key[g] == cam_search_key) begin
          cam_hit <= 1'b1; cam_hit_addr <= CAM_AW'(g);
        end
    end
    if (ram_rd_en) ram_rd_data <= ram[ram_rd_addr];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [63:0] d);
    result_e er; logic [31:0] eid; int elat, n;
    m.predict(d, er, eid, elat);
    @(negedge clk);
    in_valid = 1'b1; in_data = d;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0; in_data = '0;
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
        if (!match || susp || which !== RAM_AW'(eid)) begin failures++; $display("%h: which %h expected %h", d, which, eid); end
        if (eid % 8 > max_slot) max_slot = eid % 8;
      end
      RES_SUSPECT: begin
        n_susp++;
        if (match || !susp || susp_info !== CAM_AW'(eid)) begin failures++; $display("%h: info %h expected %h", d, susp_info, eid); end
      end
      default: begin
        n_clean++;
        if (elat == 1) n_miss++;
        if (match || susp) begin failures++; $display("%h: flags on clean result", d); end
      end
    endcase
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    // build the table: group g has key 16'h1000+g and 1..8 signatures
    for (int g = 0; g < 2 ** CAM_AW; g++) begin
      int sz;
      sz = (g < 3) ? 8 : int'($urandom_range(1, 8));
      if (g == 5) continue;  // one empty CAM address
      cam_key[g] = 16'h1000 + 16'(g);
      for (int s = 0; s < sz; s++) m.add(g, cam_key[g], {16'($urandom), 32'($urandom)});
      for (int s = 0; s < sz; s++) begin
        ram[(g << 3) | s].sig    = m.sigs[g][s];
        ram[(g << 3) | s].finish = m.finish(g, s);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int g, s;
      g = $urandom_range(0, 2 ** CAM_AW - 1);
      case ($urandom_range(0, 3))
        0, 1: if (m.key_valid.exists(g)) begin
                s = $urandom_range(0, m.sigs[g].size() - 1);
                send({16'h1000 + 16'(g), m.sigs[g][s]});
              end
        2:    send({16'h1000 + 16'(g), 16'($urandom), 32'($urandom)});
        default: send({16'($urandom_range(16'h2000, 16'hffff)), 16'($urandom), 32'($urandom)});
      endcase
    end
    checks++;
    if (n_match == 0 || n_susp == 0 || n_clean == 0 || n_miss == 0 || max_slot != 7) begin
      failures++;
      $display("coverage: match=%0d susp=%0d clean=%0d miss=%0d max_slot=%0d", n_match, n_susp, n_clean, n_miss, max_slot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
