// cam_tb: self-checking test of the CAM with 16 entries.
// Loads random distinct keys, searches for every stored key and for keys
// that are absent, invalidates and rewrites entries, stores a duplicate to
// check lowest-address priority, and checks the one-cycle search latency
// (result must appear after exactly one clock edge). A reference table in
// the testbench gives the expected address.
module cam_tb;
  localparam int unsigned AW = 4;
  localparam int unsigned DEPTH = 2 ** AW;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en, wr_valid, search_en, hit;
  logic [AW-1:0] wr_addr, hit_addr;
  logic [15:0] wr_key, search_key;

  int checks = 0, failures = 0;

  cam #(.KEY_W(16), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ref_key [DEPTH];
  logic        ref_val [DEPTH];

  task automatic write(input int a, input logic [15:0] k, input logic v);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_key = k; wr_valid = v;
    @(negedge clk);
    wr_en = 1'b0;
    ref_key[a] = k; ref_val[a] = v;
  endtask

  task automatic search(input logic [15:0] k);
    logic exp_hit;
    int   exp_addr;
    exp_hit = 1'b0; exp_addr = 0;
    for (int i = 0; i < DEPTH; i++)
      if (!exp_hit && ref_val[i] && ref_key[i] == k) begin exp_hit = 1'b1; exp_addr = i; end
    @(negedge clk);
    search_en = 1'b1; search_key = k;
    @(negedge clk);  // one edge later the result must be there
    search_en = 1'b0;
    search_key = ~k;  // result must hold while search_en is low
    checks++;
    if (hit !== exp_hit || (exp_hit && hit_addr !== AW'(exp_addr))) begin
      failures++;
      $display("search %h: hit=%b addr=%0d, expected hit=%b addr=%0d", k, hit, hit_addr, exp_hit, exp_addr);
    end
    @(negedge clk);
    checks++;
    if (hit !== exp_hit) begin failures++; $display("result did not hold"); end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; search_en = 1'b0; wr_addr = '0; wr_key = '0; wr_valid = 1'b0;
    search_key = '0;
    for (int i = 0; i < DEPTH; i++) begin ref_val[i] = 1'b0; ref_key[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // empty after reset
    search(16'h0000);
    search(16'h558b);
    // fill with distinct keys
    for (int i = 0; i < DEPTH; i++) write(i, 16'(i * 16'h1357 + 16'h0101), 1'b1);
    for (int i = 0; i < DEPTH; i++) search(16'(i * 16'h1357 + 16'h0101));
    // absent keys
    for (int n = 0; n < 20; n++) search(16'($urandom));
    // invalidate some, rewrite others
    write(3, ref_key[3], 1'b0);
    search(ref_key[3]);
    write(7, 16'h558b, 1'b1);
    search(16'h558b);
    // duplicate: lowest address wins
    write(12, 16'h558b, 1'b1);
    write(2, 16'h558b, 1'b1);
    search(16'h558b);
    // random traffic against the reference
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(0, 2) == 0) write($urandom_range(0, DEPTH-1), 16'($urandom_range(0, 31)), 1'($urandom_range(0, 3) != 0));
      else search(16'($urandom_range(0, 31)));
    end
    // reset clears everything
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) ref_val[i] = 1'b0;
    search(16'h558b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
