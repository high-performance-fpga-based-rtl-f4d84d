// suspect_fifo_tb: self-checking test of the suspicious sub-string buffer
// (depth 4). Random pushes and pops against a queue model; checks data
// order, empty/full flags, and that a push into a full buffer is dropped
// (even when a pop happens in the same cycle) and raises overflow for one
// cycle.
module suspect_fifo_tb;
  localparam int unsigned W = 64;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n, wr_en, rd_en, empty, full, overflow;
  logic [W-1:0] wr_data, rd_data;

  int checks = 0, failures = 0, overflows = 0;
  logic [W-1:0] q [$];

  suspect_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ovf;
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exp_ovf = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      // status checks against the model
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || overflow !== exp_ovf) begin
        failures++;
        $display("cycle %0d: empty=%b full=%b ovf=%b model size=%0d exp_ovf=%b", n, empty, full, overflow, q.size(), exp_ovf);
      end
      if (q.size() != 0) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("rd_data %h expected %h", rd_data, q[0]); end
      end
      // phases: fill-heavy then drain-heavy, so full and overflow happen
      wr_en   = ((n / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en   = (q.size() != 0) && !empty && (((n / 100) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0));
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      exp_ovf = wr_en && (q.size() == DEPTH);
      if (exp_ovf) overflows++;
      if (rd_en) void'(q.pop_front());
      if (wr_en && !exp_ovf) q.push_back(wr_data);
      @(negedge clk);
    end
    checks++;
    if (overflows == 0) begin failures++; $display("overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
