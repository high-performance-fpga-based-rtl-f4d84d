// sig_comparator_tb: self-checking test of the 48-bit comparator. Checks
// equal and unequal pairs, including pairs that differ in a single bit at
// every position, and that the finish bit is passed to "last" without
// affecting the comparison.
module sig_comparator_tb;
  import ids_pkg::*;

  logic [SIG_W-1:0] data;
  sig_entry_t       entry;
  logic             eq, last;

  int checks = 0, failures = 0;

  sig_comparator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [SIG_W-1:0] d, input logic [SIG_W-1:0] s, input logic f);
    data = d; entry.sig = s; entry.finish = f;
    #1;
    checks++;
    if (eq !== (d == s) || last !== f) begin
      failures++;
      $display("data=%h sig=%h fin=%b: eq=%b last=%b", d, s, f, eq, last);
    end
  endtask

  initial begin
    logic [SIG_W-1:0] r;
    // the rest of the published example sub-string 558becc746020040
    check(48'hecc746020040, 48'hecc746020040, 1'b0);
    check(48'hecc746020040, 48'hecc746020040, 1'b1);
    for (int b = 0; b < SIG_W; b++) begin
      r = {16'($urandom), 32'($urandom)};
      check(r, r ^ (48'd1 << b), 1'($urandom));
      check(r, r, 1'($urandom));
    end
    for (int n = 0; n < 200; n++) begin
      r = {16'($urandom), 32'($urandom)};
      check(r, {16'($urandom), 32'($urandom)}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
