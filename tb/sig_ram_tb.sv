// sig_ram_tb: self-checking test of the signature memory (small, 8-bit
// address). Writes random rows, reads them back with the one-cycle read
// latency, checks that rd_data holds when rd_en is low and that a write to
// one row leaves the others untouched. Expected values come from a copy
// kept in the testbench.
module sig_ram_tb;
  import ids_pkg::*;
  localparam int unsigned AW = 8;

  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  sig_entry_t wr_data, rd_data;
  sig_entry_t model [2 ** AW];

  int checks = 0, failures = 0;

  sig_ram #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input sig_entry_t d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    model[a] = d;
  endtask

  task automatic rd(input int a);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(a);
    @(negedge clk);
    rd_en = 1'b0; rd_addr = ~AW'(a);
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("row %0d: read %h expected %h", a, rd_data, model[a]);
    end
    @(negedge clk);
    checks++;
    if (rd_data !== model[a]) begin failures++; $display("row %0d: rd_data did not hold", a); end
  endtask

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int a = 0; a < 2 ** AW; a++) begin
      sig_entry_t d;
      d.finish = 1'($urandom);
      d.sig    = {16'($urandom), 32'($urandom)};
      wr(a, d);
    end
    for (int a = 0; a < 2 ** AW; a++) rd(a);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(0, 2 ** AW - 1);
      if ($urandom_range(0, 1) == 0) begin
        sig_entry_t d;
        d.finish = 1'($urandom);
        d.sig    = {16'($urandom), 32'($urandom)};
        wr(a, d);
      end else rd(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
