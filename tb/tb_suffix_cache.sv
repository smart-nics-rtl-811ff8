// tb_suffix_cache: fills the 40-entry cache with more distinct patterns than
// it holds and looks up random patterns. A model tracks which patterns can be
// resident: a hit must return the S_TCAM address and pattern bits stored
// with that pattern; a pattern never filled, or filled before a flush, must
// miss. While the cache is still filling nothing may be evicted, so every
// pattern filled since the last flush must hit. At least one eviction (a
// filled pattern that later misses) must occur once more than 40 patterns
// have been filled.
module tb_suffix_cache;
  import snic_pkg::*;
  localparam int KEY_W = 32, DEPTH = 40, SAW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lookup_en = 0, hit, fill_en = 0, flush = 0;
  logic [KEY_W-1:0] key = '0, fill_key = '0;
  logic [SAW-1:0] hit_saddr, fill_saddr = '0;
  pat_flags_t hit_flags, fill_flags = '0;
  suffix_cache #(.KEY_W(KEY_W), .DEPTH(DEPTH), .SAW(SAW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // pattern p (0..99) is 32'h5000_0000 + p, stored with S address 3*p + 1
  bit filled [100];
  int n_filled = 0, n_evicted = 0, n_hits = 0;

  task automatic lookup_check(input int p, input bit must_hit);
    @(negedge clk);
    lookup_en = 1; key = 32'h5000_0000 + 32'(p);
    #1;
    if (hit) begin
      n_hits++;
      check(filled[p], $sformatf("pattern %0d hit but was not filled", p));
      check(int'(hit_saddr) == 3 * p + 1, "S_TCAM address");
      check(hit_flags == pat_flags_t'(2'(p % 3 + 1)), "pattern bits");
    end else if (filled[p]) n_evicted++;
    if (must_hit) check(hit, $sformatf("pattern %0d must be resident", p));
    lookup_en = 0;
  endtask

  task automatic fill(input int p);
    @(negedge clk);
    fill_en = 1; fill_key = 32'h5000_0000 + 32'(p); fill_saddr = SAW'(3 * p + 1);
    fill_flags = pat_flags_t'(2'(p % 3 + 1));
    filled[p] = 1; n_filled++;
    @(negedge clk);
    fill_en = 0;
  endtask

  initial begin
    foreach (filled[i]) filled[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup_check(7, 0);
    check(!hit, "empty cache misses");
    for (int p = 0; p < 30; p++) fill(p);
    for (int p = 0; p < 30; p++) lookup_check(p, 1);
    lookup_check(55, 0);
    check(!hit, "unfilled pattern misses");
    // flush empties it
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    foreach (filled[i]) filled[i] = 0;
    for (int p = 0; p < 30; p++) begin lookup_check(p, 0); check(!hit, "miss after flush"); end
    // overfill: 100 distinct patterns through a 40-entry cache
    for (int p = 0; p < 100; p++) begin
      if (!filled[p]) fill(p);
      if (p < DEPTH) lookup_check(p, 1);
    end
    for (int n = 0; n < 400; n++) lookup_check($urandom_range(0, 99), 0);
    check(n_evicted > 0, "random replacement evicted entries");
    check(n_hits > 0, "hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
