// tb_cache_ctrl: the victim must be the lowest empty entry while one
// exists; with all entries valid it must stay in range and, over many cycles,
// spread over the whole cache (every entry chosen at least once, none chosen
// more than three times its fair share).
module tb_cache_ctrl;
  localparam int DEPTH = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [DEPTH-1:0] valid_vec = '0;
  logic [$clog2(DEPTH)-1:0] victim;
  cache_ctrl #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hist [DEPTH];
  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int first;
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) valid_vec[i] = ($urandom_range(0, 9) != 0);
      #1;
      first = -1;
      for (int i = DEPTH - 1; i >= 0; i--) if (!valid_vec[i]) first = i;
      if (first >= 0) check(int'(victim) == first, $sformatf("victim %0d expected empty entry %0d", victim, first));
    end
    valid_vec = '1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      check(int'(victim) < DEPTH, "victim in range");
      if (int'(victim) < DEPTH) hist[victim]++;
    end
    foreach (hist[i]) check(hist[i] > 0 && hist[i] < 3 * 8000 / DEPTH,
                            $sformatf("entry %0d chosen %0d times", i, hist[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
