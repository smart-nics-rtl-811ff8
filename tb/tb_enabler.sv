// tb_enabler: drives window valid, source readiness, enable-buffer output and
// cache hit at random and checks the search enables against the rules: the
// P_TCAM is searched for every valid window except in the S phase; the cache
// only when a suffix search is due; a cache miss pauses exactly one window
// step and is followed by an S phase that searches the S_TCAM (waiting if the
// source stalls); a cache hit never pauses.
module tb_enabler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic win_valid = 0, can_step = 0, ebuf_out = 0, cache_hit = 0;
  logic p_en, cache_en, stcam_en, pause, hold_p, s_phase;
  enabler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit in_s = 0;
  int n_pause = 0, n_hit = 0, n_s = 0, n_swait = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      can_step = ($urandom_range(0, 4) != 0);
      if (!in_s) begin
        win_valid = ($urandom_range(0, 5) != 0);
        ebuf_out  = ($urandom_range(0, 2) == 0);
      end
      cache_hit = $urandom_range(0, 1);
      #1;
      check(s_phase == in_s, "S phase follows a pause");
      if (in_s) begin
        check(!p_en && !cache_en && !pause, "S phase searches only the S_TCAM");
        check(stcam_en == can_step, "S_TCAM searched in the S phase when the window can move");
        if (can_step) begin in_s = 0; n_s++; end else n_swait++;
      end else begin
        check(p_en == (win_valid && can_step), "P_TCAM searched for every moving valid window");
        check(cache_en == (win_valid && can_step && ebuf_out), "cache searched when a suffix search is due");
        check(pause == (cache_en && !cache_hit), "pause on a cache miss only");
        check(hold_p == pause, "P result held on a pause");
        check(!stcam_en, "S_TCAM idle outside the S phase");
        if (pause) begin in_s = 1; n_pause++; end
        if (cache_en && cache_hit) n_hit++;
      end
    end
    check(n_pause > 0 && n_hit > 0 && n_s > 0 && n_swait > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
