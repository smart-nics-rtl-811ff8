// tb_retirement_logic: random buffer contents with planted chains. On a step
// with a '11' sentry the candidate (entries 0, W, 2W, ... up to the first
// NULL, at most MAX_SEG) must appear on the next cycle if it has two or more
// entries; otherwise cand_valid must stay low.
module tb_retirement_logic;
  localparam int W = 4, MAX_SEG = 32, DEPTH = 1 + W * (MAX_SEG - 1), AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0, cand_valid;
  logic [AW-1:0] addr [DEPTH];
  logic [1:0] desc [DEPTH];
  logic [$clog2(MAX_SEG+1)-1:0] cand_len;
  logic [AW-1:0] cand_addr [MAX_SEG];
  logic [1:0] cand_desc [MAX_SEG];
  retirement_logic #(.W(W), .DEPTH(DEPTH), .AW(AW), .MAX_SEG(MAX_SEG)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_cand = 0, n_full = 0, n_lone = 0;
  initial begin
    foreach (addr[i]) begin addr[i] = '0; desc[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int len, want;
      @(negedge clk);
      foreach (addr[i]) begin addr[i] = AW'($urandom); desc[i] = ($urandom_range(0, 2) == 0) ? 2'b00 : 2'($urandom_range(1, 3)); end
      want = $urandom_range(0, MAX_SEG + 2);    // planted chain length
      for (int j = 0; j < MAX_SEG; j++) begin
        if (j < want) desc[j*W] = (j == 0) ? 2'b11 : 2'($urandom_range(1, 3));
        else if (j == want) desc[j*W] = 2'b00;
      end
      step = ($urandom_range(0, 5) != 0);
      len = 0;
      for (int j = 0; j < MAX_SEG; j++) if (desc[j*W] != 0) len++; else break;
      @(negedge clk);
      if (step && desc[0] == 2'b11 && len >= 2) begin
        n_cand++; if (len == MAX_SEG) n_full++;
        check(cand_valid, "candidate dispatched");
        check(int'(cand_len) == len, $sformatf("length %0d expected %0d", cand_len, len));
        for (int j = 0; j < len; j++)
          check(cand_addr[j] == addr[j*W] && cand_desc[j] == desc[j*W], $sformatf("element %0d", j));
      end else begin
        if (step && desc[0] == 2'b11) n_lone++;
        check(!cand_valid, "no candidate");
      end
    end
    check(n_cand > 0 && n_full > 0 && n_lone > 0, "short, full-length and lone-prefix chains seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
