// tb_retirement_buffer: random pushes with random step gaps; every entry of
// the buffer is compared with a queue model after each cycle (entries enter
// at the right end, leave at the sentry, nothing moves without a step), and
// the buffer must read all NULL after reset.
module tb_retirement_buffer;
  localparam int DEPTH = 125, AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0;
  logic [AW-1:0] push_addr = '0;
  logic [1:0] push_desc = '0;
  logic [AW-1:0] addr [DEPTH];
  logic [1:0] desc [DEPTH];
  retirement_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [AW+1:0] q[$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (DEPTH) q.push_back('0);
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      bit ok = 1;
      for (int i = 0; i < DEPTH; i++) if ({addr[i], desc[i]} != q[i]) ok = 0;
      check(ok, $sformatf("contents after cycle %0d", n));
      step = ($urandom_range(0, 3) != 0);
      push_addr = AW'($urandom); push_desc = 2'($urandom);
      @(posedge clk);
      if (step) begin void'(q.pop_front()); q.push_back({push_addr, push_desc}); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
