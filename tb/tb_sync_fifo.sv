// tb_sync_fifo: checks the FIFO used for the Rx, Tx and descriptor FIFOs
// against a queue model under random pushes and pops, including running
// full and empty, the full/empty flags, the count, and wrap-around of a
// depth that is not a power of two.
module tb_sync_fifo;
  localparam int WIDTH = 9, DEPTH = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [WIDTH-1:0] q[$];
  int n_full = 0, n_empty = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 300) % 2;   // alternate filling and draining phases
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (!empty) check(rd_data == q[0], $sformatf("data %h expected %h", rd_data, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en = !full && ($urandom_range(0, 9) < (bias ? 8 : 3));
      rd_en = !empty && ($urandom_range(0, 9) < (bias ? 3 : 8));
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, $sformatf("ran full (%0d) and empty (%0d)", n_full, n_empty));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
