// tb_enable_buffer: random intermediate hits and random step gaps; the
// output bit must equal the activator value (P or suffix intermediate hit)
// of exactly W steps earlier, and must not move on cycles without a step.
module tb_enable_buffer;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0, p_inter_hit = 0, s_inter_hit = 0, ebuf_out;
  enable_buffer #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit hist[$];
  int ones = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (W) hist.push_back(0);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      p_inter_hit = ($urandom_range(0, 4) == 0);
      s_inter_hit = ($urandom_range(0, 4) == 0);
      #1;
      check(ebuf_out == hist[0], $sformatf("step %0d: out %b expected %b", n, ebuf_out, hist[0]));
      if (ebuf_out) ones++;
      if (step) begin
        void'(hist.pop_front());
        hist.push_back(p_inter_hit || s_inter_hit);
      end
    end
    check(ones > 0, "suffix searches requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
