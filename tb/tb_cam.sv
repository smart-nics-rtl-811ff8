// tb_cam: checks the binary rule CAM. Random entries are written (some
// deleted, some duplicated to produce several match bits), then random keys
// (half of them stored values) are searched; the registered match vector one
// cycle later must equal the vector a reference model computes. A cycle with
// search_en low must leave the match vector unchanged.
module tb_cam;
  localparam int WIDTH = 16, DEPTH = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_valid = 0, search_en = 0;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, key = '0;
  logic [DEPTH-1:0] match_vec;
  cam #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [WIDTH-1:0] m_val [DEPTH];
  bit m_vld [DEPTH];
  logic [DEPTH-1:0] exp_vec, prev;
  int multi = 0;
  initial begin
    foreach (m_vld[i]) m_vld[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 7'($urandom_range(0, DEPTH - 1));
      wr_data = 16'($urandom_range(0, 40));       // small range: duplicates
      wr_valid = ($urandom_range(0, 5) != 0);
      m_val[wr_addr] = wr_data; m_vld[wr_addr] = wr_valid;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      key = ($urandom_range(0, 1)) ? 16'($urandom_range(0, 40)) : 16'($urandom);
      for (int i = 0; i < DEPTH; i++) exp_vec[i] = m_vld[i] && (m_val[i] == key);
      search_en = 1;
      @(negedge clk);
      search_en = 0;
      check(match_vec == exp_vec, $sformatf("key %h: %h expected %h", key, match_vec, exp_vec));
      if ($countones(exp_vec) > 1) multi++;
      prev = match_vec;
      key = ~key;
      @(negedge clk);
      check(match_vec == prev, "match vector must hold while search_en is low");
    end
    check(multi > 0, "several rows matched one key at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
