// tb_tcam: checks the ternary CAM. Entries with random values, random
// byte-wise don't-care masks and pattern bits are written at random
// addresses (a few invalidated); random keys, many derived from stored
// entries, are searched. Hit, lowest matching address, pattern bits and the
// exact flag are compared with a reference search; search_en low must give
// no hit.
module tb_tcam;
  import snic_pkg::*;
  localparam int KEY_W = 32, DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_valid = 0, search_en = 0, hit, hit_exact;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0, hit_addr;
  logic [KEY_W-1:0] wr_value = '0, wr_mask = '0, key = '0;
  pat_flags_t wr_flags = '0, hit_flags;
  tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [KEY_W-1:0] mv [DEPTH], mm [DEPTH];
  pat_flags_t mf [DEPTH];
  bit mvld [DEPTH];
  int n_hit = 0, n_exact = 0, n_multi = 0;
  initial begin
    foreach (mvld[i]) mvld[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'($urandom_range(0, DEPTH - 1));
      wr_value = {8'($urandom_range(65, 70)), 8'($urandom_range(65, 70)), 8'($urandom_range(65, 70)), 8'($urandom_range(65, 70))};
      case ($urandom_range(0, 3))
        0: wr_mask = 32'hFFFF_FFFF;
        1: wr_mask = 32'hFFFF_FF00;
        2: wr_mask = 32'hFFFF_0000;
        default: wr_mask = 32'hFF00_0000;
      endcase
      wr_flags = 2'($urandom_range(1, 3));
      wr_valid = ($urandom_range(0, 7) != 0);
      mv[wr_addr] = wr_value; mm[wr_addr] = wr_mask; mf[wr_addr] = wr_flags; mvld[wr_addr] = wr_valid;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 1000; n++) begin
      int first, cnt;
      @(negedge clk);
      key = {8'($urandom_range(65, 71)), 8'($urandom_range(65, 71)), 8'($urandom_range(65, 71)), 8'($urandom_range(65, 71))};
      search_en = ($urandom_range(0, 9) != 0);
      #1;
      first = -1; cnt = 0;
      for (int i = 0; i < DEPTH; i++)
        if (mvld[i] && ((key ^ mv[i]) & mm[i]) == 0) begin cnt++; if (first < 0) first = i; end
      if (!search_en) check(!hit, "no hit while search_en is low");
      else begin
        check(hit == (first >= 0), $sformatf("hit for key %h", key));
        if (first >= 0) begin
          check(int'(hit_addr) == first, $sformatf("addr %0d expected %0d", hit_addr, first));
          check(hit_flags == mf[first], "pattern bits");
          check(hit_exact == (mm[first] == '1), "exact flag");
          n_hit++; if (mm[first] == '1) n_exact++; if (cnt > 1) n_multi++;
        end
      end
    end
    check(n_hit > 0 && n_exact > 0 && n_multi > 0, "hits, exact hits and multiple matches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
