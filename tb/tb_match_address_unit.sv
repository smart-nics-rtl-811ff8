// tb_match_address_unit: random match vectors, stage selects and rule masks;
// the intersection, hit, multiple-match flag and lowest address are compared
// with a model computed bit by bit.
module tb_match_address_unit;
  localparam int DEPTH = 100;
  logic [DEPTH-1:0] sa_vec, sp_vec, dp_vec, rule_mask, match_vec;
  logic use_sa, use_sp, use_dp, hit, multi;
  logic [$clog2(DEPTH)-1:0] addr;
  match_address_unit #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [DEPTH-1:0] rnd(input int density);
    logic [DEPTH-1:0] v;
    for (int i = 0; i < DEPTH; i++) v[i] = ($urandom_range(0, 99) < density);
    return v;
  endfunction

  int n_multi = 0, n_single = 0, n_none = 0;
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int cnt, first;
      logic [DEPTH-1:0] e;
      int d;
      d = $urandom_range(1, 60);
      sa_vec = rnd(d); sp_vec = rnd(d); dp_vec = rnd(d); rule_mask = rnd(70);
      {use_sa, use_sp, use_dp} = 3'($urandom_range(0, 7));
      #1;
      cnt = 0; first = -1;
      for (int i = 0; i < DEPTH; i++) begin
        e[i] = rule_mask[i] && (!use_sa || sa_vec[i]) && (!use_sp || sp_vec[i]) && (!use_dp || dp_vec[i]);
        if (e[i]) begin cnt++; if (first < 0) first = i; end
      end
      check(match_vec == e, "intersection");
      check(hit == (cnt > 0), "hit");
      check(multi == (cnt > 1), "multiple match");
      if (cnt > 0) check(int'(addr) == first, $sformatf("addr %0d expected %0d", addr, first));
      if (cnt > 1) n_multi++; else if (cnt == 1) n_single++; else n_none++;
      #9;
    end
    check(n_multi > 0 && n_single > 0 && n_none > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
