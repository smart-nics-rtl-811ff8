// tb_contention_resolution: all combinations of P and suffix hit with every
// pattern-bit value, for random addresses. The pushed entry, short match,
// alias flag and activator outputs are compared with the rules written out
// case by case.
module tb_contention_resolution;
  import snic_pkg::*;
  localparam int AW = 14, PAW = 12, SAW = 14;
  logic valid, p_hit, s_hit, short_match, alias_hit, p_inter_hit, s_inter_hit;
  pat_flags_t p_flags, s_flags;
  logic [PAW-1:0] p_addr;
  logic [SAW-1:0] s_addr;
  logic [AW-1:0] rb_addr;
  logic [1:0] rb_desc;
  contention_resolution #(.AW(AW), .PAW(PAW), .SAW(SAW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++)
      for (int c = 0; c < 64; c++) begin
        logic [1:0] ed;
        logic [AW-1:0] ea;
        valid = (c >= 8) || r == 0;    // mostly valid
        p_hit = c[0]; s_hit = c[1];
        p_flags = 2'(c >> 2); s_flags = 2'(c >> 4);
        if (r > 0 && c < 8) valid = 0;
        p_addr = 12'($urandom); s_addr = 14'($urandom);
        #1;
        // expected entry
        if (valid && p_hit && p_flags.inter) begin ed = 2'b11; ea = AW'(p_addr); end
        else if (valid && s_hit)             begin ed = 2'b01; ea = AW'(s_addr); end
        else                                  begin ed = 2'b00; ea = '0; end
        check(rb_desc == ed, $sformatf("case %0d: desc %b expected %b", c, rb_desc, ed));
        check(rb_addr == ea, $sformatf("case %0d: address", c));
        check(short_match == (valid && p_hit && p_flags.conc), "short pattern match");
        check(alias_hit == (valid && p_hit && p_flags.inter && s_hit && s_flags.inter), "alias");
        check(p_inter_hit == (valid && p_hit && p_flags.inter), "P activator input");
        check(s_inter_hit == (valid && s_hit && s_flags.inter), "suffix activator input");
        #9;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
