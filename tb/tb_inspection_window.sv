// tb_inspection_window: streams payloads with random source stalls and random
// pause pulses. On every step the window contents are compared with the
// model: the window starting at the next payload byte, zero padded past the
// end, with slot 0 valid exactly for the X windows of an X-byte payload.
// Between payloads exactly W pad steps must pass before the next byte is
// accepted, a pause must hold everything, and a stalled source must freeze
// the window inside a payload.
module tb_inspection_window;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] in_data = '0;
  logic in_valid = 0, in_last = 0, in_ready, pause = 0, can_step, step, win_valid, win_last;
  logic [W*8-1:0] window;
  inspection_window #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected stream of windows: each entry {valid, last, bytes}
  typedef struct { bit v; bit l; logic [W*8-1:0] w; } win_t;
  win_t expw[$];
  int n_pause = 0, n_stall = 0;
  int steps_since_last = -1;   // pad steps between a last byte and the next take
  logic [W*8-1:0] held;
  bit idle_gap = 0;   // the testbench waited between two payloads

  always @(posedge clk) begin
    if (rst_n) begin
      // compare the current window while it is valid and about to move
      if (step && win_valid) begin
        if (expw.size() == 0) check(0, "unexpected window");
        else begin
          win_t e;
          e = expw.pop_front();
          check(window == e.w, $sformatf("window %h expected %h", window, e.w));
          check(win_last == e.l, "last flag");
        end
      end
    end
  end

  task automatic send(input logic [7:0] b[$]);
    int X = b.size();
    for (int k = 0; k < X; k++) begin
      win_t e;
      e.v = 1; e.l = (k == X - 1); e.w = '0;
      for (int i = 0; i < W; i++) if (k + i < X) e.w[(W-1-i)*8 +: 8] = b[k+i];
      expw.push_back(e);
    end
    for (int i = 0; i < X; i++) begin
      if ($urandom_range(0, 5) == 0 && i > 0) begin
        // source stall inside a payload: window must not move
        held = window;
        in_valid = 0;
        @(negedge clk);
        check(!step && window == held, "window frozen while the source stalls");
        n_stall++;
      end
      in_data = b[i]; in_valid = 1; in_last = (i == X - 1);
      do begin
        pause = ($urandom_range(0, 6) == 0);
        if (pause) begin
          held = window; n_pause++;
          @(posedge clk);
          #1;
          check(window == held, "pause holds the window");
          @(negedge clk);
          pause = 0;
          #1;
        end
        @(posedge clk);
      end while (!in_ready);
      if (i == 0 && steps_since_last >= 0)
        check(idle_gap ? steps_since_last >= W : steps_since_last == W, $sformatf("%0d pad steps between payloads, expected %0d", steps_since_last, W));
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && in_last) steps_since_last <= 0;
    else if (rst_n && step && !(in_valid && in_ready) && steps_since_last >= 0) steps_since_last <= steps_since_last + 1;
  end

  initial begin
    logic [7:0] b[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int len;
      b.delete();
      len = $urandom_range(1, 40);
      for (int i = 0; i < len; i++) b.push_back(8'($urandom_range(1, 255)));
      send(b);
      idle_gap = ($urandom_range(0, 2) == 0);
      if (idle_gap) repeat ($urandom_range(1, 8)) @(negedge clk);
    end
    repeat (3 * W) @(negedge clk);
    check(expw.size() == 0, $sformatf("%0d windows never searched", expw.size()));
    check(n_pause > 0 && n_stall > 0, "pauses and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
