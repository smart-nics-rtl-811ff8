// enabler: selects which signature stores are searched for each window.
//
// The P_TCAM is searched for every window. When the enable buffer's output bit
// is set, the suffix cache is searched in the same cycle. On a cache hit the
// window moves on. On a cache miss the enabler raises pause for one cycle:
// the window and enable buffer hold, and in the next cycle (the S phase) the
// S_TCAM is searched for the same window while the P_TCAM stays idle (its
// result from the first cycle is held by the caller, hold_p). A cache miss
// therefore costs exactly one stall cycle.
//
// Interface: win_valid and can_step come from the inspection window;
// cache_hit from the suffix cache. Outputs are combinational except s_phase.
// If the payload source stalls during the S phase, the S phase waits for it.
module enabler (
  input  logic clk,
  input  logic rst_n,
  input  logic win_valid,
  input  logic can_step,
  input  logic ebuf_out,
  input  logic cache_hit,
  output logic p_en,       // search the P_TCAM
  output logic cache_en,   // search the suffix cache
  output logic stcam_en,   // search the S_TCAM
  output logic pause,      // hold the window for one more cycle
  output logic hold_p,     // capture the P_TCAM result for the S phase
  output logic s_phase     // this cycle is the S_TCAM search of a held window
);
  logic searched;
  assign searched = win_valid && can_step;

  assign p_en     = searched && !s_phase;
  assign cache_en = p_en && ebuf_out;
  assign pause    = cache_en && !cache_hit;
  assign hold_p   = pause;
  assign stcam_en = s_phase && can_step;

  always_ff @(posedge clk) begin
    if (!rst_n)        s_phase <= 1'b0;
    else if (pause)    s_phase <= 1'b1;
    else if (stcam_en) s_phase <= 1'b0;
  end

  // The S phase always follows a pause on a valid window.
  a_s_phase_window: assert property (@(posedge clk) disable iff (!rst_n)
    s_phase |-> win_valid);

endmodule
