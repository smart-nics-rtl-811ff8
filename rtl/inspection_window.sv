// inspection_window: the w-byte window the payload is shifted through.
//
// The reassembled payload arrives as a byte stream. Every step the window is
// shifted left by one byte and the next byte enters on the right, so a payload
// of X bytes yields X windows, the one starting at each byte. Slot 0 is the
// leftmost byte; a window is searched when slot 0 holds a payload byte. After
// the last byte, pad bytes (0x00, marked not valid) are shifted in so that the
// final windows, which run past the payload, are searched too.
//
// Between two payloads the window shifts in at least W pad bytes before the
// next payload's first byte is taken. That leaves W windows without a search
// between the two payloads, which clears the enable buffer and puts W NULL
// entries into the retirement buffer, so no suffix search and no candidate
// permutation can reach across a payload boundary. While no payload is
// present the window keeps stepping with pad bytes, which drains the
// retirement buffer. Inside a payload the window only steps when a byte is
// offered (in_valid), so a stalled source freezes the whole pipeline.
//
// Interface: valid/ready byte stream with in_last on the final byte.
// can_step says the window would move this cycle if not paused; step = can_step
// and not pause. pause (from the enabler) holds the window on the same
// contents. Zero padding and the gap of W pad steps are this design's choices.
module inspection_window #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   in_data,
  input  logic         in_valid,
  input  logic         in_last,
  output logic         in_ready,
  input  logic         pause,
  output logic         can_step,
  output logic         step,
  output logic [W*8-1:0] window,      // slot 0 in the most significant byte
  output logic         win_valid,     // slot 0 is a payload byte
  output logic         win_last       // slot 0 is the payload's last byte
);
  typedef struct packed {
    logic [7:0] data;
    logic       valid;
    logic       last;
  } slot_t;

  localparam int unsigned PW = $clog2(W + 1);

  slot_t         slot [W];
  logic          in_pkt;
  logic [PW-1:0] pad_cnt;
  logic          take;
  slot_t         enter;

  assign can_step = in_pkt ? in_valid : 1'b1;
  assign step     = can_step && !pause;
  assign in_ready = !pause && (in_pkt || pad_cnt == PW'(W));
  assign take     = in_ready && in_valid;
  assign enter    = take ? '{data: in_data, valid: 1'b1, last: in_last}
                         : '{data: 8'h00, valid: 1'b0, last: 1'b0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) slot[i] <= '0;
      in_pkt  <= 1'b0;
      pad_cnt <= PW'(W);
    end else if (step) begin
      for (int i = 0; i < W - 1; i++) slot[i] <= slot[i+1];
      slot[W-1] <= enter;
      if (take) begin
        in_pkt  <= !in_last;
        pad_cnt <= '0;
      end else if (!in_pkt && pad_cnt != PW'(W)) begin
        pad_cnt <= pad_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++) window[(W-1-i)*8 +: 8] = slot[i].data;
  end
  assign win_valid = slot[0].valid;
  assign win_last  = slot[0].last;

endmodule
