// main_fsm: sequencer of the swept-plane scanner.
//
// States: RESET, SCAN_ON, COMP15, LD. When the scan switch (scan_on) is
// on, the FSM leaves RESET for SCAN_ON, where it pulses advance_en for one
// clock to ask the projector to move the laser plane to its next stop.
// It then enables compare15 (COMP15) until the noise-reduced frame is in
// the BRAM (comp15_done), then line_det (LD) until the frame has been
// searched (ld_done), and returns to SCAN_ON for the next stop. save_en is
// high in every state but RESET, so point3d_zbt collects points across the
// whole scan. Turning scan_on off or a scan_complete pulse from the
// projector sends the FSM back to RESET from any state.
//
// Timing: outputs are decoded from the registered state (no extra clock
// of latency), so an enable drops on the clock after its done was seen.
// The states and transitions follow the document; decoding the outputs
// from the state instead of registering them is this design's choice.
module main_fsm (
  input  logic clk,
  input  logic rst,
  input  logic scan_on,
  input  logic comp15_done,
  input  logic ld_done,
  input  logic scan_complete,
  output logic advance_en,
  output logic comp15_en,
  output logic ld_enable,
  output logic save_en
);

  typedef enum logic [1:0] {S_RESET, S_SCAN_ON, S_COMP15, S_LD} state_t;
  state_t state, next_state;

  always_comb begin
    next_state = state;
    if (!scan_on || scan_complete) begin
      next_state = S_RESET;
    end else begin
      unique case (state)
        S_RESET:   next_state = S_SCAN_ON;
        S_SCAN_ON: next_state = S_COMP15;
        S_COMP15:  if (comp15_done) next_state = S_LD;
        S_LD:      if (ld_done)     next_state = S_SCAN_ON;
        default:   next_state = S_RESET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= next_state;
  end

  always_comb begin
    advance_en = (state == S_SCAN_ON);
    comp15_en  = (state == S_COMP15);
    ld_enable  = (state == S_LD);
    save_en    = (state != S_RESET);
  end

endmodule
