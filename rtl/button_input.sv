// button_input: brings the board's push buttons into the controller clock
// domain and detects presses.
//
// Each button passes through a two-flop synchroniser; a third flop holds the
// previous synchronised level, so `press` is a one-cycle pulse once a 0->1
// transition has crossed the synchroniser, and `level` is the synchronised
// button level. Both follow the raw input by two clock edges: a button that
// rises before edge 1 shows on `level` and `press` after edge 2, and `press`
// drops again after edge 3.
//
// The lab only says the controller responds to the press of a button; the
// synchroniser and edge detector are this design's simplest way to make one
// press start exactly one command. There is no debouncing: the buttons are
// assumed to be debounced on the board, or held long enough for the command
// (which ignores further presses while it runs) to finish.
module button_input #(
  parameter int unsigned N = 4  // number of buttons
) (
  input  logic         clk,
  input  logic [N-1:0] btn,    // raw, asynchronous button levels
  output logic [N-1:0] level,  // synchronised levels
  output logic [N-1:0] press   // one-cycle pulse per rising edge
);

  // FPGA power-up value 0: no press is seen at configuration.
  logic [N-1:0] meta_q = '0, sync_q = '0, prev_q = '0;

  always_ff @(posedge clk) begin
    meta_q <= btn;
    sync_q <= meta_q;
    prev_q <= sync_q;
  end

  assign level = sync_q;
  assign press = sync_q & ~prev_q;

endmodule
