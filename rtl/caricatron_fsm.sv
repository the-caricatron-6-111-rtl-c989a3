// Master controller of the Caricatron. It starts each stage of the pipeline
// with a one-cycle begin pulse and waits for that stage's one-cycle end pulse:
//   IDLE --cont--> GRAB --done--> SHOW_IMAGE
//   SHOW_IMAGE --reject--> GRAB (take another snapshot), --cont--> EDGE
//   EDGE --done--> SHOW_EDGES --reject--> GRAB, --cont--> LINE
//   LINE --done--> PRINT --done--> IDLE
// In the two SHOW states the VGA display runs (run_vga) and owns the image
// RAMs. The state doubles as the control of the RAM multiplexer. The stage
// order, snapshot retry and continue/reject buttons follow the original design; the
// exact state set (in particular showing the edge map before line detection)
// is this design's choice. All inputs are synchronous to clk.
module caricatron_fsm
  import caricatron_pkg::*;
(
  input  logic          clk,
  input  logic          reset,
  input  logic          cont,
  input  logic          reject,
  output logic          start_grab,
  input  logic          done_grab,
  output logic          start_edge,
  input  logic          done_edge,
  output logic          start_line,
  input  logic          done_line,
  output logic          start_print,
  input  logic          done_print,
  output logic          run_vga,
  output master_state_t state
);
  master_state_t nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_IDLE:       if (cont) nxt = ST_GRAB;
      ST_GRAB:       if (done_grab) nxt = ST_SHOW_IMAGE;
      ST_SHOW_IMAGE: if (reject) nxt = ST_GRAB; else if (cont) nxt = ST_EDGE;
      ST_EDGE:       if (done_edge) nxt = ST_SHOW_EDGES;
      ST_SHOW_EDGES: if (reject) nxt = ST_GRAB; else if (cont) nxt = ST_LINE;
      ST_LINE:       if (done_line) nxt = ST_PRINT;
      ST_PRINT:      if (done_print) nxt = ST_IDLE;
      default:       nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= ST_IDLE;
      start_grab  <= 1'b0;
      start_edge  <= 1'b0;
      start_line  <= 1'b0;
      start_print <= 1'b0;
    end else begin
      state       <= nxt;
      // begin pulses on entry to a working state
      start_grab  <= (nxt == ST_GRAB)  && (state != ST_GRAB);
      start_edge  <= (nxt == ST_EDGE)  && (state != ST_EDGE);
      start_line  <= (nxt == ST_LINE)  && (state != ST_LINE);
      start_print <= (nxt == ST_PRINT) && (state != ST_PRINT);
    end
  end

  assign run_vga = (state == ST_SHOW_IMAGE) || (state == ST_SHOW_EDGES);
endmodule
