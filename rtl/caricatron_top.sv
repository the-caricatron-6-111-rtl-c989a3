// Caricatron: camera-to-caricature pipeline.
// A frame from an NTSC decoder (BT.656 on video_in, clocked by clktv) is
// grabbed into the luminance RAM (320x240x8), shown on a VGA monitor, and on
// the user's 'continue' filtered with a 15x15 Laplacian-of-Gaussian into the
// edge RAM (320x240x16). The edge map is shown; on 'continue' again, curves
// are traced through the edge pixels and stored as Bezier objects (start,
// end, two control points) in the object RAM (2048x68), which the printer
// stage then sends as PostScript over a Centronics parallel port. 'reject'
// in either display state retakes the snapshot.
// Clocks: clk 27 MHz (system), clk31 31.5 MHz (VGA pixels), clktv 27 MHz
// (decoder, unrelated to clk). Buttons are raw and active high; thresh sets
// the edge threshold. The three single-port RAMs are clocked on the falling
// edge; the image RAMs take their clock from whichever unit owns them
// (top_mux). Parameters: image size (320x240 in the original design), the button
// lockout (about one second), the object capacity and the parallel-port
// timing; smaller values are for simulation.
module caricatron_top
  import caricatron_pkg::*;
#(
  parameter int unsigned IMG_W           = 320,
  parameter int unsigned IMG_H           = 240,
  parameter int unsigned DEBOUNCE_CYCLES = 27_000_000,
  parameter int unsigned MAX_OBJECTS     = 2048,
  parameter int unsigned T_SPP           = 14
) (
  input  logic        clk,
  input  logic        clk31,
  input  logic        clktv,
  input  logic        reset_btn,
  input  logic        cont_btn,
  input  logic        reject_btn,
  input  logic [7:0]  thresh,
  input  logic [9:0]  video_in,
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue,
  output logic        blank,
  output logic        sync,
  output logic        hsync,
  output logic        vsync,
  output logic [7:0]  pp_data,
  output logic        pp_nstrobe,
  input  logic        pp_busy,
  input  logic        pp_nack,
  output logic [2:0]  state
);
  logic          reset, cont, reject;
  master_state_t st;
  logic start_grab, done_grab, start_edge, done_edge, start_line, done_line;
  logic start_print, done_print, run_vga;

  logic [16:0] lum_addr, edge_addr, vga_addr, vid_addr, proc_addr_y, proc_addr_e;
  logic [10:0] proc_addr_o, print_addr, obj_addr;
  logic [7:0]  lum_q, lum_d, vga_data;
  logic [15:0] edge_q, edge_d;
  logic [67:0] proc_o_d, obj_d, obj_q;
  logic        ywe, ewe, owe, proc_owe, lum_clk, edge_clk;
  logic [9:0]  vid_q;
  logic [11:0] num_objects;
  logic        ch_valid, ch_ready;
  logic [7:0]  ch;

  // user inputs
  sync_debounce #(.LOCKOUT_CYCLES(0)) u_sync_reset (
    .clk, .reset(1'b0), .btn(reset_btn), .pulse(reset));
  sync_debounce #(.LOCKOUT_CYCLES(DEBOUNCE_CYCLES)) u_sync_cont (
    .clk, .reset, .btn(cont_btn), .pulse(cont));
  sync_debounce #(.LOCKOUT_CYCLES(DEBOUNCE_CYCLES)) u_sync_reject (
    .clk, .reset, .btn(reject_btn), .pulse(reject));

  // master controller and RAM multiplexer
  caricatron_fsm u_fsm (
    .clk, .reset, .cont, .reject,
    .start_grab, .done_grab, .start_edge, .done_edge, .start_line, .done_line,
    .start_print, .done_print, .run_vga, .state(st));
  assign state = st;

  top_mux u_mux (
    .state(st), .clk27(clk), .clk31, .thresh,
    .vga_addr, .vid_addr, .proc_addr_y, .proc_addr_e, .lum_addr, .edge_addr,
    .lum_clk, .edge_clk, .lum_q, .edge_q, .vga_data,
    .proc_addr_o, .print_addr, .proc_we(proc_owe), .proc_din(proc_o_d),
    .obj_addr, .obj_we(owe), .obj_din(obj_d));

  // memories
  yram u_yram (.clk(lum_clk),  .we(ywe), .addr(lum_addr),  .di(lum_d),  .dout(lum_q));
  eram u_eram (.clk(edge_clk), .we(ewe), .addr(edge_addr), .di(edge_d), .dout(edge_q));
  oram u_oram (.clk(clk),      .we(owe), .addr(obj_addr),  .di(obj_d),  .dout(obj_q));

  // image capture
  video_fifo u_fifo (.reset, .tvclk(clktv), .clk, .data_in(video_in), .data_out(vid_q));
  capture_video #(.XMAX(IMG_W), .YMAX(IMG_H)) u_cap (
    .clk, .reset, .capture(start_grab), .vid(vid_q), .done(done_grab),
    .addr(vid_addr), .we(ywe), .ram_data(lum_d));

  // display
  vga_out u_vga (
    .pix_clk(clk31), .reset, .run(run_vga), .im_data(vga_data), .im_addr(vga_addr),
    .red, .green, .blue, .blank, .sync, .hsync, .vsync);

  // edge and line detection
  image_processor #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MAX_OBJECTS(MAX_OBJECTS)) u_proc (
    .clk, .reset, .start_convolution(start_edge), .start_curves(start_line),
    .threshold(thresh), .convolution_done(done_edge), .curves_done(done_line),
    .ram_y_address(proc_addr_y), .ram_y_out(lum_q),
    .ram_edges_address(proc_addr_e), .ram_edges_write(ewe), .ram_edges_data(edge_d),
    .ram_edges_out(edge_q),
    .ram_objects_address(proc_addr_o), .ram_objects_write(proc_owe),
    .ram_objects_data(proc_o_d), .num_objects);

  // printing
  ps_printer u_ps (
    .clk, .reset, .start(start_print), .num_objects, .o_addr(print_addr), .o_data(obj_q),
    .done(done_print), .ch_valid, .ch, .ch_ready);
  spp_port #(.T_SETUP(T_SPP), .T_STROBE(T_SPP), .T_HOLD(T_SPP)) u_spp (
    .clk, .reset, .valid(ch_valid), .data(ch), .ready(ch_ready),
    .pp_data, .pp_nstrobe, .pp_busy, .pp_nack);
endmodule
