// RAM bus multiplexer. Each of the three RAMs has a single port; the master
// state decides who drives it:
//   luminance RAM : GRAB -> video capture (27 MHz), SHOW_IMAGE -> VGA
//                   (31.5 MHz), otherwise the processing unit (27 MHz)
//   edge RAM      : SHOW_EDGES -> VGA (31.5 MHz), otherwise processing unit
//   object RAM    : PRINT -> printer, otherwise the processing unit
// The RAM clock is selected together with the address, as in the original
// design where the image RAMs run from whichever clock their current user
// has. Switching happens only between stages, while neither clock domain is
// using the RAM. The VGA pixel is the luminance in SHOW_IMAGE and, in
// SHOW_EDGES, white for an edge pixel and black otherwise (this design's
// choice of how to show the edge map). Write enables and write data of the
// luminance RAM (capture only) and edge RAM (processing only) bypass this
// multiplexer because each has only one writer. Purely combinational.
// obj_din is the processing unit's write data passed straight through: only
// that unit writes objects, so only the address and write enable are muxed.
module top_mux
  import caricatron_pkg::*;
(
  input  master_state_t state,
  input  logic          clk27,
  input  logic          clk31,
  input  logic [7:0]    thresh,
  // image RAM addresses
  input  logic [16:0]   vga_addr,
  input  logic [16:0]   vid_addr,
  input  logic [16:0]   proc_addr_y,
  input  logic [16:0]   proc_addr_e,
  output logic [16:0]   lum_addr,
  output logic [16:0]   edge_addr,
  output logic          lum_clk,
  output logic          edge_clk,
  // image RAM read data to the VGA
  input  logic [7:0]    lum_q,
  input  logic [15:0]   edge_q,
  output logic [7:0]    vga_data,
  // object RAM
  input  logic [10:0]   proc_addr_o,
  input  logic [10:0]   print_addr,
  input  logic          proc_we,
  input  logic [67:0]   proc_din,
  output logic [10:0]   obj_addr,
  output logic          obj_we,
  output logic [67:0]   obj_din
);
  logic vga_lum, vga_edge;

  assign vga_lum  = (state == ST_SHOW_IMAGE);
  assign vga_edge = (state == ST_SHOW_EDGES);

  always_comb begin
    if (state == ST_GRAB) lum_addr = vid_addr;
    else if (vga_lum)     lum_addr = vga_addr;
    else                  lum_addr = proc_addr_y;
    edge_addr = vga_edge ? vga_addr : proc_addr_e;
    lum_clk   = vga_lum  ? clk31 : clk27;
    edge_clk  = vga_edge ? clk31 : clk27;
    vga_data  = vga_edge ? (is_edge(edge_q, thresh) ? 8'hFF : 8'h00) : lum_q;
    if (state == ST_PRINT) begin
      obj_addr = print_addr;
      obj_we   = 1'b0;
    end else begin
      obj_addr = proc_addr_o;
      obj_we   = proc_we;
    end
    obj_din = proc_din;
  end
endmodule
