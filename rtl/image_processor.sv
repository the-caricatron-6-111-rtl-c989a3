// Edge and line detection unit. Edge detection convolves the 320x240
// luminance image with a 15x15 Laplacian-of-Gaussian kernel (convolve_fsm,
// log_rom, force_zero, mac_slow) and writes one 16-bit sign-magnitude value
// per pixel to the edge RAM. Line detection then repeatedly finds a start
// pixel (find_pix_fsm), follows the curve from it by least gradient
// (extract_curve_fsm) and stores each curve as a 68-bit object in the object
// RAM; major_filtering_fsm sequences these and owns the RAM ports.
// Edge pixels are positive filter values above thresh. The unit talks to the
// three RAMs through their single ports: luminance RAM read only, edge RAM
// read/write, object RAM write only. start_* are one-cycle pulses, *_done are
// one-cycle pulses. All RAM words are expected at the end of the cycle in
// which the address is presented (falling-edge RAMs).
// The start pixel's value (find_pix_fsm) and the curve length
// (extract_curve_fsm) are not needed by this unit and are left unused.
module image_processor
  import caricatron_pkg::*;
#(
  parameter int unsigned IMG_W       = 320,
  parameter int unsigned IMG_H       = 240,
  parameter int unsigned MAX_OBJECTS = 2048
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start_convolution,
  input  logic        start_curves,
  input  logic [7:0]  threshold,
  output logic        convolution_done,
  output logic        curves_done,
  output logic [16:0] ram_y_address,
  input  logic [7:0]  ram_y_out,
  output logic [16:0] ram_edges_address,
  output logic        ram_edges_write,
  output logic [15:0] ram_edges_data,
  input  logic [15:0] ram_edges_out,
  output logic [10:0] ram_objects_address,
  output logic        ram_objects_write,
  output logic [67:0] ram_objects_data,
  output logic [11:0] num_objects
);
  logic        conv_go, conv_done, fz, mac_clear, mac_en, conv_we;
  logic [7:0]  rom_addr, sample;
  logic [15:0] coef, mac_result;
  logic [16:0] conv_e_addr, find_e_addr;
  logic        find_go, find_resume, found, exhausted;
  pix_t        start_pix;
  logic [15:0] start_val;
  logic        ext_go, ext_done, ext_we;
  pix_t        ext_addr;
  logic [15:0] ext_wdata;
  curve_t      curve, obj;
  logic [16:0] ext_len;

  convolve_fsm #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_conv (
    .clk, .reset, .start(conv_go), .done(conv_done), .y_addr(ram_y_address),
    .rom_addr, .force_zero(fz), .mac_clear, .mac_en, .e_addr(conv_e_addr), .e_we(conv_we));
  log_rom    u_rom (.clk, .addr(rom_addr), .data(coef));
  force_zero u_fz  (.clk, .din(ram_y_out), .zero(fz), .dout(sample));
  mac_slow   u_mac (.clk, .clear(mac_clear), .en(mac_en), .a(sample), .b(coef), .result(mac_result));

  find_pix_fsm #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_find (
    .clk, .reset, .start(find_go), .resume(find_resume), .thresh(threshold),
    .e_addr(find_e_addr), .e_data(ram_edges_out), .found, .start_pix, .start_val, .exhausted);

  extract_curve_fsm #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ext (
    .clk, .reset, .start(ext_go), .start_pix, .thresh(threshold), .e_addr(ext_addr),
    .e_we(ext_we), .e_wdata(ext_wdata), .e_data(ram_edges_out), .done(ext_done),
    .curve, .length(ext_len));

  major_filtering_fsm #(.MAX_OBJECTS(MAX_OBJECTS)) u_major (
    .clk, .reset, .start_conv(start_convolution), .start_curves,
    .conv_done_out(convolution_done), .curves_done,
    .conv_go, .conv_done, .conv_e_addr, .conv_e_we(conv_we), .conv_e_wdata(mac_result),
    .find_go, .find_resume, .find_found(found), .find_exhausted(exhausted), .find_e_addr,
    .ext_go, .ext_done, .ext_curve(curve), .ext_e_addr(ext_addr), .ext_e_we(ext_we),
    .ext_e_wdata(ext_wdata),
    .ram_e_addr(ram_edges_address), .ram_e_we(ram_edges_write), .ram_e_wdata(ram_edges_data),
    .ram_o_addr(ram_objects_address), .ram_o_we(ram_objects_write), .ram_o_data(obj),
    .num_objects);

  assign ram_objects_data = obj;
endmodule
