// 640x480 VGA output at a 31.5 MHz pixel clock (72 Hz frame). Horizontal
// count 0..831 and vertical count 0..519; the first 640 x 480 counts are
// visible. Porch/sync widths are the standard 640x480@72 values
// (24/40/128 pixels, 9/3/28 lines, both syncs active low); the original
// design gives the totals. The 320x240 image is shown pixel-doubled: the RAM address is
// {hcount>>1, vcount>>1}. The RAM returns the word one clock later. The
// pixel is then held in a colour register (pix_q) for the DAC, and the DAC
// colour, blank (active low) and composite sync (active low) are registered
// on that same clock, and hsync/vsync, which go straight to the connector,
// are delayed by two further clocks to match the DAC pipeline.
// reset and run come from the 27 MHz domain and are synchronised here; while
// run is low the counters hold at zero and the outputs are blanked.
module vga_out #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_TOTAL  = 832,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 9,
  parameter int unsigned V_SYNC   = 3,
  parameter int unsigned V_TOTAL  = 520
) (
  input  logic        pix_clk,
  input  logic        reset,
  input  logic        run,
  input  logic [7:0]  im_data,
  output logic [16:0] im_addr,
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue,
  output logic        blank,    // active low, to the DAC
  output logic        sync,     // composite sync, active low, to the DAC
  output logic        hsync,    // active low, to the connector
  output logic        vsync     // active low, to the connector
);
  logic       rst_s1, rst_s2, run_s1, run_s2;
  logic [9:0] hc, vc;
  logic       vis, hs, vs;
  logic       vis_d, hs_d, vs_d;
  logic [7:0] pix_q;
  logic [1:0] hs_pipe, vs_pipe;

  always_ff @(posedge pix_clk) begin
    rst_s1 <= reset;  rst_s2 <= rst_s1;
    run_s1 <= run;    run_s2 <= run_s1;
  end

  always_ff @(posedge pix_clk) begin
    if (rst_s2 || !run_s2) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 10'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  assign vis = run_s2 && (hc < 10'(H_ACTIVE)) && (vc < 10'(V_ACTIVE));
  assign hs  = run_s2 && (hc >= 10'(H_ACTIVE + H_FP)) && (hc < 10'(H_ACTIVE + H_FP + H_SYNC));
  assign vs  = run_s2 && (vc >= 10'(V_ACTIVE + V_FP)) && (vc < 10'(V_ACTIVE + V_FP + V_SYNC));
  assign im_addr = {hc[9:1], vc[8:1]};

  always_ff @(posedge pix_clk) begin
    if (rst_s2) begin
      {vis_d, hs_d, vs_d} <= '0;
      pix_q   <= '0;
      hs_pipe <= '0;
      vs_pipe <= '0;
    end else begin
      vis_d   <= vis;
      pix_q   <= vis ? im_data : 8'd0;
      hs_d    <= hs;
      vs_d    <= vs;
      hs_pipe <= {hs_pipe[0], hs_d};
      vs_pipe <= {vs_pipe[0], vs_d};
    end
  end

  // DAC stage: the RAM word for this count, registered
  assign red   = pix_q;
  assign green = red;
  assign blue  = red;
  assign blank = vis_d;
  assign sync  = !(hs_d ^ vs_d);
  assign hsync = !hs_pipe[1];
  assign vsync = !vs_pipe[1];
endmodule
