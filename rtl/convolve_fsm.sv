// Address generator and sequencer for the 15x15 edge filter. For every
// output pixel (x,y), x fastest, starting at (0,0), it reads the 225
// luminance samples (x+i-7, y+j-7), i fastest, one per clock, together with
// ROM coefficient {j,i}. Window positions outside the image raise force_zero
// so the sample is replaced by 0. Pipeline: address and ROM address are
// registered here (cycle t), the RAM word and ROM word are registered by
// force_zero/log_rom (t+1) and the MAC adds them at the end of t+1 (mac_en is
// the issue strobe delayed by one cycle). After two drain cycles the result
// is written to the edge RAM at (x,y) in one cycle with e_we high, and
// mac_clear is raised in the same cycle. Each pixel takes 228 clocks
// (225 + 2 + 1), 76800 pixels take 17.5 M clocks at 320x240.
// start is a one-cycle pulse; done is a one-cycle pulse after the last write.
module convolve_fsm #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned K     = 15
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  output logic        done,
  output logic [16:0] y_addr,
  output logic [7:0]  rom_addr,
  output logic        force_zero,
  output logic        mac_clear,
  output logic        mac_en,
  output logic [16:0] e_addr,
  output logic        e_we
);
  localparam int R = K / 2;
  typedef enum logic [1:0] {V_IDLE, V_RUN, V_DRAIN, V_WRITE} vstate_t;

  vstate_t    st;
  logic [8:0] px;
  logic [7:0] py;
  logic [3:0] wi, wj;
  logic [1:0] drain;
  logic       issue;
  logic signed [10:0] sx, sy;

  assign sx = 11'(signed'({2'b0, px})) + 11'(signed'({7'b0, wi})) - 11'(R);
  assign sy = 11'(signed'({3'b0, py})) + 11'(signed'({7'b0, wj})) - 11'(R);

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= V_IDLE;
      {px, py, wi, wj, drain} <= '0;
      {issue, mac_en, force_zero, done} <= '0;
      mac_clear <= 1'b1;
      y_addr <= '0;
      rom_addr <= '0;
    end else begin
      done      <= 1'b0;
      mac_clear <= 1'b0;
      issue     <= 1'b0;
      mac_en    <= issue;
      unique case (st)
        V_IDLE: if (start) begin
          st <= V_RUN;
          {px, py, wi, wj} <= '0;
          mac_clear <= 1'b1;
        end
        V_RUN: begin
          issue      <= 1'b1;
          y_addr     <= {sx[8:0], sy[7:0]};
          rom_addr   <= {wj, wi};
          force_zero <= (sx < 0) || (sx >= 11'(IMG_W)) || (sy < 0) || (sy >= 11'(IMG_H));
          if (wi == 4'(K - 1)) begin
            wi <= '0;
            if (wj == 4'(K - 1)) begin
              wj    <= '0;
              st    <= V_DRAIN;
              drain <= '0;
            end else wj <= wj + 1'b1;
          end else wi <= wi + 1'b1;
        end
        V_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) st <= V_WRITE;
        end
        V_WRITE: begin
          mac_clear <= 1'b1;
          if (px == 9'(IMG_W - 1)) begin
            px <= '0;
            if (py == 8'(IMG_H - 1)) begin
              st   <= V_IDLE;
              done <= 1'b1;
            end else begin
              py <= py + 1'b1;
              st <= V_RUN;
            end
          end else begin
            px <= px + 1'b1;
            st <= V_RUN;
          end
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  assign e_addr = {px, py};
  assign e_we   = (st == V_WRITE);
endmodule
