// Frame grabber for an ITU-R BT.656 stream (Cb Y Cr Y ... with embedded
// timing codes 3FF 000 000 XY). On a capture pulse it first waits for the
// end-of-active-video code of a field-1 vertical-blanking line (XY = B6),
// then for the start-of-active-video code of an active field-1 line
// (XY = 80). After that code the first sample is chrominance; samples 1, 5,
// 9, ... (every other luminance value) are written to the luminance RAM at
// {x,y} until XMAX values are stored. It then waits for the next
// start-of-active-video code and repeats until YMAX lines are stored, then
// pulses done. Codes are compared on the upper eight bits of the 10-bit
// samples. The RAM write (we, addr, ram_data) is issued one cycle after the
// sample arrives. Field/line choice and the sample pattern follow the original design;
// the state encoding is this design's.
// The two fractional bits of each 10-bit sample are not used.
module capture_video #(
  parameter int unsigned XMAX = 320,
  parameter int unsigned YMAX = 240
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        capture,
  input  logic [9:0]  vid,
  output logic        done,
  output logic [16:0] addr,
  output logic        we,
  output logic [7:0]  ram_data
);
  typedef enum logic [1:0] {C_IDLE, C_FIND_BLANK, C_FIND_SAV, C_GRAB} cstate_t;
  cstate_t     st;
  logic [7:0]  h1, h2, h3;       // previous three samples (upper 8 bits)
  logic [1:0]  phase;            // sample position within a group of four
  logic [8:0]  x;
  logic [7:0]  y;
  logic        tag;

  // a timing code ends with the current sample
  assign tag = (h3 == 8'hFF) && (h2 == 8'h00) && (h1 == 8'h00);

  always_ff @(posedge clk) begin
    h1 <= vid[9:2];
    h2 <= h1;
    h3 <= h2;
    if (reset) begin
      st   <= C_IDLE;
      we   <= 1'b0;
      done <= 1'b0;
      x    <= '0;
      y    <= '0;
      phase <= '0;
      addr <= '0;
      ram_data <= '0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (capture) begin
          st <= C_FIND_BLANK;
          y  <= '0;
        end
        C_FIND_BLANK: if (tag && vid[9:2] == 8'hB6) st <= C_FIND_SAV;
        C_FIND_SAV: if (tag && vid[9:2] == 8'h80) begin
          st    <= C_GRAB;
          x     <= '0;
          phase <= '0;
        end
        C_GRAB: begin
          phase <= phase + 1'b1;
          if (phase == 2'd1) begin
            we       <= 1'b1;
            addr     <= {x, y};
            ram_data <= vid[9:2];
            if (x == 9'(XMAX - 1)) begin
              if (y == 8'(YMAX - 1)) begin
                st   <= C_IDLE;
                done <= 1'b1;
              end else begin
                st <= C_FIND_SAV;
                y  <= y + 1'b1;
              end
            end else begin
              x <= x + 1'b1;
            end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
