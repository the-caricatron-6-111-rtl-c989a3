// PostScript generator for the extracted curves. On start it emits a short
// prolog that defines a 'curve' procedure and flips the y axis so image
// rows grow downwards, then for each of the num_objects curve objects in the
// object RAM one line
//     x0 y0 x1 y1 x2 y2 x3 y3 curve
// (start point, first and second control point, end point, decimal, no
// leading zeros), and finally "showpage". 'curve' moves to the start point
// and draws a cubic Bezier with curveto. Characters leave on a valid/ready
// stream (ch_valid/ch/ch_ready) that feeds spp_port. The object RAM word is
// read with the address presented during one cycle and used at its end.
// done pulses once the last character has been accepted. The text of the
// prolog is this design's; the original design specifies the prolog/curve structure.
module ps_printer
  import caricatron_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [11:0] num_objects,
  output logic [10:0] o_addr,
  input  curve_t      o_data,
  output logic        done,
  output logic        ch_valid,
  output logic [7:0]  ch,
  input  logic        ch_ready
);
  localparam int unsigned PROLOG_N = 80;
  localparam int unsigned CURVE_N  = 6;
  localparam int unsigned END_N    = 9;
  localparam logic [8*PROLOG_N-1:0] PROLOG =
    "%!PS\n/curve { 8 -2 roll moveto curveto stroke } def\n72 720 translate 1 -1 scale\n";
  localparam logic [8*CURVE_N-1:0]  CURVEW = "curve\n";
  localparam logic [8*END_N-1:0]    ENDW   = "showpage\n";

  typedef enum logic [2:0] {T_IDLE, T_PROLOG, T_FETCH, T_NUM, T_WORD, T_END} tstate_t;
  tstate_t     st;
  logic [6:0]  idx;        // character index inside a fixed string
  logic [11:0] obj;        // object being printed
  curve_t      cv;
  logic [2:0]  field;      // coordinate 0..7
  logic [1:0]  dig;        // 0: hundreds, 1: tens, 2: units, 3: space
  logic [8:0]  val;
  logic [3:0]  d100, d10, d1;
  logic        skip;       // leading zero not printed

  assign o_addr = obj[10:0];

  always_comb begin
    unique case (field)
      3'd0: val = cv.p_start.x;
      3'd1: val = {1'b0, cv.p_start.y};
      3'd2: val = cv.ctrl1.x;
      3'd3: val = {1'b0, cv.ctrl1.y};
      3'd4: val = cv.ctrl2.x;
      3'd5: val = {1'b0, cv.ctrl2.y};
      3'd6: val = cv.p_end.x;
      default: val = {1'b0, cv.p_end.y};
    endcase
    d100 = 4'(val / 9'd100);
    d10  = 4'((val / 9'd10) % 9'd10);
    d1   = 4'(val % 9'd10);
    skip = (dig == 2'd0 && d100 == 0) || (dig == 2'd1 && d100 == 0 && d10 == 0);
    ch_valid = 1'b0;
    ch       = 8'h20;
    unique case (st)
      T_PROLOG: begin ch_valid = 1'b1; ch = PROLOG[8*(PROLOG_N-1-int'(idx)) +: 8]; end
      T_WORD:   begin ch_valid = 1'b1; ch = CURVEW[8*(CURVE_N-1-int'(idx)) +: 8]; end
      T_END:    begin ch_valid = 1'b1; ch = ENDW[8*(END_N-1-int'(idx)) +: 8]; end
      T_NUM: begin
        ch_valid = !skip;
        unique case (dig)
          2'd0: ch = 8'h30 + 8'(d100);
          2'd1: ch = 8'h30 + 8'(d10);
          2'd2: ch = 8'h30 + 8'(d1);
          default: ch = 8'h20;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= T_IDLE;
      {idx, obj, field, dig, done} <= '0;
      cv <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        T_IDLE: if (start) begin
          idx <= '0;
          obj <= '0;
          st  <= T_PROLOG;
        end
        T_PROLOG: if (ch_ready) begin
          if (idx == 7'(PROLOG_N - 1)) begin
            idx <= '0;
            st  <= (num_objects == 0) ? T_END : T_FETCH;
          end else idx <= idx + 1'b1;
        end
        T_FETCH: begin
          cv    <= o_data;
          field <= '0;
          dig   <= '0;
          st    <= T_NUM;
        end
        T_NUM: if (skip || ch_ready) begin
          dig <= dig + 1'b1;
          if (dig == 2'd3) begin
            field <= field + 1'b1;
            if (field == 3'd7) begin
              idx <= '0;
              st  <= T_WORD;
            end
          end
        end
        T_WORD: if (ch_ready) begin
          if (idx == 7'(CURVE_N - 1)) begin
            idx <= '0;
            obj <= obj + 1'b1;
            st  <= (obj + 1'b1 == num_objects) ? T_END : T_FETCH;
          end else idx <= idx + 1'b1;
        end
        T_END: if (ch_ready) begin
          if (idx == 7'(END_N - 1)) begin
            done <= 1'b1;
            st   <= T_IDLE;
          end else idx <= idx + 1'b1;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
