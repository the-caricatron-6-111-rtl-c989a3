// Start-pixel search for curve extraction. Scans the edge RAM in raster
// order (x fastest) from the top-left corner, one pixel per clock. When a
// pixel is an edge (positive and above thresh) its eight neighbours are read
// one per clock; if any neighbour inside the image is also an edge, the
// pixel is reported with a one-cycle found pulse and start_pix/start_val,
// and the search pauses there. resume continues from that same pixel (by
// then the curve follower has cleared it), start restarts at (0,0). When
// the scan passes the last pixel, exhausted pulses.
// The RAM read is combinational from the state: the address is presented
// during a cycle and the word (read on the falling edge) is used at the end
// of that cycle.
module find_pix_fsm
  import caricatron_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic        resume,
  input  logic [7:0]  thresh,
  output logic [16:0] e_addr,
  input  logic [15:0] e_data,
  output logic        found,
  output pix_t        start_pix,
  output logic [15:0] start_val,
  output logic        exhausted
);
  typedef enum logic [1:0] {F_IDLE, F_SCAN, F_NEIGH} fstate_t;
  fstate_t    st;
  pix_t       cur, nb;
  logic [2:0] k;
  logic [8:0] nx;
  logic [7:0] ny;
  logic       nb_in;

  // neighbour k: 0..7 -> offsets around the pixel
  always_comb begin
    unique case (k)
      3'd0: begin nx = cur.x - 1'b1; ny = cur.y - 1'b1; end
      3'd1: begin nx = cur.x;        ny = cur.y - 1'b1; end
      3'd2: begin nx = cur.x + 1'b1; ny = cur.y - 1'b1; end
      3'd3: begin nx = cur.x - 1'b1; ny = cur.y;        end
      3'd4: begin nx = cur.x + 1'b1; ny = cur.y;        end
      3'd5: begin nx = cur.x - 1'b1; ny = cur.y + 1'b1; end
      3'd6: begin nx = cur.x;        ny = cur.y + 1'b1; end
      default: begin nx = cur.x + 1'b1; ny = cur.y + 1'b1; end
    endcase
    nb.x   = nx;
    nb.y   = ny;
    nb_in  = (nx < 9'(IMG_W)) && (ny < 8'(IMG_H));
    e_addr = (st == F_NEIGH) ? nb : cur;
  end

  assign start_pix = cur;

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= F_IDLE;
      cur <= '0;
      k <= '0;
      found <= 1'b0;
      exhausted <= 1'b0;
      start_val <= '0;
    end else begin
      found     <= 1'b0;
      exhausted <= 1'b0;
      unique case (st)
        F_IDLE: begin
          if (start) begin
            cur <= '0;
            st  <= F_SCAN;
          end else if (resume) st <= F_SCAN;
        end
        F_SCAN: begin
          if (is_edge(e_data, thresh)) begin
            start_val <= e_data;
            k  <= '0;
            st <= F_NEIGH;
          end else if (cur.x == 9'(IMG_W - 1)) begin
            cur.x <= '0;
            if (cur.y == 8'(IMG_H - 1)) begin
              cur.y     <= '0;
              st        <= F_IDLE;
              exhausted <= 1'b1;
            end else cur.y <= cur.y + 1'b1;
          end else cur.x <= cur.x + 1'b1;
        end
        F_NEIGH: begin
          if (nb_in && is_edge(e_data, thresh)) begin
            found <= 1'b1;
            st    <= F_IDLE;
          end else if (k == 3'd7) begin
            // no edge neighbour: continue the scan after this pixel
            st <= F_SCAN;
            if (cur.x == 9'(IMG_W - 1)) begin
              cur.x <= '0;
              if (cur.y == 8'(IMG_H - 1)) begin
                cur.y     <= '0;
                st        <= F_IDLE;
                exhausted <= 1'b1;
              end else cur.y <= cur.y + 1'b1;
            end else cur.x <= cur.x + 1'b1;
          end else k <= k + 1'b1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
