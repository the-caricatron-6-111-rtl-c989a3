// Curve follower. From a start pixel it reads the 3x3 square around it into
// init_gradient (nine clocks), clears the start pixel in the edge RAM and
// takes the neighbour with the smallest gradient as the first step Pg. From
// then on, for each step: if Pg is inside the image and is an edge pixel it
// becomes the current pixel and is cleared in the edge RAM (so the walk
// cannot return to it); next_pixel gives the three neighbours of Pg in the
// direction of travel, they are read (three clocks) into gradient, and the
// one with the smallest gradient to the current pixel is the next Pg. When
// Pg is not an edge the walk ends. The result is {start, end, ctrl1, ctrl2}
// where end is the last edge pixel accepted and both control points are
// (largest x, largest y) over the curve, from two max_track units.
// Cost: 9 + 1 clocks to start, 5 clocks per accepted pixel, 1 to return.
// start is a one-cycle pulse; done is a one-cycle pulse with curve valid
// until the next start. RAM reads use the word at the end of the cycle in
// which the address is presented; writes store 0 at e_addr when e_we is high.
// e_wdata is always zero: the follower only ever writes to clear a pixel.
// The gradient value of init_gradient is not needed here (only the chosen
// neighbour is), so that output is left unconnected.
module extract_curve_fsm
  import caricatron_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  pix_t        start_pix,
  input  logic [7:0]  thresh,
  output pix_t        e_addr,
  output logic        e_we,
  output logic [15:0] e_wdata,
  input  logic [15:0] e_data,
  output logic        done,
  output curve_t      curve,
  output logic [16:0] length     // pixels in the last curve, start included
);
  typedef enum logic [2:0] {X_IDLE, X_INIT_READ, X_INIT_CLEAR, X_ACCEPT,
                            X_CLEAR, X_CAND_READ, X_RETURN} xstate_t;
  xstate_t     st;
  pix_t        beg, cur, prev, rd_pix, pg;
  logic [15:0] cur_val, pg_val, rd_val;
  logic [3:0]  k;
  logic        grad_sel;           // 1: first step (init_gradient)
  logic        init_v, grad_v, max_clear, max_en;
  pix_t        ig_pix, g_pix, c0, c1, c2;
  logic [15:0] ig_val, g_val;
  logic [17:0] ig_grad;
  logic [8:0]  mx;
  logic [7:0]  my;

  function automatic logic on_image(input pix_t p);
    return (p.x < 9'(IMG_W)) && (p.y < 8'(IMG_H));
  endfunction

  init_gradient u_init (.clk, .in_valid(init_v), .in_pix(rd_pix), .in_val(rd_val),
                        .min_pix(ig_pix), .min_val(ig_val), .min_grad(ig_grad));
  gradient      u_grad (.clk, .in_valid(grad_v), .in_pix(rd_pix), .in_val(rd_val),
                        .ref_val(cur_val), .min_pix(g_pix), .min_val(g_val));
  next_pixel    u_next (.prev_pix(prev), .pg(cur), .cand0(c0), .cand1(c1), .cand2(c2));
  max_track #(.W(9)) u_maxx (.clk, .clear(max_clear), .en(max_en), .val(cur.x), .max(mx));
  max_track #(.W(8)) u_maxy (.clk, .clear(max_clear), .en(max_en), .val(cur.y), .max(my));

  // read address of this cycle
  always_comb begin
    rd_pix = cur;
    if (st == X_INIT_READ) begin
      rd_pix.x = cur.x - 9'd1 + 9'(k % 4'd3);
      rd_pix.y = cur.y - 8'd1 + 8'(k / 4'd3);
    end else if (st == X_CAND_READ) begin
      rd_pix = (k == 4'd0) ? c0 : (k == 4'd1) ? c1 : c2;
    end
    rd_val = on_image(rd_pix) ? e_data : 16'd0;
    pg     = grad_sel ? ig_pix : g_pix;
    pg_val = grad_sel ? ig_val : g_val;
    e_addr = rd_pix;
    e_we   = (st == X_INIT_CLEAR) || (st == X_CLEAR);
    e_wdata = 16'd0;
    init_v = (st == X_INIT_READ);
    grad_v = (st == X_CAND_READ);
    max_en = e_we;
    max_clear = (st == X_IDLE);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= X_IDLE;
      {beg, cur, prev, cur_val, k, grad_sel, done, curve, length} <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        X_IDLE: if (start) begin
          beg  <= start_pix;
          cur  <= start_pix;
          prev <= start_pix;
          k    <= '0;
          st   <= X_INIT_READ;
        end
        X_INIT_READ: begin
          if (k == 4'd4) cur_val <= rd_val;
          if (k == 4'd8) begin
            k  <= '0;
            st <= X_INIT_CLEAR;
          end else k <= k + 1'b1;
        end
        X_INIT_CLEAR: begin
          grad_sel <= 1'b1;
          length   <= 17'd1;
          st       <= X_ACCEPT;
        end
        X_ACCEPT: begin
          if (on_image(pg) && is_edge(pg_val, thresh)) begin
            prev    <= cur;
            cur     <= pg;
            cur_val <= pg_val;
            length  <= length + 1'b1;
            st      <= X_CLEAR;
          end else st <= X_RETURN;
        end
        X_CLEAR: begin
          grad_sel <= 1'b0;
          k        <= '0;
          st       <= X_CAND_READ;
        end
        X_CAND_READ: begin
          if (k == 4'd2) begin
            k  <= '0;
            st <= X_ACCEPT;
          end else k <= k + 1'b1;
        end
        X_RETURN: begin
          curve.p_start <= beg;
          curve.p_end   <= cur;
          curve.ctrl1   <= '{x: mx, y: my};
          curve.ctrl2   <= '{x: mx, y: my};
          done          <= 1'b1;
          st            <= X_IDLE;
        end
        default: st <= X_IDLE;
      endcase
    end
  end
endmodule
