// Shared types and constants of the Caricatron caricature pipeline.
// Pixels are addressed as {x,y}: x in 9 bits (0..319), y in 8 bits (0..239),
// concatenated into a 17-bit RAM address so that a RAM needs only 320*256
// locations. Edge values are 16-bit sign-magnitude numbers. A curve object is
// four such pixel addresses (start, end and two Bezier control points), 68 bits.
package caricatron_pkg;

  typedef struct packed {
    logic [8:0] x;
    logic [7:0] y;
  } pix_t;

  typedef struct packed {
    pix_t p_start;
    pix_t p_end;
    pix_t ctrl1;
    pix_t ctrl2;
  } curve_t;

  // Master controller states (also the RAM multiplexer control).
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,
    ST_GRAB       = 3'd1,
    ST_SHOW_IMAGE = 3'd2,
    ST_EDGE       = 3'd3,
    ST_SHOW_EDGES = 3'd4,
    ST_LINE       = 3'd5,
    ST_PRINT      = 3'd6
  } master_state_t;

  // An edge pixel is a positive filter output above the user threshold.
  function automatic logic is_edge(input logic [15:0] v, input logic [7:0] thresh);
    return (v[15] == 1'b0) && (v > {8'd0, thresh});
  endfunction

  // Sign-magnitude to two's complement, 17 bits.
  function automatic logic signed [16:0] sm_to_s(input logic [15:0] v);
    logic signed [16:0] m;
    m = signed'({2'b00, v[14:0]});
    return v[15] ? -m : m;
  endfunction

  // Gradient between two edge values: absolute difference.
  function automatic logic [17:0] grad(input logic [15:0] a, input logic [15:0] b);
    logic signed [17:0] d;
    d = 18'(sm_to_s(a)) - 18'(sm_to_s(b));
    return d[17] ? 18'(-d) : 18'(d);
  endfunction

endpackage
