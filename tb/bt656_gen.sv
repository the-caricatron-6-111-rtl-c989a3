// Behavioural model of a video decoder's ITU-R BT.656 output for
// testbenches. Each line is EAV (3FF 000 000 XY), HBLANK blanking samples,
// SAV, then ACTIVE samples Cb Y Cr Y ... Each field has VBLANK blanking
// lines (V=1) followed by LINES active lines; field 1 has F=0, field 2 F=1.
// The luminance of sample n (0-based luma index) on active line l of
// field f is luma(n, l, f), kept inside 16..235 so no timing code can be
// mimicked. Chrominance is 128. Samples are 8 bits placed in [9:2].
module bt656_gen #(
  parameter int ACTIVE = 1440,
  parameter int HBLANK = 268,
  parameter int LINES  = 243,
  parameter int VBLANK = 19,
  parameter int SEED   = 0
) (
  input  logic       clk,
  output logic [9:0] data
);
  int s = 0, line = 0, field = 0;
  localparam int LINE_LEN = 8 + HBLANK + ACTIVE;

  function automatic logic [7:0] xy(input bit f, input bit v, input bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  function automatic logic [7:0] luma(input int n, input int l, input int f);
    return 8'(16 + ((n * 3 + l * 5 + f * 17 + SEED * 31 + ((n / 16) * (l / 8) * 7)) % 220));
  endfunction

  always @(posedge clk) begin
    logic [7:0] b;
    bit v;
    int p;
    v = (line < VBLANK);
    p = s;
    if (p < 4)                  b = (p == 0) ? 8'hFF : (p == 3) ? xy(field[0], v, 1'b1) : 8'h00;
    else if (p < 4 + HBLANK)    b = ((p - 4) % 2 == 0) ? 8'h80 : 8'h10;
    else if (p < 8 + HBLANK) begin
      p = p - 4 - HBLANK;
      b = (p == 0) ? 8'hFF : (p == 3) ? xy(field[0], v, 1'b0) : 8'h00;
    end else begin
      p = p - 8 - HBLANK;
      if (v) b = (p % 2 == 0) ? 8'h80 : 8'h10;
      else   b = (p % 2 == 0) ? 8'h80 : luma(p / 2, line - VBLANK, field);
    end
    data <= {b, 2'b00};
    if (s == LINE_LEN - 1) begin
      s <= 0;
      if (line == VBLANK + LINES - 1) begin
        line  <= 0;
        field <= 1 - field;
      end else line <= line + 1;
    end else s <= s + 1;
  end
endmodule
