// Running maximum of one pixel coordinate (MaxX with W=9, MaxY with W=8).
// clear sets the maximum to zero; each clock with en high keeps the larger
// of the stored maximum and val. Used to place the control points of an
// extracted curve. Registered output.
module max_track #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] val,
  output logic [W-1:0] max
);
  always_ff @(posedge clk) begin
    if (clear)                 max <= '0;
    else if (en && val > max)  max <= val;
  end
endmodule
