// Smallest gradient around a start pixel. The nine pixels of a 3x3 square
// are streamed in (in_valid for each, row by row, so the fifth is the
// centre). The module keeps the last nine and reports, among the eight
// neighbours, the one whose value differs least from the centre value
// (absolute difference of the signed values); ties go to the earlier pixel.
// Outputs are combinational from the nine stored entries and are valid from
// the clock after the ninth input.
module init_gradient
  import caricatron_pkg::*;
(
  input  logic        clk,
  input  logic        in_valid,
  input  pix_t        in_pix,
  input  logic [15:0] in_val,
  output pix_t        min_pix,
  output logic [15:0] min_val,
  output logic [17:0] min_grad
);
  pix_t        pix [9];
  logic [15:0] val [9];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < 8; i++) begin
        pix[i] <= pix[i+1];
        val[i] <= val[i+1];
      end
      pix[8] <= in_pix;
      val[8] <= in_val;
    end
  end

  always_comb begin
    logic [17:0] g;
    min_pix  = pix[0];
    min_val  = val[0];
    min_grad = grad(val[0], val[4]);
    for (int i = 1; i < 9; i++) begin
      if (i != 4) begin
        g = grad(val[i], val[4]);
        if (g < min_grad) begin
          min_grad = g;
          min_pix  = pix[i];
          min_val  = val[i];
        end
      end
    end
  end
endmodule
