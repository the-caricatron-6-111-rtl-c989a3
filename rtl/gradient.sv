// Smallest gradient among three candidate pixels. The candidates are
// streamed in (in_valid for each); the module keeps the last three and
// reports the one whose value differs least from ref_val, the value of the
// current pixel given separately (absolute difference of the signed values;
// ties go to the earlier candidate). Outputs are combinational from the
// stored entries and ref_val.
module gradient
  import caricatron_pkg::*;
(
  input  logic        clk,
  input  logic        in_valid,
  input  pix_t        in_pix,
  input  logic [15:0] in_val,
  input  logic [15:0] ref_val,
  output pix_t        min_pix,
  output logic [15:0] min_val
);
  pix_t        pix [3];
  logic [15:0] val [3];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      pix[0] <= pix[1];  val[0] <= val[1];
      pix[1] <= pix[2];  val[1] <= val[2];
      pix[2] <= in_pix;  val[2] <= in_val;
    end
  end

  always_comb begin
    logic [17:0] g, best;
    min_pix = pix[0];
    min_val = val[0];
    best    = grad(val[0], ref_val);
    for (int i = 1; i < 3; i++) begin
      g = grad(val[i], ref_val);
      if (g < best) begin
        best    = g;
        min_pix = pix[i];
        min_val = val[i];
      end
    end
  end
endmodule
