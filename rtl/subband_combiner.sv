// subband_combiner: forms the complex sub bands from the four real trees.
//
// The column stage delivers, for each coefficient position, the outputs of
// the four separable trees aa, ab, ba and bb (first letter: row filter
// tree, second: column filter tree). Sums and differences turn them into
// two real and two imaginary values that belong to the two orientations
// sharing that sub-band position:
//     re1 = aa - bb    re2 = aa + bb    im1 = ab + ba    im2 = ab - ba
// Over the four sub-band kinds (LL, LH, HL, HH) this gives 8 real and 8
// imaginary sub bands: 2 low-pass and 6 directional ones of each. The usual
// 1/sqrt(2) normalisation is left to the consumer, which keeps the result
// exact integers (one bit wider than the inputs).
// Timing: one register stage; all side-band fields are delayed with it.
module subband_combiner
  import dtcwt_pkg::*;
#(
  parameter int unsigned LANES = 6,
  parameter int unsigned TAG_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [TAG_W-1:0]        in_tag,
  input  logic signed [COL_W-1:0] in_aa [LANES],
  input  logic signed [COL_W-1:0] in_ab [LANES],
  input  logic signed [COL_W-1:0] in_ba [LANES],
  input  logic signed [COL_W-1:0] in_bb [LANES],
  output logic                    out_valid,
  output logic [TAG_W-1:0]        out_tag,
  output logic signed [OUT_W-1:0] out_re1 [LANES],
  output logic signed [OUT_W-1:0] out_re2 [LANES],
  output logic signed [OUT_W-1:0] out_im1 [LANES],
  output logic signed [OUT_W-1:0] out_im2 [LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int l = 0; l < LANES; l++) begin
        out_re1[l] <= '0;
        out_re2[l] <= '0;
        out_im1[l] <= '0;
        out_im2[l] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int l = 0; l < LANES; l++) begin
          out_re1[l] <= OUT_W'(in_aa[l]) - OUT_W'(in_bb[l]);
          out_re2[l] <= OUT_W'(in_aa[l]) + OUT_W'(in_bb[l]);
          out_im1[l] <= OUT_W'(in_ab[l]) + OUT_W'(in_ba[l]);
          out_im2[l] <= OUT_W'(in_ab[l]) - OUT_W'(in_ba[l]);
        end
      end
    end
  end
endmodule
