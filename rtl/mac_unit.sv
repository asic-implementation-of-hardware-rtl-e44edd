// mac_unit: signed multiply-accumulate cell.
//
// On every cycle with en=1 the product x*h is added to the running sum; with
// clr=1 the sum restarts from that product instead (first tap of a new
// window), so back-to-back windows need no idle cycle. The sum is kept at
// ACC_W bits, which the caller sizes so that a complete window cannot
// overflow. One MAC is the datapath of both halves of a processing element.
// Timing: acc shows the sum one cycle after the product's inputs.
// Reset (asynchronous, active low) clears the sum; this is a design choice.
module mac_unit #(
  parameter int unsigned DATA_W = 9,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clr,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] h,
  output logic signed [ACC_W-1:0]  acc
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  prod_a;

  always_comb begin
    prod   = PROD_W'(x) * PROD_W'(h);
    prod_a = ACC_W'(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (en)     acc <= (clr ? ACC_W'(0) : acc) + prod_a;
  end
endmodule
