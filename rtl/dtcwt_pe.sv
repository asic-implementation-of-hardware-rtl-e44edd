// dtcwt_pe: data-split processing element for one 10-tap filter output.
//
// The 10-tap inner product is split in two halves that run side by side:
// the MSB unit (PEM) multiplies taps 0..5 with samples 0..5, the LSB unit
// (PEL) multiplies taps 6..9 with samples 6..9. Both get one sample and one
// coefficient per cycle for six cycles; the LSB stream starts with two zero
// cycles so that both halves finish together. In the cycle after the sixth
// product (the enable E of the control sequence 0,0,0,0,0,0,1) the adder
// combines the halves into the output register Ra. A new window may start
// right after the sixth product, so one output leaves every six cycles.
//
// Interface: en/first/last qualify the sample pair (xm, xl) and coefficient
// pair (hm, hl). Timing: y and y_valid change on the edge that follows the
// cycle after 'last'; y_valid is high for one cycle per window.
module dtcwt_pe #(
  parameter int unsigned DATA_W = 9,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [DATA_W-1:0] xm,
  input  logic signed [DATA_W-1:0] xl,
  input  logic signed [COEF_W-1:0] hm,
  input  logic signed [COEF_W-1:0] hl,
  output logic signed [ACC_W-1:0]  y,
  output logic                     y_valid
);
  logic signed [ACC_W-1:0] acc_m, acc_l;
  logic                    combine;

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_pem (
    .clk, .rst_n, .en, .clr(first), .x(xm), .h(hm), .acc(acc_m));

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_pel (
    .clk, .rst_n, .en, .clr(first), .x(xl), .h(hl), .acc(acc_l));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      combine <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      combine <= en & last;
      y_valid <= combine;
      if (combine) y <= acc_m + acc_l;
    end
  end
endmodule
