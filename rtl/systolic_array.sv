// systolic_array: LANES x FILTERS array of data-split processing elements.
//
// Each lane is one image line (a row in the row stage, a column in the column
// stage); all lanes are processed in parallel and share the control. Each
// array column is one filter; its coefficients come from the filter table in
// dtcwt_pkg, filter FILT_BASE + f for array column f. The sample pair of
// every lane, together with the control (valid, first, last, phase) and a
// free-form tag, enters array column 0 and moves one register per cycle to
// the next column, so filter f sees a window one cycle after filter f-1 and
// answers one cycle later. The tag rides along with the window and comes out
// with its result, which lets the caller know where to put it.
//
// Timing: a window presented in cycles t..t+5 (first at t, last at t+5)
// yields y[f][*] with y_valid[f] high in cycle t+7+f. One window per six
// cycles per filter, LANES*FILTERS outputs per window.
module systolic_array
  import dtcwt_pkg::*;
#(
  parameter int unsigned LANES     = 6,
  parameter int unsigned FILTERS   = 4,
  parameter int unsigned FILT_BASE = 0,
  parameter int unsigned DATA_W    = PIX_W + 1,
  parameter int unsigned ACC_W     = ROW_W,
  parameter int unsigned TAG_W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [2:0]               in_phase,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [DATA_W-1:0] in_xm [LANES],
  input  logic signed [DATA_W-1:0] in_xl [LANES],
  output logic signed [ACC_W-1:0]  y     [FILTERS][LANES],
  output logic                     y_valid [FILTERS],
  output logic [TAG_W-1:0]         y_tag   [FILTERS]
);
  // per-column view of the travelling stream
  logic                     s_valid [FILTERS];
  logic                     s_first [FILTERS];
  logic                     s_last  [FILTERS];
  logic [2:0]               s_phase [FILTERS];
  logic [TAG_W-1:0]         s_tag   [FILTERS];
  logic signed [DATA_W-1:0] s_xm    [FILTERS][LANES];
  logic signed [DATA_W-1:0] s_xl    [FILTERS][LANES];
  logic [TAG_W-1:0]         tag_hold [FILTERS];
  logic                     pe_valid [FILTERS][LANES];

  always_comb begin
    s_valid[0] = in_valid;
    s_first[0] = in_first;
    s_last[0]  = in_last;
    s_phase[0] = in_phase;
    s_tag[0]   = in_tag;
    s_xm[0]    = in_xm;
    s_xl[0]    = in_xl;
  end

  for (genvar f = 1; f < FILTERS; f++) begin : g_skew
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_valid[f] <= 1'b0;
        s_first[f] <= 1'b0;
        s_last[f]  <= 1'b0;
        s_phase[f] <= '0;
        s_tag[f]   <= '0;
        for (int l = 0; l < LANES; l++) begin
          s_xm[f][l] <= '0;
          s_xl[f][l] <= '0;
        end
      end else begin
        s_valid[f] <= s_valid[f-1];
        s_first[f] <= s_first[f-1];
        s_last[f]  <= s_last[f-1];
        s_phase[f] <= s_phase[f-1];
        s_tag[f]   <= s_tag[f-1];
        s_xm[f]    <= s_xm[f-1];
        s_xl[f]    <= s_xl[f-1];
      end
    end
  end

  for (genvar f = 0; f < FILTERS; f++) begin : g_filt
    coef_t hm, hl;
    always_comb begin
      hm = coef_m(FILT_BASE + f, 32'(s_phase[f]));
      hl = coef_l(FILT_BASE + f, 32'(s_phase[f]));
    end

    // the tag is captured with the last sample and released with the result
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tag_hold[f] <= '0;
        y_tag[f]    <= '0;
      end else begin
        if (s_valid[f] && s_last[f]) tag_hold[f] <= s_tag[f];
        y_tag[f] <= tag_hold[f];
      end
    end

    for (genvar l = 0; l < LANES; l++) begin : g_lane
      dtcwt_pe #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_pe (
        .clk, .rst_n,
        .en(s_valid[f]), .first(s_first[f]), .last(s_last[f]),
        .xm(s_xm[f][l]), .xl(s_xl[f][l]), .hm, .hl,
        .y(y[f][l]), .y_valid(pe_valid[f][l]));
    end

    assign y_valid[f] = pe_valid[f][0];
  end
endmodule
