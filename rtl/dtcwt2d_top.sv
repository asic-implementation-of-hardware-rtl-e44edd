// dtcwt2d_top: level-1 2D dual-tree complex wavelet transform processor.
//
// A frame of N x N 8-bit pixels streams in row by row (valid/ready). The
// row processor filters tiles of six rows with the four row filters (La,
// Ha, Lb, Hb) on a 6 x 4 systolic array and writes the decimated results
// into the row output memory (La | Ha | Lb | Hb per row). As soon as the
// first tile of rows is complete, the column processor starts filtering that
// memory six columns at a time with four filter-pair units (aa, ab, ba, bb),
// each window waiting until the rows it reads have been written; the
// sub-band combiner turns the four trees into real and imaginary parts.
// pix_ready stays low while a tile is being filtered and, after a frame's
// last pixel, until the column stage has finished that frame.
//
// Result stream, one beat per column window: out_valid, out_high (column
// filter: 0 low, 1 high pass), out_col (first column of the 6-column tile)
// and out_m (sub-band row). Lane l holds column c = out_col + l of the row
// output: c < N/2 is row low pass, otherwise row high pass, at sub-band
// column c mod N/2; lanes with c >= N are unused. For every lane four values
// are given: re1 = aa-bb, re2 = aa+bb, im1 = ab+ba, im2 = ab-ba.
// frame_done pulses with the last beat of a frame.
// Boundaries use half-sample symmetric extension (the frame padded by its
// own border pixels), row and column results are exact (no rounding).
module dtcwt2d_top
  import dtcwt_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned LANES = 6,
  localparam int unsigned RI_W  = $clog2(N),
  localparam int unsigned M_W   = $clog2(N / 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [PIX_W-1:0]        pix_data,
  output logic                    out_valid,
  output logic                    out_high,
  output logic [RI_W-1:0]         out_col,
  output logic [M_W-1:0]          out_m,
  output logic signed [OUT_W-1:0] out_re1 [LANES],
  output logic signed [OUT_W-1:0] out_re2 [LANES],
  output logic signed [OUT_W-1:0] out_im1 [LANES],
  output logic signed [OUT_W-1:0] out_im2 [LANES],
  output logic                    frame_done
);
  localparam int unsigned POS_W = $clog2(N) + 2;
  localparam int unsigned TAG_W = 1 + RI_W + M_W;

  logic                    r_valid [NUM_FILT];
  logic [RI_W-1:0]         r_base  [NUM_FILT];
  logic [M_W-1:0]          r_m     [NUM_FILT];
  logic signed [ROW_W-1:0] r_y     [NUM_FILT][LANES];
  logic                    row_done;

  logic                    col_busy, col_done, col_wait;
  logic [$clog2(N+1)-1:0]  rows_done;   // rows of the frame fully written
  logic [RI_W-1:0]         rd_col;
  logic signed [POS_W-1:0] pos_m, pos_l;
  logic                    l_zero;
  logic signed [ROW_W-1:0] rd_m [2][LANES];
  logic signed [ROW_W-1:0] rd_l [2][LANES];

  logic                    c_valid, c_high;
  logic [RI_W-1:0]         c_col;
  logic [M_W-1:0]          c_m;
  logic signed [COL_W-1:0] c_aa [LANES];
  logic signed [COL_W-1:0] c_ab [LANES];
  logic signed [COL_W-1:0] c_ba [LANES];
  logic signed [COL_W-1:0] c_bb [LANES];
  logic [TAG_W-1:0]        o_tag;

  row_processor #(.N(N), .LANES(LANES)) u_row (
    .clk, .rst_n, .frame_en(!col_busy), .pix_valid, .pix_ready, .pix_data,
    .res_valid(r_valid), .res_base(r_base), .res_m(r_m), .res_y(r_y),
    .frame_done(row_done));

  row_output_memory #(.N(N), .LANES(LANES)) u_mem (
    .clk, .wr_valid(r_valid), .wr_base(r_base), .wr_m(r_m), .wr_y(r_y),
    .rd_col, .pos_m, .pos_l, .l_zero, .rd_m, .rd_l);

  column_processor #(.N(N), .LANES(LANES)) u_col (
    .clk, .rst_n, .start(rows_done != '0), .rows_avail(rows_done), .wait_rows(col_wait),
    .busy(col_busy), .done(col_done),
    .rd_col, .pos_m, .pos_l, .l_zero, .rd_m, .rd_l,
    .out_valid(c_valid), .out_high(c_high), .out_col(c_col), .out_m(c_m),
    .out_aa(c_aa), .out_ab(c_ab), .out_ba(c_ba), .out_bb(c_bb));

  subband_combiner #(.LANES(LANES), .TAG_W(TAG_W)) u_comb (
    .clk, .rst_n, .in_valid(c_valid), .in_tag({c_high, c_col, c_m}),
    .in_aa(c_aa), .in_ab(c_ab), .in_ba(c_ba), .in_bb(c_bb),
    .out_valid, .out_tag(o_tag), .out_re1, .out_re2, .out_im1, .out_im2);

  assign {out_high, out_col, out_m} = o_tag;

  // the row stage's end of frame is the update that completes the last rows
  a_frame_rows: assert property (@(posedge clk) disable iff (!rst_n)
    row_done |=> rows_done == ($clog2(N+1))'(N));

  // a tile's rows are complete when its last Hb result has been written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_done  <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= col_done;
      if (col_done)
        rows_done <= '0;
      else if (r_valid[NUM_FILT-1] && r_m[NUM_FILT-1] == M_W'(N / 2 - 1))
        rows_done <= (32'(r_base[NUM_FILT-1]) + LANES >= N) ? ($clog2(N+1))'(N)
                                                          : ($clog2(N+1))'(32'(r_base[NUM_FILT-1]) + LANES);
    end
  end
endmodule
