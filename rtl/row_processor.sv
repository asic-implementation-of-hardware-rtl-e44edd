// row_processor: first (row) stage of the level-1 2D DTCWT.
//
// The frame of N x N unsigned pixels arrives row by row on a valid/ready
// stream. It is cut into tiles of LANES (6) rows; the last tile holds the
// remaining N mod 6 rows when N is not a multiple of 6. A tile is first
// loaded into the tile buffer (pix_ready high), then filtered (pix_ready
// low): for each output position m = 0..N/2-1 the data control unit walks
// the six phases of the window, reading samples 2m-4+p (MSB half) and 2m+p
// (LSB half, zero for p<2) of every row of the tile, and the LANES x 4
// systolic array applies La, Ha, Lb and Hb at once. Every filter output is
// thus decimated by two. Filtering a tile takes 3N cycles; the next tile is
// loaded while the array drains.
//
// Results leave per filter f (0=La, 1=Ha, 2=Lb, 3=Hb): res_valid[f] with
// the tile's first row res_base[f], output position res_m[f] and one value
// per lane; lanes whose row is >= N carry nothing useful. frame_done pulses
// once when the last result of the frame has left. frame_en gates the start
// of a new frame (it is sampled only before the first pixel of a frame).
// Latency: filter f result of a window is valid 7+f cycles after the first
// cycle of that window.
module row_processor
  import dtcwt_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned LANES = 6,
  localparam int unsigned RI_W = $clog2(N),
  localparam int unsigned M_W  = $clog2(N / 2),
  localparam int unsigned POS_W = $clog2(N) + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   frame_en,
  input  logic                   pix_valid,
  output logic                   pix_ready,
  input  logic [PIX_W-1:0]       pix_data,
  output logic                   res_valid [NUM_FILT],
  output logic [RI_W-1:0]        res_base  [NUM_FILT],
  output logic [M_W-1:0]         res_m     [NUM_FILT],
  output logic signed [ROW_W-1:0] res_y    [NUM_FILT][LANES],
  output logic                   frame_done
);
  localparam int unsigned DATA_W = PIX_W + 1;
  localparam int unsigned TAG_W  = RI_W + M_W;

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [RI_W-1:0]          base;       // first row of the current tile
  logic [$clog2(LANES)-1:0] ld_lane;
  logic [RI_W-1:0]          ld_col;
  logic [M_W-1:0]           m;
  logic [2:0]               phase;
  logic                     in_frame;   // a frame has started
  logic                     last_tile;
  logic [$clog2(LANES)-1:0] tile_rows_m1;
  logic                     issue, issue_first, issue_last, end_of_tile;
  logic signed [POS_W-1:0]  pos_m, pos_l;
  logic signed [DATA_W-1:0] xm [LANES];
  logic signed [DATA_W-1:0] xl [LANES];
  logic [TAG_W-1:0]         y_tag [NUM_FILT];
  logic                     wr;

  always_comb begin
    last_tile    = (32'(base) + LANES >= N);
    tile_rows_m1 = last_tile ? $clog2(LANES)'(N - 32'(base) - 1) : $clog2(LANES)'(LANES - 1);
    pix_ready    = (state == S_LOAD) && (in_frame || frame_en);
    wr           = pix_valid && pix_ready;
    issue        = (state == S_RUN);
    issue_first  = (phase == 3'd0);
    issue_last   = (phase == 3'(SEG_CYC - 1));
    end_of_tile  = issue && issue_last && (m == M_W'(N / 2 - 1));
    pos_m        = POS_W'(2 * int'(m) - WIN_OFF + int'(phase));
    pos_l        = POS_W'(2 * int'(m) + int'(phase));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      base     <= '0;
      ld_lane  <= '0;
      ld_col   <= '0;
      m        <= '0;
      phase    <= '0;
      in_frame <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (wr) begin
          in_frame <= 1'b1;
          if (ld_col == RI_W'(N - 1)) begin
            ld_col <= '0;
            if (ld_lane == tile_rows_m1) begin
              ld_lane <= '0;
              state   <= S_RUN;
            end else begin
              ld_lane <= ld_lane + 1'b1;
            end
          end else begin
            ld_col <= ld_col + 1'b1;
          end
        end
        S_RUN: begin
          if (issue_last) begin
            phase <= '0;
            m     <= m + 1'b1;
          end else begin
            phase <= phase + 1'b1;
          end
          if (end_of_tile) begin
            m <= '0;
            if (last_tile) begin
              state <= S_DRAIN;
            end else begin
              base  <= base + RI_W'(LANES);
              state <= S_LOAD;
            end
          end
        end
        default: begin // S_DRAIN: wait for the last (Hb) result of the frame
          if (res_valid[NUM_FILT-1] && res_base[NUM_FILT-1] == base &&
              res_m[NUM_FILT-1] == M_W'(N / 2 - 1)) begin
            state    <= S_LOAD;
            base     <= '0;
            in_frame <= 1'b0;
          end
        end
      endcase
    end
  end

  assign frame_done = (state == S_DRAIN) && res_valid[NUM_FILT-1] &&
                      res_base[NUM_FILT-1] == base && res_m[NUM_FILT-1] == M_W'(N / 2 - 1);

  tile_buffer #(.N(N), .LANES(LANES), .DATA_W(DATA_W)) u_tile (
    .clk, .wr_en(wr), .wr_lane(ld_lane), .wr_col(ld_col), .wr_data(pix_data),
    .pos_m, .pos_l, .l_zero(phase < 3'(L_LEAD)), .rd_m(xm), .rd_l(xl));

  systolic_array #(.LANES(LANES), .FILTERS(NUM_FILT), .FILT_BASE(0),
                   .DATA_W(DATA_W), .ACC_W(ROW_W), .TAG_W(TAG_W)) u_sa (
    .clk, .rst_n,
    .in_valid(issue), .in_first(issue_first), .in_last(issue_last),
    .in_phase(phase), .in_tag({base, m}), .in_xm(xm), .in_xl(xl),
    .y(res_y), .y_valid(res_valid), .y_tag);

  for (genvar f = 0; f < NUM_FILT; f++) begin : g_tag
    assign res_base[f] = y_tag[f][TAG_W-1:M_W];
    assign res_m[f]    = y_tag[f][M_W-1:0];
  end
endmodule
