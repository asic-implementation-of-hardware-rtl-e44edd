// column_processor: second (column) stage of the level-1 2D DTCWT.
//
// Four filter-pair units work in lockstep on the row-stage result held in
// row_output_memory. Unit aa filters the tree-a half of the rows with the
// tree-a pair (La, Ha), unit ab the tree-a half with the tree-b pair (Lb,
// Hb), unit ba the tree-b half with (La, Ha) and unit bb the tree-b half
// with (Lb, Hb): four pairs, eight column filters. Each unit is a LANES x 2
// systolic array, so LANES (6) adjacent columns are filtered at once, the
// same way the row stage filters six rows.
//
// The column stage overlaps the row stage. After start, the data control
// unit walks the output rows m = 0..N/2-1 and, for each, the column tiles
// c0 = 0, 6, 12, ... (< N) and six phases, driving the memory read
// positions 2m-4+p and 2m+p. Window m reads rows up to min(N-1, 2m+5), so it
// is issued only when rows_avail (rows of the frame the row stage has
// completely written) has reached min(N, 2m+6); until then the stage waits
// at the window boundary (wait_rows). With tiles of six rows this lets the
// first column windows run as soon as the first row tile is done.
//
// The low-pass result of a window appears one cycle before the high-pass
// one; both are sent on one output stream: out_valid with out_high (0 =
// column low pass, 1 = high pass), out_col (first column of the tile), out_m
// (output row) and one value per lane of every unit. Lanes whose column is
// >= N carry nothing useful. out_col is a multiple of LANES, so with six
// lanes its low bit is always zero. busy is high from start until done, which
// pulses with the last result. A window takes six issue cycles; results lag
// 7 (low) and 8 (high) cycles behind the first cycle of their window.
module column_processor
  import dtcwt_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned LANES = 6,
  localparam int unsigned RI_W  = $clog2(N),
  localparam int unsigned M_W   = $clog2(N / 2),
  localparam int unsigned POS_W = $clog2(N) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(N+1)-1:0]  rows_avail,
  output logic                    wait_rows,
  output logic                    busy,
  output logic                    done,
  // read side of the row output memory
  output logic [RI_W-1:0]         rd_col,
  output logic signed [POS_W-1:0] pos_m,
  output logic signed [POS_W-1:0] pos_l,
  output logic                    l_zero,
  input  logic signed [ROW_W-1:0] rd_m [2][LANES],
  input  logic signed [ROW_W-1:0] rd_l [2][LANES],
  // result stream
  output logic                    out_valid,
  output logic                    out_high,
  output logic [RI_W-1:0]         out_col,
  output logic [M_W-1:0]          out_m,
  output logic signed [COL_W-1:0] out_aa [LANES],
  output logic signed [COL_W-1:0] out_ab [LANES],
  output logic signed [COL_W-1:0] out_ba [LANES],
  output logic signed [COL_W-1:0] out_bb [LANES]
);
  localparam int unsigned TAG_W = RI_W + M_W;

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN} cstate_e;
  cstate_e state;

  logic [RI_W-1:0] col;
  logic [M_W-1:0]  m;
  logic [2:0]      phase;
  logic            issue, issue_first, issue_last, last_win, last_col, rows_ok;

  logic signed [COL_W-1:0] y_aa [2][LANES];
  logic signed [COL_W-1:0] y_ab [2][LANES];
  logic signed [COL_W-1:0] y_ba [2][LANES];
  logic signed [COL_W-1:0] y_bb [2][LANES];
  logic                    v_aa [2];
  logic                    v_ab [2];
  logic                    v_ba [2];
  logic                    v_bb [2];
  logic [TAG_W-1:0]        t_aa [2];
  logic [TAG_W-1:0]        t_ab [2];
  logic [TAG_W-1:0]        t_ba [2];
  logic [TAG_W-1:0]        t_bb [2];

  always_comb begin
    rows_ok     = (32'(rows_avail) >= ((2 * 32'(m) + SEG_CYC < N) ? 2 * 32'(m) + SEG_CYC : N));
    wait_rows   = (state == C_RUN) && (phase == 3'd0) && !rows_ok;
    issue       = (state == C_RUN) && !wait_rows;
    issue_first = (phase == 3'd0);
    issue_last  = (phase == 3'(SEG_CYC - 1));
    last_win    = (m == M_W'(N / 2 - 1));
    last_col    = (32'(col) + LANES >= N);
    rd_col      = col;
    pos_m       = POS_W'(2 * int'(m) - WIN_OFF + int'(phase));
    pos_l       = POS_W'(2 * int'(m) + int'(phase));
    l_zero      = (phase < 3'(L_LEAD));
    busy        = (state != C_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      col   <= '0;
      m     <= '0;
      phase <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          state <= C_RUN;
          col   <= '0;
          m     <= '0;
          phase <= '0;
        end
        C_RUN: if (issue) begin
          if (issue_last) begin
            phase <= '0;
            col   <= last_col ? '0 : col + RI_W'(LANES);
            if (last_col) begin
              if (last_win) state <= C_DRAIN;
              else          m     <= m + 1'b1;
            end
          end else begin
            phase <= phase + 1'b1;
          end
        end
        default: if (done) state <= C_IDLE;
      endcase
    end
  end

  // last high-pass result of the last window ends the frame
  localparam int unsigned LAST_COL = ((N - 1) / LANES) * LANES;
  assign done = (state == C_DRAIN) && v_aa[1] && t_aa[1] == {RI_W'(LAST_COL), M_W'(N / 2 - 1)};

  systolic_array #(.LANES(LANES), .FILTERS(2), .FILT_BASE(int'(FILT_LA)), .DATA_W(ROW_W),
                   .ACC_W(COL_W), .TAG_W(TAG_W)) u_aa (
    .clk, .rst_n, .in_valid(issue), .in_first(issue_first), .in_last(issue_last),
    .in_phase(phase), .in_tag({col, m}), .in_xm(rd_m[0]), .in_xl(rd_l[0]),
    .y(y_aa), .y_valid(v_aa), .y_tag(t_aa));

  systolic_array #(.LANES(LANES), .FILTERS(2), .FILT_BASE(int'(FILT_LB)), .DATA_W(ROW_W),
                   .ACC_W(COL_W), .TAG_W(TAG_W)) u_ab (
    .clk, .rst_n, .in_valid(issue), .in_first(issue_first), .in_last(issue_last),
    .in_phase(phase), .in_tag({col, m}), .in_xm(rd_m[0]), .in_xl(rd_l[0]),
    .y(y_ab), .y_valid(v_ab), .y_tag(t_ab));

  systolic_array #(.LANES(LANES), .FILTERS(2), .FILT_BASE(int'(FILT_LA)), .DATA_W(ROW_W),
                   .ACC_W(COL_W), .TAG_W(TAG_W)) u_ba (
    .clk, .rst_n, .in_valid(issue), .in_first(issue_first), .in_last(issue_last),
    .in_phase(phase), .in_tag({col, m}), .in_xm(rd_m[1]), .in_xl(rd_l[1]),
    .y(y_ba), .y_valid(v_ba), .y_tag(t_ba));

  systolic_array #(.LANES(LANES), .FILTERS(2), .FILT_BASE(int'(FILT_LB)), .DATA_W(ROW_W),
                   .ACC_W(COL_W), .TAG_W(TAG_W)) u_bb (
    .clk, .rst_n, .in_valid(issue), .in_first(issue_first), .in_last(issue_last),
    .in_phase(phase), .in_tag({col, m}), .in_xm(rd_m[1]), .in_xl(rd_l[1]),
    .y(y_bb), .y_valid(v_bb), .y_tag(t_bb));

  // low- and high-pass results of one window are one cycle apart and never
  // collide, so a single stream carries both
  always_comb begin
    out_high  = v_aa[1];
    out_valid = v_aa[0] | v_aa[1];
    {out_col, out_m} = out_high ? t_aa[1] : t_aa[0];
    for (int l = 0; l < LANES; l++) begin
      out_aa[l] = y_aa[32'(out_high)][l];
      out_ab[l] = y_ab[32'(out_high)][l];
      out_ba[l] = y_ba[32'(out_high)][l];
      out_bb[l] = y_bb[32'(out_high)][l];
    end
  end

  // the four units run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (v_aa[0] == v_ab[0]) && (v_aa[0] == v_ba[0]) && (v_aa[0] == v_bb[0]) &&
    (v_aa[1] == v_ab[1]) && (v_aa[1] == v_ba[1]) && (v_aa[1] == v_bb[1]) &&
    (t_aa[1] == t_ab[1]) && (t_aa[1] == t_ba[1]) && (t_aa[1] == t_bb[1]));
endmodule
