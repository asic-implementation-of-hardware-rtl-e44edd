// tile_buffer: intermediate memory for one tile of LANES image rows.
//
// The row stage works on tiles of LANES (6) rows of N pixels. Pixels are
// written one at a time at (wr_lane, wr_col). On the read side all lanes
// are read at the same two window positions every cycle: pos_m for the MSB
// half of the processing elements and pos_l for the LSB half. Positions are
// signed and may lie up to N outside the row; they are folded back with
// half-sample symmetric extension (x[-1]=x[0], x[N]=x[N-1], ...), which is
// the one-pixel border padding of the frame carried on as far as a 10-tap
// window needs. l_zero forces the LSB samples to zero (its two lead-in
// cycles). Pixels leave as signed DATA_W-bit words (zero-extended), so the
// top bit of every read word is constant zero; it is kept so the systolic
// array can use one signed sample type for both stages.
// Timing: write on the clock edge, read combinationally. No reset: every
// word is written before it is read.
module tile_buffer
  import dtcwt_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned LANES  = 6,
  parameter int unsigned DATA_W = PIX_W + 1,
  localparam int unsigned COL_W_ = $clog2(N),
  localparam int unsigned POS_W  = $clog2(N) + 2
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(LANES)-1:0]  wr_lane,
  input  logic [COL_W_-1:0]         wr_col,
  input  logic [PIX_W-1:0]          wr_data,
  input  logic signed [POS_W-1:0]   pos_m,
  input  logic signed [POS_W-1:0]   pos_l,
  input  logic                      l_zero,
  output logic signed [DATA_W-1:0]  rd_m [LANES],
  output logic signed [DATA_W-1:0]  rd_l [LANES]
);
  logic [PIX_W-1:0] mem [LANES][N];
  logic [COL_W_-1:0] col_m, col_l;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_lane][wr_col] <= wr_data;
  end

  always_comb begin
    col_m = COL_W_'(mirror(int'(pos_m), int'(N)));
    col_l = COL_W_'(mirror(int'(pos_l), int'(N)));
    for (int l = 0; l < LANES; l++) begin
      rd_m[l] = DATA_W'({1'b0, mem[l][col_m]});
      rd_l[l] = l_zero ? '0 : DATA_W'({1'b0, mem[l][col_l]});
    end
  end
endmodule
