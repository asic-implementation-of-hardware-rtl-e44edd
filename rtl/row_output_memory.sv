// row_output_memory: holds the row-stage (1D-DTCWT) result of a whole frame
// and serves it column by column to the column stage.
//
// Each of the N rows is stored as 2N words in the order La | Ha | Lb | Hb,
// N/2 words each: columns 0..N-1 are the tree-a ("real") half, N..2N-1 the
// tree-b ("imaginary") half. Writes come straight from the row processor:
// for each filter f with wr_valid[f], the LANES values go to rows
// wr_base[f]+lane (lanes past row N-1 are dropped), column f*N/2 + wr_m[f].
//
// Reads serve LANES adjacent columns rd_col+lane of both halves at once, at
// two row positions (pos_m for the MSB half of the processing elements,
// pos_l for the LSB half). Row positions may lie outside 0..N-1 and are
// folded back by half-sample symmetric extension, exactly as along rows.
// l_zero forces the LSB words to zero; columns past N-1 read as zero.
// Timing: write on the clock edge, read combinationally. No reset: the
// column stage reads only words the row stage has written.
module row_output_memory
  import dtcwt_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned LANES = 6,
  localparam int unsigned RI_W  = $clog2(N),
  localparam int unsigned M_W   = $clog2(N / 2),
  localparam int unsigned POS_W = $clog2(N) + 2
) (
  input  logic                    clk,
  input  logic                    wr_valid [NUM_FILT],
  input  logic [RI_W-1:0]         wr_base  [NUM_FILT],
  input  logic [M_W-1:0]          wr_m     [NUM_FILT],
  input  logic signed [ROW_W-1:0] wr_y     [NUM_FILT][LANES],
  input  logic [RI_W-1:0]         rd_col,
  input  logic signed [POS_W-1:0] pos_m,
  input  logic signed [POS_W-1:0] pos_l,
  input  logic                    l_zero,
  output logic signed [ROW_W-1:0] rd_m [2][LANES],
  output logic signed [ROW_W-1:0] rd_l [2][LANES]
);
  logic signed [ROW_W-1:0] mem [N][2*N];
  logic [RI_W-1:0] row_m, row_l;

  always_ff @(posedge clk) begin
    for (int f = 0; f < NUM_FILT; f++) begin
      if (wr_valid[f]) begin
        for (int l = 0; l < LANES; l++) begin
          if (32'(wr_base[f]) + l < N)
            mem[32'(wr_base[f]) + l][f * (N / 2) + 32'(wr_m[f])] <= wr_y[f][l];
        end
      end
    end
  end

  always_comb begin
    row_m = RI_W'(mirror(int'(pos_m), int'(N)));
    row_l = RI_W'(mirror(int'(pos_l), int'(N)));
    for (int h = 0; h < 2; h++) begin
      for (int l = 0; l < LANES; l++) begin
        if (32'(rd_col) + l < N) begin
          rd_m[h][l] = mem[row_m][h * N + 32'(rd_col) + l];
          rd_l[h][l] = l_zero ? '0 : mem[row_l][h * N + 32'(rd_col) + l];
        end else begin
          rd_m[h][l] = '0;
          rd_l[h][l] = '0;
        end
      end
    end
  end
endmodule
