// tb_dtcwt2d_top: end-to-end test of the 2D DTCWT processor at its default
// size (16 x 16 frames, six lanes). Three frames are sent back to back with
// random pixels (one frame of extreme values 0/255) and random gaps on the
// input; every result beat is compared against an independent reference
// (row filters, column filters of the four trees, sum/difference). It also
// counts the mechanisms the design relies on: input stalls while a tile is
// filtered, the partial last tile of rows and of columns, the symmetric
// extension at both frame edges, both column bands and a frame waiting
// while the column stage still works on the previous one.
module tb_dtcwt2d_top;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int N = 16;
  localparam int LANES = 6;
  localparam int FRAMES = 3;
  localparam int COLT = (N + LANES - 1) / LANES;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_data = 0;
  logic out_valid, out_high, frame_done;
  logic [$clog2(N)-1:0] out_col;
  logic [$clog2(N/2)-1:0] out_m;
  logic signed [OUT_W-1:0] out_re1 [LANES];
  logic signed [OUT_W-1:0] out_re2 [LANES];
  logic signed [OUT_W-1:0] out_im1 [LANES];
  logic signed [OUT_W-1:0] out_im2 [LANES];

  dtcwt2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint img [FRAMES][N][N];
  longint e_re1 [FRAMES][2][N][N/2];
  longint e_re2 [FRAMES][2][N][N/2];
  longint e_im1 [FRAMES][2][N][N/2];
  longint e_im2 [FRAMES][2][N][N/2];
  int beats [FRAMES];
  int frame_out = 0;
  int n_stall = 0, n_edge_lo = 0, n_edge_hi = 0, n_band_hi = 0, n_band_lo = 0;
  int n_part_col = 0, n_wait_col = 0, n_done = 0, n_overlap = 0, n_wait_rows = 0;
  logic row_busy = 0;   // the row stage has started a frame and not finished it

  // expected results: [frame][column band][row-output column c][sub-band row m]
  task automatic build_ref(input int fr);
    longint rowo [N][2*N];
    for (int r = 0; r < N; r++) begin
      longint line[$];
      for (int c = 0; c < N; c++) line.push_back(img[fr][r][c]);
      for (int f = 0; f < 4; f++)
        for (int m = 0; m < N/2; m++) rowo[r][f*(N/2) + m] = fir(f, line, m);
    end
    for (int c = 0; c < N; c++) begin
      longint ca[$], cb[$];
      for (int r = 0; r < N; r++) begin ca.push_back(rowo[r][c]); cb.push_back(rowo[r][N + c]); end
      for (int b = 0; b < 2; b++)
        for (int m = 0; m < N/2; m++) begin
          longint aa = fir(b, ca, m), ab = fir(2 + b, ca, m);
          longint ba = fir(b, cb, m), bb = fir(2 + b, cb, m);
          e_re1[fr][b][c][m] = aa - bb;
          e_re2[fr][b][c][m] = aa + bb;
          e_im1[fr][b][c][m] = ab + ba;
          e_im2[fr][b][c][m] = ab - ba;
        end
    end
  endtask

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // stimulus
  initial begin
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[fr][r][c] = (fr == 1) ? (((r + c) % 3 == 0) ? 255 : 0) : longint'($urandom_range(0, 255));
      build_ref(fr);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int i = 0; i < N * N; i++) begin
        // random bubbles on the input
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          pix_valid = 0;
        end
        @(negedge clk);
        pix_valid = 1;
        pix_data  = 8'(img[fr][i / N][i % N]);
        // the pixel is taken on the first rising edge with pix_ready high
        while (!pix_ready) begin
          n_stall++;
          if (dut.col_busy) n_wait_col++;
          @(negedge clk);
        end
        @(posedge clk);
      end
      @(negedge clk);
      pix_valid = 0;
    end
  end

  // result checking
  always @(posedge clk) begin
    if (rst_n && pix_valid && pix_ready) row_busy <= 1;
    if (rst_n && dut.row_done) row_busy <= 0;
    if (rst_n && dut.col_wait) n_wait_rows++;
    if (rst_n && out_valid && row_busy) n_overlap++;
    if (rst_n && out_valid) begin
      int b;
      b = int'(out_high);
      if (frame_out < FRAMES) begin
        beats[frame_out]++;
        if (out_m == 0) n_edge_lo++;
        if (int'(out_m) == N/2 - 1) n_edge_hi++;
        if (b == 1) n_band_hi++; else n_band_lo++;
        for (int l = 0; l < LANES; l++) begin
          int c;
          c = int'(out_col) + l;
          if (c < N) begin
            chk(out_re1[l], e_re1[frame_out][b][c][out_m], $sformatf("f%0d re1 b%0d c%0d m%0d", frame_out, b, c, out_m));
            chk(out_re2[l], e_re2[frame_out][b][c][out_m], "re2");
            chk(out_im1[l], e_im1[frame_out][b][c][out_m], "im1");
            chk(out_im2[l], e_im2[frame_out][b][c][out_m], "im2");
          end else if (l == LANES - 1) n_part_col++;
        end
      end
    end
    if (rst_n && frame_done) begin
      n_done++;
      checks++;
      if (beats[frame_out] != 2 * COLT * (N/2)) begin
        failures++;
        $display("frame %0d: %0d beats, expected %0d", frame_out, beats[frame_out], 2 * COLT * (N/2));
      end
      frame_out++;
      if (frame_out == FRAMES) begin
        // every mechanism must have happened
        if (n_stall == 0)   begin failures++; $display("no input stall"); end
        if (n_wait_col == 0) begin failures++; $display("no wait for the column stage"); end
        if (n_edge_lo == 0 || n_edge_hi == 0) begin failures++; $display("edge windows missing"); end
        if (n_band_lo == 0 || n_band_hi == 0) begin failures++; $display("a column band missing"); end
        if ((N % LANES) != 0 && n_part_col == 0) begin failures++; $display("no partial column tile"); end
        if (n_overlap == 0) begin failures++; $display("no row/column overlap"); end
        if (n_wait_rows == 0) begin failures++; $display("column stage never waited for rows"); end
        checks += 7;
        $display("mechanisms: overlapped_beats=%0d column_waits_for_rows=%0d", n_overlap, n_wait_rows);
        $display("mechanisms: stalls=%0d waits_for_column_stage=%0d top_edge=%0d bottom_edge=%0d low_band=%0d high_band=%0d partial_col_tiles=%0d frames=%0d",
                 n_stall, n_wait_col, n_edge_lo, n_edge_hi, n_band_lo, n_band_hi, n_part_col, n_done);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // watchdog
  initial begin
    repeat (20000 * FRAMES) @(posedge clk);
    failures++;
    $display("watchdog: frames finished=%0d", frame_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
