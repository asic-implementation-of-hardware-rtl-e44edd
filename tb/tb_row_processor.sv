// tb_row_processor: checks the row stage on two 16 x 16 frames of random
// pixels. Every result (four filters, all lanes) is compared with a direct
// convolution of the row with symmetric extension and decimation by two.
// It also checks the timing: the first La result of a tile appears 7
// cycles after the first filtering cycle (the cycle after the tile's last
// pixel), filter f one cycle per filter later, and successive windows of a
// filter six cycles apart; pix_ready must be low while a tile is filtered.
module tb_row_processor;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int N = 16;
  localparam int LANES = 6;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_data = 0;
  logic res_valid [4];
  logic [$clog2(N)-1:0] res_base [4];
  logic [$clog2(N/2)-1:0] res_m [4];
  logic signed [ROW_W-1:0] res_y [4][LANES];
  logic frame_done;

  row_processor dut (
    .clk, .rst_n, .frame_en(1'b1), .pix_valid, .pix_ready, .pix_data,
    .res_valid, .res_base, .res_m, .res_y, .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint img [FRAMES][N][N];
  int cyc = 0, fr_out = 0, n_res = 0;
  int tile_start = -1;        // first filtering cycle of the current tile
  int last_v [4];
  int c_acc;
  int seen_in_tile [4];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int fr = 0; fr < FRAMES; fr++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) img[fr][r][c] = longint'($urandom_range(0, 255));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int i = 0; i < N * N; i++) begin
        @(negedge clk);
        pix_valid = 1;
        pix_data  = 8'(img[fr][i / N][i % N]);
        while (!pix_ready) @(negedge clk);
        c_acc = cyc;  // cycle in which the pixel is taken
        @(posedge clk);
        // the last pixel of a tile: filtering starts next cycle
        if ((i % N) == N - 1 && ((i / N) % LANES == LANES - 1 || i / N == N - 1)) begin
          tile_start = c_acc + 1;
          for (int f = 0; f < 4; f++) seen_in_tile[f] = 0;
        end
      end
    end
    @(negedge clk);
    pix_valid = 0;
  end

  always @(posedge clk) begin
    if (rst_n && pix_valid && tile_start >= 0 && cyc >= tile_start && cyc < tile_start + 3 * N) begin
      checks++;
      if (pix_ready) begin failures++; $display("pix_ready high while filtering at %0d", cyc); end
    end
    for (int f = 0; f < 4; f++) begin
      if (rst_n && res_valid[f]) begin
        longint line[$];
        n_res++;
        // timing
        checks++;
        if (seen_in_tile[f] == 0) begin
          if (cyc != tile_start + 7 + f) begin
            failures++; $display("filter %0d first result at %0d, expected %0d", f, cyc, tile_start + 7 + f);
          end
        end else if (cyc != last_v[f] + SEG_CYC) begin
          failures++; $display("filter %0d results %0d cycles apart", f, cyc - last_v[f]);
        end
        seen_in_tile[f]++;
        last_v[f] = cyc;
        for (int l = 0; l < LANES; l++) begin
          int r;
          r = int'(res_base[f]) + l;
          if (r < N) begin
            line.delete();
            for (int c = 0; c < N; c++) line.push_back(img[fr_out][r][c]);
            checks++;
            if (longint'(res_y[f][l]) != fir(f, line, int'(res_m[f]))) begin
              failures++;
              if (failures < 10) $display("f%0d row %0d m %0d got %0d exp %0d", f, r, res_m[f], res_y[f][l], fir(f, line, int'(res_m[f])));
            end
          end
        end
      end
    end
    if (rst_n && frame_done) begin
      checks++;
      if (n_res != 4 * 3 * (N / 2)) begin failures++; $display("frame had %0d results", n_res); end
      n_res = 0;
      fr_out++;
      if (fr_out == FRAMES) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000 * FRAMES) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
