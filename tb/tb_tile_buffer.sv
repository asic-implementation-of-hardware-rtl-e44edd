// tb_tile_buffer: fills a 6 x 16 tile with random pixels, then reads random
// window positions from -4 to N+3 on both read ports and checks every lane
// against the symmetrically extended row; the LSB port must read zero while
// l_zero is high. A second fill checks that writes replace old contents.
module tb_tile_buffer;
  localparam int N = 16, LANES = 6;
  logic clk = 0, wr_en = 0;
  logic [2:0] wr_lane = 0;
  logic [3:0] wr_col = 0;
  logic [7:0] wr_data = 0;
  logic signed [5:0] pos_m = 0, pos_l = 0;
  logic l_zero = 0;
  logic signed [8:0] rd_m [LANES];
  logic signed [8:0] rd_l [LANES];
  int checks = 0, failures = 0;
  int img [LANES][N];

  tile_buffer dut (.*);

  always #5 clk = ~clk;

  function automatic int ext(int i);
    if (i < 0) return -i - 1;
    if (i >= N) return 2 * N - 1 - i;
    return i;
  endfunction

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int l = 0; l < LANES; l++)
        for (int c = 0; c < N; c++) begin
          img[l][c] = $urandom_range(0, 255);
          @(negedge clk);
          wr_en = 1; wr_lane = 3'(l); wr_col = 4'(c); wr_data = 8'(img[l][c]);
        end
      @(negedge clk);
      wr_en = 0;
      for (int t = 0; t < 200; t++) begin
        int pm, pl;
        pm = $urandom_range(0, N + 7) - 4;
        pl = $urandom_range(0, N + 7) - 4;
        pos_m = 6'(pm); pos_l = 6'(pl); l_zero = ($urandom_range(0, 2) == 0);
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks += 2;
          if (int'(rd_m[l]) != img[l][ext(pm)]) failures++;
          if (int'(rd_l[l]) != (l_zero ? 0 : img[l][ext(pl)])) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
