// tb_row_output_memory: writes a full frame of random row-stage results
// through the four filter write ports the way the row processor does (tiles
// of six rows, the last one partial, filters one cycle apart), then reads
// random column tiles at random row positions -4..N+3 and checks both halves
// of every lane against the La|Ha|Lb|Hb arrangement with symmetric extension.
module tb_row_output_memory;
  import dtcwt_pkg::*;
  localparam int N = 16, LANES = 6;
  logic clk = 0;
  logic wr_valid [4];
  logic [3:0] wr_base [4];
  logic [2:0] wr_m [4];
  logic signed [ROW_W-1:0] wr_y [4][LANES];
  logic [3:0] rd_col = 0;
  logic signed [5:0] pos_m = 0, pos_l = 0;
  logic l_zero = 0;
  logic signed [ROW_W-1:0] rd_m [2][LANES];
  logic signed [ROW_W-1:0] rd_l [2][LANES];
  int checks = 0, failures = 0;
  int ref_mem [N][2*N];

  row_output_memory dut (.*);

  always #5 clk = ~clk;

  function automatic int ext(int i);
    if (i < 0) return -i - 1;
    if (i >= N) return 2 * N - 1 - i;
    return i;
  endfunction

  initial begin
    for (int f = 0; f < 4; f++) begin
      wr_valid[f] = 0; wr_base[f] = 0; wr_m[f] = 0;
      for (int l = 0; l < LANES; l++) wr_y[f][l] = 0;
    end
    for (int base = 0; base < N; base += LANES)
      for (int m = 0; m < N / 2; m++)
        for (int f = 0; f < 4; f++) begin
          @(negedge clk);
          for (int g = 0; g < 4; g++) wr_valid[g] = (g == f);
          wr_base[f] = 4'(base); wr_m[f] = 3'(m);
          for (int l = 0; l < LANES; l++) begin
            int v;
            v = $signed($urandom_range(0, 200000)) - 100000;
            wr_y[f][l] = ROW_W'(v);
            if (base + l < N) ref_mem[base + l][f * (N / 2) + m] = v;
          end
        end
    @(negedge clk);
    for (int f = 0; f < 4; f++) wr_valid[f] = 0;
    for (int t = 0; t < 300; t++) begin
      int pm, pl, c0;
      pm = $urandom_range(0, N + 7) - 4;
      pl = $urandom_range(0, N + 7) - 4;
      c0 = LANES * $urandom_range(0, (N - 1) / LANES);
      pos_m = 6'(pm); pos_l = 6'(pl); rd_col = 4'(c0); l_zero = ($urandom_range(0, 2) == 0);
      #1;
      for (int h = 0; h < 2; h++)
        for (int l = 0; l < LANES; l++) begin
          int em, el;
          em = (c0 + l < N) ? ref_mem[ext(pm)][h * N + c0 + l] : 0;
          el = (c0 + l < N && !l_zero) ? ref_mem[ext(pl)][h * N + c0 + l] : 0;
          checks += 2;
          if (int'(rd_m[h][l]) != em) failures++;
          if (int'(rd_l[h][l]) != el) failures++;
        end
      @(negedge clk);
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
