// tb_column_processor: a behavioural model of the row output memory is
// filled with random row-stage results of two frames; for each, the column
// stage is started and every result beat (low and high band, four units,
// all valid lanes) is compared with direct column convolutions. In the
// first frame all rows are available at once; in the second, rows_avail
// grows by six rows every 150 cycles, and every beat must come from a
// window whose rows were available when it was issued (the stage must have
// waited). It checks that each frame yields 2 * ceil(N/6) * N/2 beats, that
// busy covers the run, and the timing: the first low-band beat 7 cycles
// after the first issue cycle (the cycle after start).
module tb_column_processor;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;
  localparam int N = 16, LANES = 6, COLT = (N + LANES - 1) / LANES;

  logic clk = 0, rst_n = 0, start = 0, busy, done, wait_rows;
  logic [4:0] rows_avail = 0;
  int avail_at [200000];
  int n_wait = 0;
  logic [3:0] rd_col;
  logic signed [5:0] pos_m, pos_l;
  logic l_zero;
  logic signed [ROW_W-1:0] rd_m [2][LANES];
  logic signed [ROW_W-1:0] rd_l [2][LANES];
  logic out_valid, out_high;
  logic [3:0] out_col;
  logic [2:0] out_m;
  logic signed [COL_W-1:0] out_aa [LANES];
  logic signed [COL_W-1:0] out_ab [LANES];
  logic signed [COL_W-1:0] out_ba [LANES];
  logic signed [COL_W-1:0] out_bb [LANES];

  column_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, beats = 0, t_start = 0, first_seen = 0;
  longint mem [N][2*N];
  always @(posedge clk) begin
    avail_at[cyc] = int'(rows_avail);
    if (wait_rows) n_wait++;
    cyc <= cyc + 1;
  end

  // memory model: combinational read with symmetric extension
  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int l = 0; l < LANES; l++) begin
        int c;
        c = int'(rd_col) + l;
        rd_m[h][l] = (c < N) ? ROW_W'(mem[ext(int'(pos_m), N)][h * N + c]) : '0;
        rd_l[h][l] = (c < N && !l_zero) ? ROW_W'(mem[ext(int'(pos_l), N)][h * N + c]) : '0;
      end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int b;
    b = int'(out_high);
    beats++;
    if (!first_seen) begin
      checks++;
      first_seen = 1;
      if (cyc != t_start + 1 + 7 || b != 0) begin failures++; $display("first beat at %0d, expected %0d", cyc, t_start + 8); end
    end
    // rows read by window m must have been available at its first cycle
    checks++;
    if (avail_at[cyc - 7 - b] < ((2 * int'(out_m) + 6 < N) ? 2 * int'(out_m) + 6 : N)) begin
      failures++;
      $display("window m=%0d issued with %0d rows", out_m, avail_at[cyc - 7 - b]);
    end
    for (int l = 0; l < LANES; l++) begin
      int c;
      longint ca[$], cb[$];
      c = int'(out_col) + l;
      ca.delete();
      cb.delete();
      if (c < N) begin
        for (int r = 0; r < N; r++) begin ca.push_back(mem[r][c]); cb.push_back(mem[r][N + c]); end
        checks += 4;
        if (longint'(out_aa[l]) != fir(b, ca, int'(out_m))) begin
          failures++;
          if (failures < 5) $display("aa b%0d c%0d m%0d: %0d expected %0d", b, c, out_m, out_aa[l], fir(b, ca, int'(out_m)));
        end
        if (longint'(out_ab[l]) != fir(2 + b, ca, int'(out_m))) failures++;
        if (longint'(out_ba[l]) != fir(b, cb, int'(out_m)))     failures++;
        if (longint'(out_bb[l]) != fir(2 + b, cb, int'(out_m))) failures++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < 2 * N; c++) mem[r][c] = longint'($signed($urandom_range(0, 228480))) - 114240;
      beats = 0; first_seen = 0;
      @(negedge clk);
      rows_avail = (fr == 0) ? 5'(N) : 5'(LANES);
      start = 1; t_start = cyc;
      @(negedge clk);
      start = 0;
      while (!done) begin
        checks++;
        if (!busy) failures++;
        if (fr == 1 && (cyc - t_start) % 150 == 0 && rows_avail < N)
          rows_avail = (int'(rows_avail) + LANES > N) ? 5'(N) : rows_avail + 5'(LANES);
        @(negedge clk);
      end
      rows_avail = 0;
      @(negedge clk);
      checks += 2;
      if (busy) failures++;
      if (beats != 2 * COLT * (N / 2)) begin failures++; $display("%0d beats", beats); end
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("the stage never waited for rows"); end
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
