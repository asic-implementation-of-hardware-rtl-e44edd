// tb_systolic_array: the default 6 x 4 array (La, Ha, Lb, Hb) gets random
// 10-sample windows on each of its six lanes, scheduled as the data control
// unit does, with back-to-back windows and random gaps. For every filter f
// the results must equal the inner products with filter f, carry the tag of
// their window and appear 7 + f cycles after the window's first cycle.
module tb_systolic_array;
  import dtcwt_ref_pkg::*;
  localparam int LANES = 6, FILTERS = 4, TAG_W = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [2:0] in_phase = 0;
  logic [TAG_W-1:0] in_tag = 0;
  logic signed [8:0] in_xm [LANES];
  logic signed [8:0] in_xl [LANES];
  logic signed [17:0] y [FILTERS][LANES];
  logic y_valid [FILTERS];
  logic [TAG_W-1:0] y_tag [FILTERS];

  systolic_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, nwin = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint y [FILTERS][LANES]; int t0; int tag; } win_t;
  win_t q [FILTERS][$];

  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < FILTERS; f++) if (y_valid[f]) begin
      win_t w;
      checks++;
      if (q[f].size() == 0) begin failures++; continue; end
      w = q[f].pop_front();
      if (cyc != w.t0 + 7 + f) begin failures++; $display("f%0d at %0d, expected %0d", f, cyc, w.t0 + 7 + f); end
      checks++;
      if (int'(y_tag[f]) != w.tag) failures++;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (longint'(y[f][l]) != w.y[f][l]) begin
          failures++;
          if (failures < 6) $display("f%0d lane %0d: %0d expected %0d", f, l, y[f][l], w.y[f][l]);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) begin in_xm[l] = 0; in_xl[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      int xs [LANES][10];
      win_t w;
      for (int l = 0; l < LANES; l++)
        for (int k = 0; k < 10; k++) xs[l][k] = $urandom_range(0, 255);
      for (int f = 0; f < FILTERS; f++)
        for (int l = 0; l < LANES; l++) begin
          w.y[f][l] = 0;
          for (int k = 0; k < 10; k++) w.y[f][l] += longint'(H[f][k]) * xs[l][k];
        end
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      w.t0 = cyc;
      w.tag = n;
      for (int f = 0; f < FILTERS; f++) q[f].push_back(w);
      for (int p = 0; p < 6; p++) begin
        in_valid = 1; in_first = (p == 0); in_last = (p == 5);
        in_phase = 3'(p); in_tag = TAG_W'(n);
        for (int l = 0; l < LANES; l++) begin
          in_xm[l] = 9'(xs[l][p]);
          in_xl[l] = (p < 2) ? 9'sd0 : 9'(xs[l][4 + p]);
        end
        @(negedge clk);
      end
      in_valid = 0; in_first = 0; in_last = 0;
    end
    repeat (15) @(negedge clk);
    for (int f = 0; f < FILTERS; f++) begin
      checks++;
      if (q[f].size() != 0) begin failures++; $display("filter %0d lost %0d windows", f, q[f].size()); end
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
