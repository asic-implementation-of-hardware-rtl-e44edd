// tb_subband_combiner: random tree outputs over the full 27-bit range go in
// with random valid; one cycle later the four sums/differences and the tag
// must come out, and out_valid must follow in_valid by one cycle.
module tb_subband_combiner;
  localparam int LANES = 6, TAG_W = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [TAG_W-1:0] in_tag = 0, out_tag;
  logic signed [26:0] in_aa [LANES];
  logic signed [26:0] in_ab [LANES];
  logic signed [26:0] in_ba [LANES];
  logic signed [26:0] in_bb [LANES];
  logic signed [27:0] out_re1 [LANES];
  logic signed [27:0] out_re2 [LANES];
  logic signed [27:0] out_im1 [LANES];
  logic signed [27:0] out_im2 [LANES];
  int checks = 0, failures = 0;

  subband_combiner dut (.*);

  always #5 clk = ~clk;

  function automatic logic signed [26:0] rnd();
    return 27'($urandom());
  endfunction

  initial begin
    longint e [4][LANES];
    logic v;
    int tg;
    for (int l = 0; l < LANES; l++) begin in_aa[l] = 0; in_ab[l] = 0; in_ba[l] = 0; in_bb[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      v = ($urandom_range(0, 2) != 0);
      tg = $urandom_range(0, 255);
      in_valid = v; in_tag = 8'(tg);
      for (int l = 0; l < LANES; l++) begin
        in_aa[l] = rnd(); in_ab[l] = rnd(); in_ba[l] = rnd(); in_bb[l] = rnd();
        e[0][l] = longint'(in_aa[l]) - longint'(in_bb[l]);
        e[1][l] = longint'(in_aa[l]) + longint'(in_bb[l]);
        e[2][l] = longint'(in_ab[l]) + longint'(in_ba[l]);
        e[3][l] = longint'(in_ab[l]) - longint'(in_ba[l]);
      end
      @(negedge clk);
      checks++;
      if (out_valid != v) failures++;
      if (v) begin
        checks++;
        if (int'(out_tag) != tg) failures++;
        for (int l = 0; l < LANES; l++) begin
          checks += 4;
          if (longint'(out_re1[l]) != e[0][l]) failures++;
          if (longint'(out_re2[l]) != e[1][l]) failures++;
          if (longint'(out_im1[l]) != e[2][l]) failures++;
          if (longint'(out_im2[l]) != e[3][l]) failures++;
        end
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
