// tb_dtcwt_pe: feeds random 10-sample windows with a randomly chosen filter
// of the DTCWT table through the processing element the way the array does (taps 0..5 on
// the MSB inputs, two zero cycles and then taps 6..9 on the LSB inputs),
// back to back and with gaps. Every output must equal the 10-term inner
// product and must appear exactly two cycles after the last input cycle.
module tb_dtcwt_pe;
  import dtcwt_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  logic signed [8:0]  xm = 0, xl = 0;
  logic signed [15:0] hm = 0, hl = 0;
  logic signed [17:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint exp_q[$];
  int due_q[$];

  dtcwt_pe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      checks += 2;
      if (exp_q.size() == 0) failures++;
      else begin
        longint e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (longint'(y) != e) begin failures++; $display("y %0d expected %0d", y, e); end
        if (cyc != d) begin failures++; $display("output at %0d expected %0d", cyc, d); end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      int xs [10];
      int hs [10];
      longint s;
      int f;
      s = 0;
      f = $urandom_range(0, 3);
      for (int k = 0; k < 10; k++) begin
        xs[k] = $urandom_range(0, 255);
        hs[k] = H[f][k];
        s += longint'(xs[k]) * longint'(hs[k]);
      end
      while ($urandom_range(0, 3) == 0) begin en = 0; @(negedge clk); end
      for (int p = 0; p < 6; p++) begin
        en = 1; first = (p == 0); last = (p == 5);
        xm = 9'(xs[p]); hm = 16'(hs[p]);
        xl = (p < 2) ? 9'sd0 : 9'(xs[4 + p]);
        hl = (p < 2) ? 16'sd0 : 16'(hs[4 + p]);
        if (p == 5) begin exp_q.push_back(s); due_q.push_back(cyc + 2); end
        @(negedge clk);
      end
      en = 0; first = 0; last = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
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
