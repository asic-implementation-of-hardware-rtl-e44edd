// tb_mac_unit: drives random signed samples and coefficients in windows of
// random length (the first cycle of each window restarts the sum), with
// random idle cycles, and compares the sum after every cycle with a model.
module tb_mac_unit;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [8:0]  x = 0;
  logic signed [15:0] h = 0;
  logic signed [17:0] acc;
  int checks = 0, failures = 0;
  longint model = 0;

  mac_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (acc != 0) failures++;
    for (int w = 0; w < 300; w++) begin
      int len;
      len = $urandom_range(1, 10);
      for (int i = 0; i < len; i++) begin
        en  = ($urandom_range(0, 4) != 0) || i == 0;
        clr = (i == 0);
        x   = 9'($signed($urandom_range(0, 511)) - 256);
        h   = 16'($signed($urandom_range(0, 400)) - 200);
        if (en) model = (clr ? 0 : model) + longint'(x) * longint'(h);
        @(negedge clk);
        checks++;
        if (longint'(acc) != model) begin
          failures++;
          if (failures < 5) $display("acc %0d expected %0d", acc, model);
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
