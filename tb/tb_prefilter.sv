// tb_prefilter: random pulse trains with widths 1 to 5 and gaps of 1 to 6.
// Expected output: the input delayed by one cycle, with every pulse narrower
// than 2 cycles removed and wider ones kept whole.
`timescale 1ns/1ps
module tb_prefilter;
  logic clk = 0, rst_n = 0, z = 0, y_o;
  int checks = 0, failures = 0, passed = 0, dropped = 0;
  bit zs [$];
  bit ys [$];

  prefilter #(.MIN_W(2)) dut (.clk, .rst_n, .z, .y_o);

  always #5 clk = ~clk;

  initial begin
    int w, g;
    // build the stimulus and the expected output
    zs.push_back(0); zs.push_back(0);
    for (int p = 0; p < 300; p++) begin
      w = $urandom_range(1, 5);
      g = $urandom_range(1, 6);
      for (int i = 0; i < w; i++) zs.push_back(1);
      for (int i = 0; i < g; i++) zs.push_back(0);
      if (w >= 2) passed++; else dropped++;
    end
    ys = '{};
    for (int i = 0; i < zs.size(); i++) begin
      int a, b;
      bit keep;
      keep = 0;
      if (zs[i]) begin
        a = i; while (a > 0 && zs[a-1]) a--;
        b = i; while (b < zs.size() - 1 && zs[b+1]) b++;
        keep = (b - a + 1) >= 2;
      end
      ys.push_back(keep);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < zs.size(); i++) begin
      @(negedge clk);
      z = zs[i];
      #1;
      if (i >= 1) begin
        checks++;
        if (y_o !== ys[i-1]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d y=%0b exp %0b", i, y_o, ys[i-1]);
        end
      end
    end
    checks++;
    if (passed == 0 || dropped == 0) begin failures++; $display("FAIL stimulus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
