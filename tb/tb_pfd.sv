// tb_pfd: pulses on y at random spacing; after each rising edge the PFD must
// report the spacing since the previous edge, the divider count seen in the
// edge cycle, and interval_ok low only for the first edge.
`timescale 1ns/1ps
module tb_pfd;
  logic clk = 0, rst_n = 0, y = 0;
  logic [15:0] div_cnt = 0;
  logic edge_o, interval_ok_o;
  logic [17:0] interval_o;
  logic [15:0] phase_o;
  int checks = 0, failures = 0;

  pfd dut (.clk, .rst_n, .y, .div_cnt, .edge_o, .interval_o, .interval_ok_o, .phase_o);

  always #5 clk = ~clk;

  initial begin
    int gap, w, last_edge, cyc;
    logic [15:0] cnt_at_edge;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0; last_edge = -1;
    for (int p = 0; p < 200; p++) begin
      gap = $urandom_range(3, 500);
      w   = $urandom_range(2, 3);
      for (int c = 0; c < gap; c++) begin
        @(negedge clk);
        y = (c < w);
        div_cnt = 16'($urandom);
        if (c == 0) cnt_at_edge = div_cnt;
        @(posedge clk); #1;
        checks++;
        if (edge_o !== (c == 0)) begin failures++; $display("FAIL edge timing p=%0d c=%0d", p, c); end
        if (c == 0) begin
          checks++;
          if (phase_o !== cnt_at_edge) begin failures++; $display("FAIL phase"); end
          if (last_edge >= 0) begin
            checks++;
            if (!interval_ok_o || interval_o != 18'(cyc - last_edge)) begin
              failures++; $display("FAIL interval got %0d exp %0d", interval_o, cyc - last_edge);
            end
          end else if (interval_ok_o) begin
            failures++; $display("FAIL first interval marked ok");
          end
          last_edge = cyc;
        end
        cyc++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
