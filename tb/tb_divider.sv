// tb_divider: checks the tick period of the divider.
// u_cmd runs with its defaults (1350, en high) and must tick every 1350
// clocks, one clock wide: the 20 kpps command rate at 27 MHz. u_slow
// counts a sparse enable (every 3rd clock) with MAX_COUNT = 16 and must
// tick once per 16 enables, i.e. every 48 clocks.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en_slow = 0;
  logic tick_cmd, tick_slow;
  int   cyc = 0, last_cmd = -1, last_slow = -1, n_cmd = 0, n_slow = 0;
  int   prev_cmd = 0;

  divider u_cmd (.clk(clk), .rst(rst), .en(1'b1), .tick(tick_cmd));
  divider #(.MAX_COUNT(16), .COUNT_BITS(5)) u_slow (.clk(clk), .rst(rst), .en(en_slow), .tick(tick_slow));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_slow <= ((cyc % 3) == 0);
    if (!rst) begin
      if (tick_cmd) begin
        if (last_cmd >= 0) `CHECK(cyc - last_cmd == 1350, $sformatf("command period %0d", cyc - last_cmd))
        last_cmd = cyc; n_cmd++;
      end
      `CHECK(!(tick_cmd && prev_cmd), "tick wider than one clock")
      prev_cmd = tick_cmd;
      if (tick_slow) begin
        if (last_slow >= 0) `CHECK(cyc - last_slow == 48, $sformatf("slow period %0d", cyc - last_slow))
        last_slow = cyc; n_slow++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (1350 * 6 + 10) @(posedge clk);
    `CHECK(n_cmd == 6, $sformatf("expected 6 command ticks, got %0d", n_cmd))
    `CHECK(n_slow >= 160, $sformatf("too few slow ticks %0d", n_slow))
    `TB_FINISH
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end
endmodule
