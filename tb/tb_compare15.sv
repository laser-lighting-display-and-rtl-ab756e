// tb_compare15: a 10 x 4 window inside a 14 x 6 raster. Pixel (h, v) is
// white in frame f when (7f + 3h + 5v) mod 15 < w(h, v); because 7 and 15
// are coprime, any 15 consecutive frames show that pixel white exactly
// w(h, v) times, whichever frames the block uses. The written bit must
// therefore be w > 10 (w spans 0..15, including 10 and 11). Each address
// must be written exactly once, done must follow after 14 new frames per
// pixel (the next pixel's first visit falls in the frame of the previous
// pixel's last) and stay high until the enable drops, and a second pass must
// give the same frame.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_compare15;
  localparam int H = 10, V = 4, HT = 14, VT = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, bw;
  logic [10:0] hc = 0; logic [9:0] vc = 0;
  logic done, bdata, bwe; logic [18:0] baddr;
  int frame = 0, writes[H*V], t_start, ones = 0;
  logic frame_bits[H*V];

  compare15 #(.H_SIZE(H), .V_SIZE(V)) dut (.clk(clk), .rst(rst), .comp15_en(en), .bwpixel(bw),
    .hcount(hc), .vcount(vc), .comp15_done(done), .bram_addr(baddr), .bram_data(bdata), .bram_we(bwe));
  always #5 clk = ~clk;

  function automatic int w(int h, int v);
    return (h * 5 + v * 3 + h * v) % 16;
  endfunction

  always_comb bw = ((7 * frame + 3 * int'(hc) + 5 * int'(vc)) % 15) < w(int'(hc), int'(vc));

  always @(posedge clk) begin
    if (32'(hc) == HT - 1) begin
      hc <= 0;
      if (32'(vc) == VT - 1) begin vc <= 0; frame <= frame + 1; end
      else vc <= vc + 1;
    end else hc <= hc + 1;
    if (bwe && !rst) begin
      if (int'(baddr) < H * V) begin
        writes[baddr]++;
        frame_bits[baddr] = bdata;
      end else begin
        failures++; $display("FAIL: write outside window %0d", baddr);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      foreach (writes[i]) writes[i] = 0;
      t_start = frame;
      en <= 1;
      while (!done) @(posedge clk);
      $display("INFO pass %0d took %0d frames", pass, frame - t_start);
      `CHECK(frame - t_start >= H * V * 14 && frame - t_start <= H * V * 14 + 2,
             $sformatf("pass took %0d frames", frame - t_start))
      ones = 0;
      for (int v = 0; v < V; v++)
        for (int h = 0; h < H; h++) begin
          `CHECK(writes[v * H + h] == 1, $sformatf("pixel %0d,%0d written %0d times", h, v, writes[v * H + h]))
          `CHECK(frame_bits[v * H + h] == (w(h, v) > 10), $sformatf("pixel %0d,%0d bit %0d w=%0d", h, v, frame_bits[v * H + h], w(h, v)))
          if (frame_bits[v * H + h]) ones++;
        end
      `CHECK(ones > 0 && ones < H * V, "frame has both colours")
      repeat (50) @(posedge clk); #1;
      `CHECK(done, "done must stay high while enabled")
      en <= 0; repeat (2) @(posedge clk); #1;
      `CHECK(!done, "done drops with the enable")
    end
    `TB_FINISH
  end
  initial begin
    repeat (HT * VT * (H * V * 15 + 5) * 2 + 1000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
