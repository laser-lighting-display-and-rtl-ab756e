// reset_bram: clears the trace memory after reset.
//
// A reset pulse raises `hold` and starts an address counter at zero. While
// `hold` is high the counter steps once per clock through every address of
// a 2**LOGSIZE-word memory; the owner writes zeros at `clear_addr`. After
// the last address has been presented, `hold` drops and normal operation
// resumes. `hold` therefore lasts exactly 2**LOGSIZE cycles after reset
// is released. The owner also keeps its own pacing divider and loop
// counters in reset while `hold` is high.
module reset_bram #(
  parameter int unsigned LOGSIZE = 7
) (
  input  logic               clk,
  input  logic               rst,
  output logic               hold,
  output logic [LOGSIZE-1:0] clear_addr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      hold       <= 1'b1;
      clear_addr <= '0;
    end else if (hold) begin
      if (clear_addr == '1) begin
        hold       <= 1'b0;
        clear_addr <= '0;
      end else begin
        clear_addr <= clear_addr + 1'b1;
      end
    end
  end

endmodule
