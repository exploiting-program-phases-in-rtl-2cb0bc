// debounce: cleans up the reset push-button input.
//
// The raw button level is brought into the clock domain through a two-flop
// synchronizer.  The output follows the synchronized level only after it has
// stayed the same for STABLE_CYCLES consecutive clock cycles, so bounces
// shorter than that never reach the reset logic.  The output is a level, not
// a pulse.  It starts at ACTIVE_AT_START on power-up (flip-flop initial
// values, set by FPGA configuration; the lint note about them is expected) and
// there is no reset input, since this unit produces the reset.  The unit's
// purpose follows the design; the filter method, the power-up value and the
// default length (2^16 cycles, about 0.66 ms at 100 MHz) are this design's own.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 65536,
  parameter bit          ACTIVE_AT_START = 1'b1
) (
  input  logic clk,
  input  logic btn_in,
  output logic btn_out
);
  // Flip-flops with power-up values (FPGA configuration initialises them).
  logic s1 = ACTIVE_AT_START;
  logic s2 = ACTIVE_AT_START;
  logic out_q = ACTIVE_AT_START;
  logic [$clog2(STABLE_CYCLES+1)-1:0] cnt = '0;

  always_ff @(posedge clk) begin
    s1 <= btn_in;
    s2 <= s1;
    if (s2 == out_q) begin
      cnt <= '0;
    end else if (32'(cnt) + 1 >= STABLE_CYCLES) begin
      cnt   <= '0;
      out_q <= s2;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign btn_out = out_q;
endmodule
