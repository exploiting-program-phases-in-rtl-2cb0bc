// reset_generator: reset management for the three clock domains.
//
// Three resets are released one after another, highest priority first:
//   rst_pll     reset of the clock generation PLL and of everything else while
//               the PLL clocks are not usable.  Asserted by the (debounced)
//               reset input; the system treats the PLL as in reset until the
//               PLL reports lock.  Board input clock domain.
//   rst_stage1  DDR2 controller reset, DDR2 clock domain.  Asserted whenever
//               rst_pll is asserted or the PLL is not locked.
//   rst_stage2  reset of the ring, the cores and the other system units,
//               system clock domain.  Asserted whenever rst_stage1 is asserted
//               and until the DDR2 controller reports that calibration is done.
// A higher-priority reset asserts every lower one at once (asynchronously),
// and the lower one is released only SYNC_STAGES clock edges of its own
// domain after its cause has gone, so release is synchronous to each domain
// and strictly ordered.  rst_pll is held for PLL_HOLD input-clock cycles after
// the reset input falls, so the PLL sees a reset pulse of known length.
// The three levels, their order and the rule that a higher level asserts the
// lower ones follow the design; the hold length and the synchronizer depth
// are this design's own.
module reset_generator #(
  parameter int unsigned PLL_HOLD    = 16,
  parameter int unsigned SYNC_STAGES = 3
) (
  input  logic clk_ref,         // board input clock
  input  logic clk_ddr,         // DDR2 controller clock
  input  logic clk_sys,         // ring and processor clock
  input  logic rst_in,          // debounced reset input, active high
  input  logic pll_locked,
  input  logic ddr_calib_done,
  output logic rst_pll,
  output logic rst_stage1,
  output logic rst_stage2
);
  logic [$clog2(PLL_HOLD+1)-1:0] hold_cnt;
  logic cause1, cause2;
  logic [SYNC_STAGES-1:0] sync1, sync2;

  // PLL reset: asserted with the input, released PLL_HOLD cycles later.
  always_ff @(posedge clk_ref or posedge rst_in) begin
    if (rst_in) begin
      hold_cnt <= '0;
      rst_pll  <= 1'b1;
    end else if (32'(hold_cnt) < PLL_HOLD) begin
      hold_cnt <= hold_cnt + 1'b1;
      rst_pll  <= 1'b1;
    end else begin
      rst_pll  <= 1'b0;
    end
  end

  assign cause1 = rst_pll || !pll_locked;

  always_ff @(posedge clk_ddr or posedge cause1) begin
    if (cause1) sync1 <= '1;
    else        sync1 <= {sync1[SYNC_STAGES-2:0], 1'b0};
  end
  assign rst_stage1 = sync1[SYNC_STAGES-1];

  assign cause2 = rst_stage1 || !ddr_calib_done;

  always_ff @(posedge clk_sys or posedge cause2) begin
    if (cause2) sync2 <= '1;
    else        sync2 <= {sync2[SYNC_STAGES-2:0], 1'b0};
  end
  assign rst_stage2 = sync2[SYNC_STAGES-1];

  initial assert (SYNC_STAGES >= 2) else $error("reset_generator: SYNC_STAGES must be at least 2");
endmodule
