// ddr2_bram: main memory built from block RAM that answers on the same
// command / write-data / read-data queues as the DDR2 controller, so that the
// system can run without the external memory (on a board without DDR2, or in
// a fast simulation).
//
// Commands name a 32-byte-aligned burst of four 64-bit words, which moves as
// two 128-bit beats:
//   write: after the command the unit takes two beats on wd_valid/wd_ready
//          and writes every byte whose mask bit is 0 (mask bit 1 = keep);
//   read:  the unit reads the two beats of the burst from the RAM and pushes
//          them on rd_valid/rd_data, holding back while rd_full is high.
// One command is handled at a time; cmd_ready is high only when idle.  The
// RAM holds WORDS 128-bit words; addresses wrap modulo its size, and the low
// five address bits are not used because bursts are aligned (the lint note
// about them is expected).  Contents start
// at zero.  Timing: a write burst takes 3 cycles (command + two beats); a
// read burst returns its first beat 2 cycles after the command and the second
// 2 cycles later.  The queue protocol and burst shape follow the DDR2 path of
// the system; the RAM size, the zero start and the timing are this design's
// own.  Synchronous active-high reset (the RAM contents are not reset).
module ddr2_bram #(
  parameter int unsigned WORDS = 8192        // 128-bit words (128 KB)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  logic         cmd_write,
  input  logic [31:0]  cmd_addr,
  input  logic         wd_valid,
  output logic         wd_ready,
  input  logic [127:0] wd_data,
  input  logic [15:0]  wd_mask,
  output logic         rd_valid,
  input  logic         rd_full,
  output logic [127:0] rd_data
);
  localparam int unsigned AW = $clog2(WORDS);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_RD_ISSUE, S_RD_OUT} state_e;

  state_e        state;
  logic [AW-1:0] base;                  // word address of beat 0
  logic          beat;                  // 0 or 1
  logic [AW-1:0] waddr;
  logic [127:0]  mem [WORDS];

  assign cmd_ready = (state == S_IDLE);
  assign wd_ready  = (state == S_WRITE);
  assign rd_valid  = (state == S_RD_OUT) && !rd_full;
  assign waddr     = base + AW'(beat);

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  // RAM with byte-masked writes and a registered read.
  always_ff @(posedge clk) begin
    if (state == S_WRITE && wd_valid)
      for (int b = 0; b < 16; b++)
        if (!wd_mask[b]) mem[waddr][b*8 +: 8] <= wd_data[b*8 +: 8];
    if (state == S_RD_ISSUE) rd_data <= mem[waddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      base  <= '0;
      beat  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          base  <= AW'(cmd_addr[31:5] << 1);
          beat  <= 1'b0;
          state <= cmd_write ? S_WRITE : S_RD_ISSUE;
        end
        S_WRITE: if (wd_valid) begin
          beat <= 1'b1;
          if (beat) state <= S_IDLE;
        end
        S_RD_ISSUE: state <= S_RD_OUT;
        S_RD_OUT: if (!rd_full) begin
          beat  <= 1'b1;
          state <= beat ? S_IDLE : S_RD_ISSUE;
        end
      endcase
    end
  end

  initial assert (WORDS >= 2 && (WORDS & (WORDS - 1)) == 0)
    else $error("ddr2_bram: WORDS must be a power of two");
endmodule
