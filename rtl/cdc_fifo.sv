// cdc_fifo: dual-clock FIFO that carries commands and data between the
// system clock domain (50 MHz: ring, cores, bus controller) and the DDR2
// controller domain (200 MHz).
//
// A signal that is valid for one cycle on one side must be valid for exactly
// one cycle on the other, and a burst that arrives at the fast side's rate
// must wait until the slow side takes it, so every crossing goes through a
// FIFO.  Write and read pointers are kept in Gray code; each pointer is passed
// to the other clock domain through a two-flop synchronizer, so full and
// empty are computed from a pointer that may be a few cycles old, which only
// makes them conservative.  The read side is first-word fall-through: rd_data
// is valid while !rd_empty and rd_en pops it.  Each side has its own
// active-high reset, asserted asynchronously and released synchronously.
// The use of dual-clock FIFOs follows the design; the depth and the Gray-code
// construction are this design's choice.
module cdc_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16            // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by the write side
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by the read side
  logic [AW:0] wr_bin_next, rd_bin_next;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wr_bin_next = wr_bin + (AW+1)'(wr_en && !wr_full);
  assign rd_bin_next = rd_bin + (AW+1)'(rd_en && !rd_empty);

  // Full: the write pointer is one lap ahead of the read pointer (the two
  // top Gray bits differ, the rest match).
  assign wr_full  = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});
  assign rd_empty = (rd_gray == wr_gray_r2);
  assign rd_data  = mem[rd_bin[AW-1:0]];

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or posedge wr_rst) begin
    if (wr_rst) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      wr_bin     <= wr_bin_next;
      wr_gray    <= bin2gray(wr_bin_next);
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
    end
  end

  always_ff @(posedge rd_clk or posedge rd_rst) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      rd_bin     <= rd_bin_next;
      rd_gray    <= bin2gray(rd_bin_next);
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("cdc_fifo: DEPTH must be a power of two of at least 4");
  end
endmodule
