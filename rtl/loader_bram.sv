// loader_bram: 8 KB block RAM that holds the boot loader's code, data and
// stack, reached through the bus controller.
//
// The boot loader is small enough to fit 8 KB; on the FPGA its image is
// written straight into the block RAM contents of the configuration
// bitstream.  Here the RAM is 512 words of 128 bits (one processor quad-word
// each) with a single synchronous port: a read returns the word one cycle
// after en, a write stores wdata when en and we are high.  The contents start
// at zero; a boot loader image is placed with writes (or by the FPGA tools).
// The 8 KB size follows the design; the word width and the single port are
// this design's choice.
module loader_bram #(
  parameter int unsigned WORDS = 512
) (
  input  logic         clk,
  input  logic         en,
  input  logic         we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [127:0] wdata,
  output logic [127:0] rdata
);
  logic [127:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
