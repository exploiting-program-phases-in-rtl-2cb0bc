// log_fifo: synchronous first-in first-out buffer that holds stamped events
// inside a core's log unit until the ring has an idle slot for them.
//
// The log unit of the tracing framework needs a buffer of 32 entries; that
// depth is the default here.  The FIFO is a plain array with read and write
// pointers one bit wider than the address, so full and empty are told apart
// by the extra bit.  The head entry is presented combinationally (first-word
// fall-through): rd_data is valid whenever empty is low, and rd_en pops it at
// the next clock edge.  A write to a full FIFO or a read of an empty one is
// ignored; the owner is expected to look at full/empty first.  Reset is
// synchronous and active high; the storage itself is not reset.
module log_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32          // power of two
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign count   = wr_ptr - rd_ptr;
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_en && !full)  wr_ptr <= wr_ptr + 1'b1;
      if (rd_en && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("log_fifo: DEPTH must be a power of two");
  end
endmodule
