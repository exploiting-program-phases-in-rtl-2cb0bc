// bus_controller: the ring stop next to the first and last core that serves
// memory requests, maps auxiliary units into the address space and arbitrates
// the bus lock used by hardware transactions to commit.
//
// Memory requests carry a read/write command, a quad-word (16-byte) aligned
// address and, for writes, one 128-bit quad-word.  DDR2 memory is accessed in
// bursts of four 64-bit words, which the DDR2 controller moves as two 128-bit
// beats; a two-word burst does not exist.  Because the words of a burst wrap
// at the burst boundary, the controller aligns every address down to a
// 32-byte boundary (two quad-words) and uses address bit 4 to pick the beat:
//   read : one burst command, two read beats back, the wanted beat returned;
//   write: one burst command, two write beats, the wanted beat with byte mask
//          0 and the other beat fully masked (mask bit 1 = byte not written).
// Two address windows do not go to DDR2:
//   STATS_BASE  (4 KB)  the statistics unit's registers and counters
//   LOADER_BASE (8 KB)  the block RAM holding the boot loader
// A 32-bit register is the big-endian word lane of the quad-word picked by
// address bits [3:2] (lane 0 = bits 127:96); a register read returns its value
// in all four lanes.
// The bus lock: a core raises lock_req[i] when a hardware transaction wants to
// commit and keeps it up while it writes back; lock_grant is one-hot, held by
// one core until it drops its request, and handed on round-robin.
// Interfaces use valid/ready handshakes; one request is in flight at a time,
// and every request, write included, gets exactly one response (resp_valid for
// one cycle).  What the unit does (burst alignment, memory-mapped units, lock
// arbitration) follows the design; the request/response port, the window
// addresses and the round-robin order are this design's own.  Synchronous
// active-high reset.
module bus_controller #(
  parameter int unsigned NUM_CORES    = 8,
  parameter logic [31:0] STATS_BASE   = 32'h0FFF_F000,
  parameter logic [31:0] LOADER_BASE  = 32'h0FFF_C000,
  parameter int unsigned LOADER_WORDS = 512              // 8 KB of 128-bit words
) (
  input  logic         clk,
  input  logic         rst,
  // memory requests from the ring
  input  logic         req_valid,
  output logic         req_ready,
  input  logic         req_write,
  input  logic [31:0]  req_addr,
  input  logic [127:0] req_wdata,
  input  logic [3:0]   req_src,
  output logic         resp_valid,
  output logic         resp_write,
  output logic [127:0] resp_rdata,
  output logic [3:0]   resp_src,
  // DDR2 command, write-data and read-data queues
  output logic         ddr_cmd_valid,
  input  logic         ddr_cmd_ready,
  output logic         ddr_cmd_write,
  output logic [31:0]  ddr_cmd_addr,
  output logic         ddr_wd_valid,
  input  logic         ddr_wd_ready,
  output logic [127:0] ddr_wd_data,
  output logic [15:0]  ddr_wd_mask,
  input  logic         ddr_rd_valid,
  output logic         ddr_rd_ready,
  input  logic [127:0] ddr_rd_data,
  // statistics unit registers
  output logic         stats_valid,
  output logic         stats_write,
  output logic [11:0]  stats_addr,
  output logic [31:0]  stats_wdata,
  input  logic         stats_rvalid,
  input  logic [31:0]  stats_rdata,
  // boot loader block RAM
  output logic         bram_en,
  output logic         bram_we,
  output logic [$clog2(LOADER_WORDS)-1:0] bram_addr,
  output logic [127:0] bram_wdata,
  input  logic [127:0] bram_rdata,
  // bus lock for hardware transaction commits
  input  logic [NUM_CORES-1:0] lock_req,
  output logic [NUM_CORES-1:0] lock_grant
);
  typedef enum logic [3:0] {
    S_IDLE, S_STATS, S_STATS_WAIT, S_BRAM, S_BRAM_WAIT,
    S_DDR_CMD, S_DDR_WD0, S_DDR_WD1, S_DDR_RD0, S_DDR_RD1, S_RESP
  } state_e;

  state_e       state;
  logic         cur_write;
  logic [31:0]  cur_addr;
  logic [127:0] cur_wdata, rdata_q;
  logic [3:0]   cur_src;
  logic [31:0]  lane_word;

  localparam logic [31:0] LOADER_BYTES = 32'(LOADER_WORDS * 16);

  function automatic logic in_window(logic [31:0] a, logic [31:0] base, logic [31:0] size);
    return (a >= base) && (a - base < size);
  endfunction

  // Big-endian word lane selected by address bits [3:2].
  always_comb begin
    unique case (cur_addr[3:2])
      2'd0: lane_word = cur_wdata[127:96];
      2'd1: lane_word = cur_wdata[95:64];
      2'd2: lane_word = cur_wdata[63:32];
      default: lane_word = cur_wdata[31:0];
    endcase
  end

  assign req_ready = (state == S_IDLE);

  assign ddr_cmd_valid = (state == S_DDR_CMD);
  assign ddr_cmd_write = cur_write;
  assign ddr_cmd_addr  = {cur_addr[31:5], 5'b0};
  assign ddr_wd_valid  = (state == S_DDR_WD0) || (state == S_DDR_WD1);
  assign ddr_wd_data   = cur_wdata;
  // Beat 0 holds the quad-word at the burst-aligned address, beat 1 the next.
  assign ddr_wd_mask   = ((state == S_DDR_WD1) == cur_addr[4]) ? 16'h0000 : 16'hFFFF;
  assign ddr_rd_ready  = (state == S_DDR_RD0) || (state == S_DDR_RD1);

  assign stats_valid = (state == S_STATS);
  assign stats_write = cur_write;
  assign stats_addr  = cur_addr[11:0] & 12'hFFC;
  assign stats_wdata = lane_word;

  assign bram_en    = (state == S_BRAM);
  assign bram_we    = cur_write;
  assign bram_addr  = ($clog2(LOADER_WORDS))'((cur_addr - LOADER_BASE) >> 4);
  assign bram_wdata = cur_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cur_write  <= 1'b0;
      cur_addr   <= '0;
      cur_wdata  <= '0;
      cur_src    <= '0;
      rdata_q    <= '0;
      resp_valid <= 1'b0;
      resp_write <= 1'b0;
      resp_rdata <= '0;
      resp_src   <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur_write <= req_write;
          cur_addr  <= {req_addr[31:4], 4'b0} | {28'b0, req_addr[3:2], 2'b0};
          cur_wdata <= req_wdata;
          cur_src   <= req_src;
          rdata_q   <= '0;
          if (in_window(req_addr, STATS_BASE, 32'h1000))          state <= S_STATS;
          else if (in_window(req_addr, LOADER_BASE, LOADER_BYTES)) state <= S_BRAM;
          else                                                     state <= S_DDR_CMD;
        end
        S_STATS: state <= cur_write ? S_RESP : S_STATS_WAIT;
        S_STATS_WAIT: if (stats_rvalid) begin
          rdata_q <= {4{stats_rdata}};
          state   <= S_RESP;
        end
        S_BRAM: state <= cur_write ? S_RESP : S_BRAM_WAIT;
        S_BRAM_WAIT: begin
          rdata_q <= bram_rdata;
          state   <= S_RESP;
        end
        S_DDR_CMD: if (ddr_cmd_ready) state <= cur_write ? S_DDR_WD0 : S_DDR_RD0;
        S_DDR_WD0: if (ddr_wd_ready) state <= S_DDR_WD1;
        S_DDR_WD1: if (ddr_wd_ready) state <= S_RESP;
        S_DDR_RD0: if (ddr_rd_valid) begin
          if (!cur_addr[4]) rdata_q <= ddr_rd_data;
          state <= S_DDR_RD1;
        end
        S_DDR_RD1: if (ddr_rd_valid) begin
          if (cur_addr[4]) rdata_q <= ddr_rd_data;
          state <= S_RESP;
        end
        S_RESP: begin
          resp_valid <= 1'b1;
          resp_write <= cur_write;
          resp_rdata <= rdata_q;
          resp_src   <= cur_src;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Round-robin bus lock arbiter.
  logic [$clog2(NUM_CORES)-1:0] rr_next;
  logic                         lock_held;
  logic [$clog2(NUM_CORES)-1:0] holder;

  assign lock_held = |(lock_grant & lock_req);

  always_ff @(posedge clk) begin
    if (rst) begin
      lock_grant <= '0;
      rr_next    <= '0;
      holder     <= '0;
    end else if (!lock_held) begin
      lock_grant <= '0;
      for (int k = NUM_CORES - 1; k >= 0; k--) begin
        automatic int unsigned i = (32'(rr_next) + 32'(k)) % NUM_CORES;
        if (lock_req[i]) begin
          lock_grant    <= '0;
          lock_grant[i] <= 1'b1;
          holder        <= ($clog2(NUM_CORES))'(i);
          rr_next       <= ($clog2(NUM_CORES))'((i + 1) % NUM_CORES);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(lock_grant));
  assert property (@(posedge clk) disable iff (rst) lock_held |=> lock_grant[holder]);
endmodule
