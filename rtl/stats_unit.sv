// stats_unit: central event processing unit of the tracing framework.
//
// Every event that arrives from the ring increments one 32-bit counter chosen
// by the sending core and the event type, so the unit holds a counter array
// per core, with one counter per event type (16 types).  The counters are
// kept in NUM_LEVELS levels:
//   level 0  events since the last reset of the statistics unit
//   level 1  events in the current sampling period
//   level 2  events in the previous sampling period (frozen during a period)
//   level k  the period before level k-1 (when NUM_LEVELS > 3)
// Time is cut into sampling periods of period_len cycles.  When a period ends,
// level 1 (including an event of that last cycle) moves to level 2, older
// levels move one further, and level 1 restarts from zero.
// Software reads everything through a memory-mapped window at the top of
// memory (byte offsets inside the 4 KB window):
//   0x000 signature (fixed)           0x004 current period number
//   0x008 cycles elapsed in period    0x00C number of levels
//   0x010 reset statistics (write)    0x014 sampling period length (read/write)
//   0x400 + level*LEVEL_STRIDE + core*0x40 + type*4   counter
// with LEVEL_STRIDE = 0x40 * 2^ceil(log2(NUM_CORES+1)).  Core slot NUM_CORES
// reads the global view: the sum over all cores of that level and type.  A new
// sampling period length takes effect at the next reset of the unit (a write
// to 0x010), which clears all counters, the period number and the cycle count.
// The register list, the three default levels, the 32-bit counters, the
// per-core arrays and the global sum follow the design; the signature value,
// the counter offsets and the default period length are this design's own.
// Storage: the per-core counters of each level live in a RAM bank of
// NUM_CORES*NUM_TYPES words (one bank for level 0 and NUM_LEVELS-1 banks that
// rotate for levels 1..).  An event is counted by a two-stage read-modify-
// write: the bank is read in the event's cycle and the incremented value is
// written one cycle later, with the last written word forwarded so that
// back-to-back events for the same counter are both counted.  Each bank word
// has a valid bit; a word whose bit is clear reads as zero, so a whole level
// is cleared in one cycle by clearing its valid bits.  At the end of a period
// the bank pointer moves on: the bank that held level 1 becomes level 2 and
// the oldest bank is cleared and becomes level 1, so no counter is copied.
// The global sums per type are kept in registers next to the banks.
// Register reads answer one cycle after the request (rvalid) and include
// every event up to the cycle before the request.  The banks, valid bits and
// rotation are this design's own choices.  Only the type field of an event
// word matters here; its timestamp and data bits are not used (lint reports
// them as unused inputs).  Synchronous active-high reset.
module stats_unit
  import tm_trace_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 8,
  parameter int unsigned NUM_LEVELS  = 3,
  parameter int unsigned NUM_TYPES   = NUM_EV_TYPES,
  parameter logic [31:0] SIGNATURE   = 32'h5354_4154,   // "STAT"
  parameter logic [31:0] DEFAULT_PERIOD = 32'd100_000
) (
  input  logic        clk,
  input  logic        rst,
  // events taken off the ring
  input  logic        ev_valid,
  input  logic [CORE_ID_W-1:0] ev_sender,
  input  logic [31:0] ev_word,
  // memory-mapped register port
  input  logic        reg_valid,
  input  logic        reg_write,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic        reg_rvalid,
  output logic [31:0] reg_rdata,
  // status
  output logic        period_end,          // pulse in the last cycle of a period
  output logic [31:0] period_number
);
  localparam int unsigned SLOT_W       = $clog2(NUM_CORES + 1);
  localparam int unsigned CORE_SLOTS   = 1 << SLOT_W;
  localparam int unsigned LEVEL_STRIDE = CORE_SLOTS * 16 * 4;
  localparam int unsigned LEVEL_SH     = $clog2(LEVEL_STRIDE);
  localparam logic [11:0] CNT_BASE     = 12'h400;

  localparam logic [11:0] A_SIGNATURE = 12'h000;
  localparam logic [11:0] A_PERIOD    = 12'h004;
  localparam logic [11:0] A_TIMESTAMP = 12'h008;
  localparam logic [11:0] A_LEVELS    = 12'h00C;
  localparam logic [11:0] A_RESET     = 12'h010;
  localparam logic [11:0] A_PERLEN    = 12'h014;

  localparam int unsigned NE = NUM_CORES * NUM_TYPES;     // words per bank
  localparam int unsigned EW = $clog2(NE);
  localparam int unsigned NB = NUM_LEVELS - 1;            // rotating banks
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned LW = $clog2(NUM_LEVELS);

  logic [31:0] timestamp, period_len_cfg, period_len;
  logic        soft_reset;
  logic [EV_TYPE_W-1:0] ev_type;
  logic        counts;
  logic [BW-1:0] cur, cur_next;       // bank holding level 1

  assign ev_type    = ev_word[27:24];
  assign counts     = ev_valid && (32'(ev_sender) < NUM_CORES) && (32'(ev_type) < NUM_TYPES);
  assign soft_reset = reg_valid && reg_write && (reg_addr == A_RESET);
  assign period_end = (timestamp + 32'd1 >= period_len);
  assign cur_next   = (32'(cur) == NB - 1) ? '0 : cur + 1'b1;

  // ---------------------------------------------------- period timing
  always_ff @(posedge clk) begin
    if (rst) begin
      timestamp      <= '0;
      period_number  <= '0;
      period_len_cfg <= DEFAULT_PERIOD;
      period_len     <= DEFAULT_PERIOD;
      cur            <= '0;
    end else begin
      if (reg_valid && reg_write && reg_addr == A_PERLEN)
        period_len_cfg <= reg_wdata;
      if (soft_reset) begin
        timestamp     <= '0;
        period_number <= '0;
        period_len    <= period_len_cfg;
        cur           <= '0;
      end else if (period_end) begin
        timestamp     <= '0;
        period_number <= period_number + 32'd1;
        cur           <= cur_next;
      end else begin
        timestamp     <= timestamp + 32'd1;
      end
    end
  end

  // ------------------------------------------------ register address decode
  logic [11:0]   off;
  logic [31:0]   lvl_idx, slot_idx;
  logic [3:0]    type_idx;
  logic          is_cnt, is_global;
  logic [EW-1:0] rd_idx;
  logic [LW-1:0] rd_bank;             // 0: level 0, 1+b: rotating bank b

  always_comb begin
    off       = reg_addr - CNT_BASE;
    lvl_idx   = 32'(off >> LEVEL_SH);
    slot_idx  = 32'(off[LEVEL_SH-1:6]);
    type_idx  = off[5:2];
    is_cnt    = (reg_addr >= CNT_BASE) && (lvl_idx < NUM_LEVELS) &&
                (32'(type_idx) < NUM_TYPES) && (slot_idx <= NUM_CORES);
    is_global = (slot_idx == NUM_CORES);
    rd_idx    = EW'(slot_idx * NUM_TYPES + 32'(type_idx));
    if (lvl_idx == 0) rd_bank = '0;
    else              rd_bank = LW'(1 + (32'(cur) + NB - (lvl_idx - 1)) % NB);
  end

  // --------------------------------------------- per-core counter banks
  logic          s1_valid;            // event in the write stage
  logic [EW-1:0] s1_idx;
  logic [BW-1:0] s1_bank;
  logic [EW-1:0] ev_idx;
  logic [31:0]   bank_rd [NUM_LEVELS];

  assign ev_idx = EW'(32'(ev_sender) * NUM_TYPES + 32'(ev_type));

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      s1_bank  <= '0;
    end else begin
      s1_valid <= counts && !soft_reset;
      s1_idx   <= ev_idx;
      s1_bank  <= cur;
    end
  end

  for (genvar m = 0; m < NUM_LEVELS; m++) begin : g_bank
    logic [31:0]   mem [NE];
    logic [NE-1:0] ok;
    logic [31:0]   rmw_q, reg_q, last_val, new_val, fwd_val;
    logic          rmw_ok, reg_ok, last_en, fwd_en;
    logic [EW-1:0] last_idx;
    logic          wr_en, clear;

    assign wr_en = s1_valid && !soft_reset && (m == 0 || 32'(s1_bank) == m - 1);
    assign clear = soft_reset || (m != 0 && period_end && 32'(cur_next) == m - 1);
    assign new_val = ((last_en && last_idx == s1_idx) ? last_val
                                                      : (rmw_ok ? rmw_q : 32'd0)) + 32'd1;

    // RAM: one write port, two read ports (counting and register reads).
    always_ff @(posedge clk) begin
      rmw_q <= mem[ev_idx];
      reg_q <= mem[rd_idx];
      if (wr_en) mem[s1_idx] <= new_val;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        ok       <= '0;
        rmw_ok   <= 1'b0;
        reg_ok   <= 1'b0;
        last_en  <= 1'b0;
        last_idx <= '0;
        last_val <= '0;
        fwd_en   <= 1'b0;
        fwd_val  <= '0;
      end else begin
        rmw_ok   <= ok[ev_idx];
        reg_ok   <= ok[rd_idx];
        last_en  <= wr_en;
        last_idx <= s1_idx;
        last_val <= new_val;
        fwd_en   <= wr_en && (s1_idx == rd_idx);
        fwd_val  <= new_val;
        if (wr_en) ok[s1_idx] <= 1'b1;
        if (clear) begin
          ok      <= '0;
          last_en <= 1'b0;
        end
      end
    end

    assign bank_rd[m] = fwd_en ? fwd_val : (reg_ok ? reg_q : 32'd0);
  end

  // -------------------------------------------- global sums (registers)
  logic [31:0] gcnt [NUM_LEVELS][NUM_TYPES];

  always_ff @(posedge clk) begin
    if (rst || soft_reset) begin
      for (int l = 0; l < NUM_LEVELS; l++)
        for (int t = 0; t < NUM_TYPES; t++)
          gcnt[l][t] <= '0;
    end else begin
      for (int t = 0; t < NUM_TYPES; t++) begin
        automatic logic hit = counts && (32'(ev_type) == t);
        gcnt[0][t] <= gcnt[0][t] + 32'(hit);
        if (period_end) begin
          gcnt[1][t] <= '0;
          gcnt[2][t] <= gcnt[1][t] + 32'(hit);
          for (int l = 3; l < NUM_LEVELS; l++)
            gcnt[l][t] <= gcnt[l-1][t];
        end else begin
          gcnt[1][t] <= gcnt[1][t] + 32'(hit);
        end
      end
    end
  end

  // ------------------------------------------------------- register read
  logic          rd_from_bank;
  logic [LW-1:0] rd_bank_q;
  logic [31:0]   rd_fixed;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rvalid   <= 1'b0;
      rd_from_bank <= 1'b0;
      rd_bank_q    <= '0;
      rd_fixed     <= '0;
    end else begin
      reg_rvalid   <= reg_valid && !reg_write;
      rd_from_bank <= 1'b0;
      if (reg_valid && !reg_write) begin
        rd_bank_q <= rd_bank;
        unique case (reg_addr)
          A_SIGNATURE: rd_fixed <= SIGNATURE;
          A_PERIOD:    rd_fixed <= period_number;
          A_TIMESTAMP: rd_fixed <= timestamp;
          A_LEVELS:    rd_fixed <= 32'(NUM_LEVELS);
          A_PERLEN:    rd_fixed <= period_len_cfg;
          default: begin
            rd_fixed     <= (is_cnt && is_global) ? gcnt[lvl_idx[LW-1:0]][type_idx] : 32'd0;
            rd_from_bank <= is_cnt && !is_global;
          end
        endcase
      end
    end
  end

  assign reg_rdata = rd_from_bank ? bank_rd[rd_bank_q] : rd_fixed;

  initial begin
    assert (NUM_LEVELS >= 3) else $error("stats_unit: at least three levels are needed");
    assert (NUM_TYPES <= 16) else $error("stats_unit: at most 16 event types");
    assert (32'(CNT_BASE) + NUM_LEVELS * LEVEL_STRIDE <= 4096)
      else $error("stats_unit: counter arrays do not fit the 4 KB window");
  end
endmodule
