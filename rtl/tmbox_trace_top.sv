// tmbox_trace_top: tracing, statistics and memory-side infrastructure of an
// NUM_CORES-core hybrid transactional memory system on one FPGA.
//
// The processor cores, their caches and hardware TM units are not part of
// this module; each core's side is brought out as ports.  What is inside:
//   * per core, an event generation unit that watches the HTM unit state and
//     takes software events, a log unit that delta-timestamps and buffers the
//     events (32 entries), and a node on the invalidation/event ring;
//   * the ring stop of the bus controller, which takes every event off the
//     ring and feeds the statistics unit (per-core, per-type counters for the
//     time since reset, the current and the previous sampling period);
//   * the bus controller, which serves quad-word memory requests with 4-word
//     DDR2 bursts, maps the statistics unit (0x0FFFF000) and the 8 KB boot
//     loader RAM, and arbitrates the HTM commit bus lock;
//   * three dual-clock FIFOs between the system domain (clk_sys, 50 MHz) and
//     the DDR2 controller domain (clk_ddr, 200 MHz): burst commands, write
//     beats, read beats;
//   * reset management (debounced button, PLL reset, DDR2 reset, system
//     reset released in that order) and the UART of core 0.
// Ring order: bus controller stop (node id 15, event sink) -> core 0 -> ...
// -> core NUM_CORES-1 -> back to the bus controller stop.  An invalidation
// from core i is seen by every other core on rx_inv_* and removed when it
// returns to core i; events travel to the bus controller stop.
// The memory ring that carries requests from the cores is not modelled: its
// requests and responses appear as the mem_req_*/mem_resp_* ports.  Main
// memory is chosen by BRAM_MAIN_MEMORY:
//   1 (default): a block-RAM memory of BRAM_MEM_WORDS 128-bit words (128 KB,
//          addresses wrap) sits behind the FIFOs in the clk_ddr domain.  The
//          ddr_* outputs are then held idle and the ddr_* inputs are unused;
//          the lint notes about those ports are expected.
//   0:     the DDR2 controller is external: its command, write-data and
//          read-data queue ends are the ddr_* ports in the clk_ddr domain.
// The units and how they connect follow the tracing design of the system;
// port shapes, the ring order and the default sizes marked in each unit are
// this design's own.
module tmbox_trace_top
  import tm_trace_pkg::*;
#(
  parameter int unsigned NUM_CORES       = 8,
  parameter int unsigned LOG_DEPTH       = 32,
  parameter int unsigned NUM_LEVELS      = 3,
  parameter logic [31:0] STATS_PERIOD    = 32'd100_000,
  parameter int unsigned CDC_DEPTH       = 16,
  parameter int unsigned CLK_SYS_HZ      = 50_000_000,
  parameter int unsigned UART_BAUD       = 115_200,
  parameter int unsigned DEBOUNCE_CYCLES = 65536,
  parameter int unsigned LOADER_WORDS    = 512,
  parameter bit          BRAM_MAIN_MEMORY = 1'b1,
  parameter int unsigned BRAM_MEM_WORDS  = 8192
) (
  // clocks and reset
  input  logic         clk_ref,
  input  logic         clk_sys,
  input  logic         clk_ddr,
  input  logic         rst_btn,
  input  logic         pll_locked,
  input  logic         ddr_calib_done,
  output logic         rst_pll,
  output logic         rst_ddr,
  output logic         rst_sys,
  // per-core HTM unit state (system domain)
  input  htm_state_e   htm_state       [NUM_CORES],
  input  abort_cause_e htm_abort_cause [NUM_CORES],
  input  logic [CORE_ID_W-1:0] htm_abort_core [NUM_CORES],
  // per-core invalidations sent and received
  input  logic [NUM_CORES-1:0] inv_valid,
  input  logic [31:0]          inv_addr [NUM_CORES],
  output logic [NUM_CORES-1:0] inv_ready,
  output logic [NUM_CORES-1:0] rx_inv_valid,
  output logic [31:0]          rx_inv_addr [NUM_CORES],
  output logic [CORE_ID_W-1:0] rx_inv_sender [NUM_CORES],
  // per-core software event instructions
  input  logic [NUM_CORES-1:0] sw_ev_valid,
  input  logic [EV_TYPE_W-1:0] sw_ev_type [NUM_CORES],
  input  logic [EV_DATA_W-1:0] sw_ev_data [NUM_CORES],
  output logic [NUM_CORES-1:0] sw_ev_ready,
  // per-core trace loss counters
  output logic [15:0]          trace_lost [NUM_CORES],
  // per-core bus lock
  input  logic [NUM_CORES-1:0] lock_req,
  output logic [NUM_CORES-1:0] lock_grant,
  // memory requests from the memory ring
  input  logic         mem_req_valid,
  output logic         mem_req_ready,
  input  logic         mem_req_write,
  input  logic [31:0]  mem_req_addr,
  input  logic [127:0] mem_req_wdata,
  input  logic [3:0]   mem_req_src,
  output logic         mem_resp_valid,
  output logic         mem_resp_write,
  output logic [127:0] mem_resp_rdata,
  output logic [3:0]   mem_resp_src,
  // DDR2 controller queues (clk_ddr domain)
  output logic         ddr_cmd_valid,
  input  logic         ddr_cmd_ready,
  output logic         ddr_cmd_write,
  output logic [31:0]  ddr_cmd_addr,
  output logic         ddr_wd_valid,
  input  logic         ddr_wd_ready,
  output logic [127:0] ddr_wd_data,
  output logic [15:0]  ddr_wd_mask,
  input  logic         ddr_rd_valid,
  output logic         ddr_rd_full,
  input  logic [127:0] ddr_rd_data,
  // statistics status
  output logic         stats_period_end,
  output logic [31:0]  stats_period_number,
  // UART of core 0
  input  logic         uart_rxd,
  output logic         uart_txd,
  input  logic         uart_tx_valid,
  output logic         uart_tx_ready,
  input  logic [7:0]   uart_tx_data,
  output logic         uart_rx_valid,
  output logic [7:0]   uart_rx_data,
  output logic         uart_rx_err
);
  localparam logic [CORE_ID_W-1:0] CTRL_NODE_ID = '1;

  // ------------------------------------------------------------------ reset
  logic rst_btn_db;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .clk (clk_ref), .btn_in (rst_btn), .btn_out (rst_btn_db)
  );

  reset_generator u_reset (
    .clk_ref, .clk_ddr, .clk_sys,
    .rst_in (rst_btn_db), .pll_locked, .ddr_calib_done,
    .rst_pll, .rst_stage1 (rst_ddr), .rst_stage2 (rst_sys)
  );

  // ------------------------------------------------------------------- ring
  ring_msg_t ring_link [NUM_CORES+1];   // output of node k, k = 0 is the controller stop

  logic        sink_valid;
  logic [CORE_ID_W-1:0] sink_sender;
  logic [31:0] sink_word;

  ring_node #(.NODE_ID(CTRL_NODE_ID), .SINK_EVENTS(1'b1)) u_ctrl_node (
    .clk (clk_sys), .rst (rst_sys),
    .ring_in  (ring_link[NUM_CORES]),
    .ring_out (ring_link[0]),
    .inv_valid (1'b0), .inv_addr ('0), .inv_ready (),
    .ev_valid  (1'b0), .ev_word ('0),  .ev_ready (),
    .rx_inv_valid (), .rx_inv_addr (), .rx_inv_sender (),
    .sink_valid, .sink_sender, .sink_word
  );

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_core
    logic   ev_valid;
    event_t ev;
    logic   log_valid, log_ready;
    logic [31:0] log_word;

    event_gen u_event_gen (
      .clk (clk_sys), .rst (rst_sys),
      .htm_state       (htm_state[i]),
      .htm_abort_cause (htm_abort_cause[i]),
      .htm_abort_core  (htm_abort_core[i]),
      .inv_sent        (inv_valid[i] && inv_ready[i]),
      .sw_ev_valid     (sw_ev_valid[i]),
      .sw_ev_type      (sw_ev_type[i]),
      .sw_ev_data      (sw_ev_data[i]),
      .sw_ev_ready     (sw_ev_ready[i]),
      .ev_valid, .ev,
      .inv_lost        ()
    );

    log_unit #(.DEPTH(LOG_DEPTH)) u_log (
      .clk (clk_sys), .rst (rst_sys),
      .ev_valid, .ev,
      .tx_valid (log_valid), .tx_word (log_word), .tx_ready (log_ready),
      .fill (), .lost_count (trace_lost[i]), .overflow_ev ()
    );

    ring_node #(.NODE_ID(CORE_ID_W'(i)), .SINK_EVENTS(1'b0)) u_node (
      .clk (clk_sys), .rst (rst_sys),
      .ring_in  (ring_link[i]),
      .ring_out (ring_link[i+1]),
      .inv_valid (inv_valid[i]), .inv_addr (inv_addr[i]), .inv_ready (inv_ready[i]),
      .ev_valid (log_valid), .ev_word (log_word), .ev_ready (log_ready),
      .rx_inv_valid  (rx_inv_valid[i]),
      .rx_inv_addr   (rx_inv_addr[i]),
      .rx_inv_sender (rx_inv_sender[i]),
      .sink_valid (), .sink_sender (), .sink_word ()
    );
  end

  // ------------------------------------------------------- statistics unit
  logic        st_valid, st_write, st_rvalid;
  logic [11:0] st_addr;
  logic [31:0] st_wdata, st_rdata;

  stats_unit #(
    .NUM_CORES (NUM_CORES), .NUM_LEVELS (NUM_LEVELS), .DEFAULT_PERIOD (STATS_PERIOD)
  ) u_stats (
    .clk (clk_sys), .rst (rst_sys),
    .ev_valid (sink_valid), .ev_sender (sink_sender), .ev_word (sink_word),
    .reg_valid (st_valid), .reg_write (st_write), .reg_addr (st_addr),
    .reg_wdata (st_wdata), .reg_rvalid (st_rvalid), .reg_rdata (st_rdata),
    .period_end (stats_period_end), .period_number (stats_period_number)
  );

  // -------------------------------------------------------- bus controller
  localparam int unsigned BA_W = $clog2(LOADER_WORDS);
  logic            bram_en, bram_we;
  logic [BA_W-1:0] bram_addr;
  logic [127:0]    bram_wdata, bram_rdata;

  logic         bc_cmd_valid, bc_cmd_ready, bc_cmd_write;
  logic [31:0]  bc_cmd_addr;
  logic         bc_wd_valid, bc_wd_ready;
  logic [127:0] bc_wd_data;
  logic [15:0]  bc_wd_mask;
  logic         bc_rd_valid, bc_rd_ready;
  logic [127:0] bc_rd_data;

  bus_controller #(.NUM_CORES (NUM_CORES), .LOADER_WORDS (LOADER_WORDS)) u_bus_ctrl (
    .clk (clk_sys), .rst (rst_sys),
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_write (mem_req_write),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata), .req_src (mem_req_src),
    .resp_valid (mem_resp_valid), .resp_write (mem_resp_write),
    .resp_rdata (mem_resp_rdata), .resp_src (mem_resp_src),
    .ddr_cmd_valid (bc_cmd_valid), .ddr_cmd_ready (bc_cmd_ready),
    .ddr_cmd_write (bc_cmd_write), .ddr_cmd_addr (bc_cmd_addr),
    .ddr_wd_valid (bc_wd_valid), .ddr_wd_ready (bc_wd_ready),
    .ddr_wd_data (bc_wd_data), .ddr_wd_mask (bc_wd_mask),
    .ddr_rd_valid (bc_rd_valid), .ddr_rd_ready (bc_rd_ready), .ddr_rd_data (bc_rd_data),
    .stats_valid (st_valid), .stats_write (st_write), .stats_addr (st_addr),
    .stats_wdata (st_wdata), .stats_rvalid (st_rvalid), .stats_rdata (st_rdata),
    .bram_en, .bram_we, .bram_addr, .bram_wdata, .bram_rdata,
    .lock_req, .lock_grant
  );

  loader_bram #(.WORDS (LOADER_WORDS)) u_loader (
    .clk (clk_sys), .en (bram_en), .we (bram_we), .addr (bram_addr),
    .wdata (bram_wdata), .rdata (bram_rdata)
  );

  // ---------------------------------------------------- clock domain crossing
  logic cmd_full, wd_full, rd_empty, cmd_empty, wd_empty;

  // DDR2-side ends of the FIFOs (clk_ddr domain).
  logic         m_cmd_valid, m_cmd_ready, m_cmd_write;
  logic [31:0]  m_cmd_addr;
  logic         m_wd_valid, m_wd_ready;
  logic [127:0] m_wd_data, m_rd_data;
  logic [15:0]  m_wd_mask;
  logic         m_rd_valid, m_rd_full;

  cdc_fifo #(.WIDTH (33), .DEPTH (CDC_DEPTH)) u_cdc_cmd (
    .wr_clk (clk_sys), .wr_rst (rst_sys),
    .wr_en (bc_cmd_valid && !cmd_full), .wr_data ({bc_cmd_write, bc_cmd_addr}), .wr_full (cmd_full),
    .rd_clk (clk_ddr), .rd_rst (rst_ddr),
    .rd_en (m_cmd_ready), .rd_data ({m_cmd_write, m_cmd_addr}), .rd_empty (cmd_empty)
  );
  assign bc_cmd_ready = !cmd_full;
  assign m_cmd_valid  = !cmd_empty;

  cdc_fifo #(.WIDTH (144), .DEPTH (CDC_DEPTH)) u_cdc_wdata (
    .wr_clk (clk_sys), .wr_rst (rst_sys),
    .wr_en (bc_wd_valid && !wd_full), .wr_data ({bc_wd_mask, bc_wd_data}), .wr_full (wd_full),
    .rd_clk (clk_ddr), .rd_rst (rst_ddr),
    .rd_en (m_wd_ready), .rd_data ({m_wd_mask, m_wd_data}), .rd_empty (wd_empty)
  );
  assign bc_wd_ready = !wd_full;
  assign m_wd_valid  = !wd_empty;

  cdc_fifo #(.WIDTH (128), .DEPTH (CDC_DEPTH)) u_cdc_rdata (
    .wr_clk (clk_ddr), .wr_rst (rst_ddr),
    .wr_en (m_rd_valid), .wr_data (m_rd_data), .wr_full (m_rd_full),
    .rd_clk (clk_sys), .rd_rst (rst_sys),
    .rd_en (bc_rd_ready), .rd_data (bc_rd_data), .rd_empty (rd_empty)
  );
  assign bc_rd_valid = !rd_empty;

  // ------------------------------------------------------------ main memory
  if (BRAM_MAIN_MEMORY) begin : g_bram_mem
    ddr2_bram #(.WORDS (BRAM_MEM_WORDS)) u_main_mem (
      .clk (clk_ddr), .rst (rst_ddr),
      .cmd_valid (m_cmd_valid), .cmd_ready (m_cmd_ready),
      .cmd_write (m_cmd_write), .cmd_addr (m_cmd_addr),
      .wd_valid (m_wd_valid), .wd_ready (m_wd_ready),
      .wd_data (m_wd_data), .wd_mask (m_wd_mask),
      .rd_valid (m_rd_valid), .rd_full (m_rd_full), .rd_data (m_rd_data)
    );
    assign ddr_cmd_valid = 1'b0;
    assign ddr_cmd_write = 1'b0;
    assign ddr_cmd_addr  = '0;
    assign ddr_wd_valid  = 1'b0;
    assign ddr_wd_data   = '0;
    assign ddr_wd_mask   = '0;
    assign ddr_rd_full   = 1'b1;
  end else begin : g_ext_mem
    assign ddr_cmd_valid = m_cmd_valid;
    assign ddr_cmd_write = m_cmd_write;
    assign ddr_cmd_addr  = m_cmd_addr;
    assign m_cmd_ready   = ddr_cmd_ready;
    assign ddr_wd_valid  = m_wd_valid;
    assign ddr_wd_data   = m_wd_data;
    assign ddr_wd_mask   = m_wd_mask;
    assign m_wd_ready    = ddr_wd_ready;
    assign m_rd_valid    = ddr_rd_valid;
    assign m_rd_data     = ddr_rd_data;
    assign ddr_rd_full   = m_rd_full;
  end

  // ------------------------------------------------------------------- UART
  uart #(.CLK_HZ (CLK_SYS_HZ), .BAUD (UART_BAUD)) u_uart (
    .clk (clk_sys), .rst (rst_sys),
    .tx_valid (uart_tx_valid), .tx_ready (uart_tx_ready), .tx_data (uart_tx_data),
    .txd (uart_txd), .rxd (uart_rxd),
    .rx_valid (uart_rx_valid), .rx_data (uart_rx_data), .rx_frame_err (uart_rx_err)
  );

  initial assert (NUM_CORES >= 1 && NUM_CORES < 16)
    else $error("tmbox_trace_top: 1 to 15 cores (id 15 is the controller stop)");
endmodule
