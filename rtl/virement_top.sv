// virement_top: the reconfigurable part of the four-core VIREMENT processor.
//
// Each core is a conventional in-order host CPU extended with a
// reconfigurable functional unit (VRFU). Hot basic blocks are compiled at
// run time into configuration contexts for the VRFU's datapath and replaced
// in the program by one BXV instruction holding the context's address.
// This module holds, per core, the decode-stage BXV logic (bxv_decoder) and
// the VRFU (vrfu = control unit + datapath), and one DMA (cfg_dma) shared
// by the four control units to fetch contexts from main memory.
//
// The host CPUs, their register files and L1 caches, and main memory are
// outside this module and connect through ports:
//   id_*      instruction in each core's decode stage; id_stall back to it
//   rf_*      each core's register file and NZCV flags (read as operands,
//             written with results in the cycle the BXV completes)
//   dc_*      each core's data-cache ports, one per bank (bank = address
//             bit 2); dc_ready low is a miss and holds the VRFU
//   mem_*     main-memory read port of the context DMA (in-order data)
//   ev        per-core event pulses for performance counting
// Defaults follow the evaluated configuration: 4 cores, a 4 x 4 datapath
// with two load/store PEs per row, a two-bank data cache. The context-cache
// size (4 contexts) is this design's own choice.
module virement_top
  import vrm_pkg::*;
#(
  parameter int unsigned NCORES      = 4,
  parameter int unsigned ROWS        = 4,
  parameter int unsigned COLS        = 4,
  parameter int unsigned NLS         = 2,
  parameter int unsigned NBANKS      = 2,
  parameter int unsigned CTX_ENTRIES = 4,
  parameter int unsigned LENW        = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // decode stage of each core
  input  logic            id_valid     [NCORES],
  input  logic [31:0]     id_instr     [NCORES],
  input  logic            id_arm_state [NCORES],
  output logic            id_stall     [NCORES],
  // register file and flags of each core
  input  logic [XLEN-1:0] rf_regs      [NCORES][NREG],
  input  flags_t          rf_flags     [NCORES],
  output logic            rf_we        [NCORES][NREG],
  output logic [XLEN-1:0] rf_wdata     [NCORES][NREG],
  output logic            rf_fwe       [NCORES],
  output flags_t          rf_fdata     [NCORES],
  // data cache of each core, one port per bank
  output logic            dc_req       [NCORES][NBANKS],
  output logic            dc_we        [NCORES][NBANKS],
  output logic [XLEN-1:0] dc_addr      [NCORES][NBANKS],
  output logic [XLEN-1:0] dc_wdata     [NCORES][NBANKS],
  input  logic [XLEN-1:0] dc_rdata     [NCORES][NBANKS],
  input  logic            dc_ready     [NCORES][NBANKS],
  // main memory (context fetch)
  output logic            mem_req,
  output logic [XLEN-1:0] mem_addr,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [XLEN-1:0] mem_rdata,
  // events
  output vcu_ev_t         ev           [NCORES]
);

  logic            bxv_valid  [NCORES];
  logic [CTX_AW-1:0] bxv_addr [NCORES];
  logic            done       [NCORES];
  logic            dma_req    [NCORES];
  logic [XLEN-1:0] dma_addr   [NCORES];
  logic [LENW-1:0] dma_len    [NCORES];
  logic            dma_gnt    [NCORES];
  logic            dma_wvalid [NCORES];
  logic            dma_done   [NCORES];
  logic [LENW-1:0] dma_widx;
  logic [XLEN-1:0] dma_wdata;

  for (genvar k = 0; k < NCORES; k++) begin : g_core
    bxv_decoder u_dec (
      .clk          (clk),
      .rst_n        (rst_n),
      .id_valid     (id_valid[k]),
      .id_instr     (id_instr[k]),
      .id_arm_state (id_arm_state[k]),
      .vrfu_done    (done[k]),
      .stall        (id_stall[k]),
      .bxv_valid    (bxv_valid[k]),
      .bxv_addr     (bxv_addr[k])
    );

    vrfu #(
      .ROWS (ROWS), .COLS (COLS), .NLS (NLS), .NBANKS (NBANKS),
      .CTX_ENTRIES (CTX_ENTRIES), .LENW (LENW)
    ) u_vrfu (
      .clk (clk), .rst_n (rst_n),
      .bxv_valid (bxv_valid[k]), .bxv_addr (bxv_addr[k]), .done (done[k]),
      .rf_regs (rf_regs[k]), .rf_flags (rf_flags[k]),
      .rf_we (rf_we[k]), .rf_wdata (rf_wdata[k]), .rf_fwe (rf_fwe[k]), .rf_fdata (rf_fdata[k]),
      .dma_req (dma_req[k]), .dma_addr (dma_addr[k]), .dma_len (dma_len[k]), .dma_gnt (dma_gnt[k]),
      .dma_wvalid (dma_wvalid[k]), .dma_widx (dma_widx), .dma_wdata (dma_wdata), .dma_done (dma_done[k]),
      .dc_req (dc_req[k]), .dc_we (dc_we[k]), .dc_addr (dc_addr[k]), .dc_wdata (dc_wdata[k]),
      .dc_rdata (dc_rdata[k]), .dc_ready (dc_ready[k]),
      .ev (ev[k])
    );
  end

  cfg_dma #(.NCH (NCORES), .LENW (LENW)) u_dma (
    .clk (clk), .rst_n (rst_n),
    .ch_req (dma_req), .ch_addr (dma_addr), .ch_len (dma_len), .ch_gnt (dma_gnt),
    .ch_wvalid (dma_wvalid), .ch_widx (dma_widx), .ch_wdata (dma_wdata), .ch_done (dma_done),
    .mem_req (mem_req), .mem_addr (mem_addr), .mem_gnt (mem_gnt),
    .mem_rvalid (mem_rvalid), .mem_rdata (mem_rdata)
  );

endmodule
