// vrfu: the VIREMENT reconfigurable functional unit of one core: the
// control unit (vcu, with its context cache) driving the reconfigurable
// datapath (vrd).
//
// The decode stage hands over a BXV's context address; the VCU finds or
// fetches the context, configures the datapath, latches the host registers
// and flags as operands, performs the datapath's loads and stores through
// the core's two data-cache banks, writes the results back to the host and
// signals completion. See vcu.sv for the cycle-level sequence and vrd.sv
// for the datapath and the context layout.
module vrfu
  import vrm_pkg::*;
#(
  parameter int unsigned ROWS        = 4,
  parameter int unsigned COLS        = 4,
  parameter int unsigned NLS         = 2,
  parameter int unsigned NBANKS      = 2,
  parameter int unsigned CTX_ENTRIES = 4,
  parameter int unsigned LENW        = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bxv_valid,
  input  logic [CTX_AW-1:0] bxv_addr,
  output logic            done,
  input  logic [XLEN-1:0] rf_regs   [NREG],
  input  flags_t          rf_flags,
  output logic            rf_we     [NREG],
  output logic [XLEN-1:0] rf_wdata  [NREG],
  output logic            rf_fwe,
  output flags_t          rf_fdata,
  output logic            dma_req,
  output logic [XLEN-1:0] dma_addr,
  output logic [LENW-1:0] dma_len,
  input  logic            dma_gnt,
  input  logic            dma_wvalid,
  input  logic [LENW-1:0] dma_widx,
  input  logic [XLEN-1:0] dma_wdata,
  input  logic            dma_done,
  output logic            dc_req    [NBANKS],
  output logic            dc_we     [NBANKS],
  output logic [XLEN-1:0] dc_addr   [NBANKS],
  output logic [XLEN-1:0] dc_wdata  [NBANKS],
  input  logic [XLEN-1:0] dc_rdata  [NBANKS],
  input  logic            dc_ready  [NBANKS],
  output vcu_ev_t         ev
);

  localparam int unsigned CTX_WORDS = ctx_words(ROWS, COLS);

  logic [XLEN-1:0] ctx       [CTX_WORDS];
  logic [XLEN-1:0] op_regs   [NREG];
  flags_t          op_flags;
  logic [XLEN-1:0] ld_data   [ROWS][NLS];
  ls_req_t         ls        [ROWS][NLS];
  logic            vrd_we    [NREG];
  logic [XLEN-1:0] vrd_wdata [NREG];
  logic            vrd_fwe;
  flags_t          vrd_fdata;

  vcu #(
    .ROWS (ROWS), .COLS (COLS), .NLS (NLS), .NBANKS (NBANKS),
    .CTX_ENTRIES (CTX_ENTRIES), .CTX_WORDS (CTX_WORDS), .LENW (LENW)
  ) u_vcu (
    .clk (clk), .rst_n (rst_n),
    .bxv_valid (bxv_valid), .bxv_addr (bxv_addr), .done (done),
    .rf_regs (rf_regs), .rf_flags (rf_flags),
    .rf_we (rf_we), .rf_wdata (rf_wdata), .rf_fwe (rf_fwe), .rf_fdata (rf_fdata),
    .ctx (ctx), .op_regs (op_regs), .op_flags (op_flags),
    .ld_data (ld_data), .ls (ls),
    .vrd_we (vrd_we), .vrd_wdata (vrd_wdata), .vrd_fwe (vrd_fwe), .vrd_fdata (vrd_fdata),
    .dma_req (dma_req), .dma_addr (dma_addr), .dma_len (dma_len), .dma_gnt (dma_gnt),
    .dma_wvalid (dma_wvalid), .dma_widx (dma_widx), .dma_wdata (dma_wdata), .dma_done (dma_done),
    .dc_req (dc_req), .dc_we (dc_we), .dc_addr (dc_addr), .dc_wdata (dc_wdata),
    .dc_rdata (dc_rdata), .dc_ready (dc_ready),
    .ev (ev)
  );

  vrd #(
    .ROWS (ROWS), .COLS (COLS), .NLS (NLS), .CTX_WORDS (CTX_WORDS)
  ) u_vrd (
    .ctx (ctx), .regs (op_regs), .cpu_flags (op_flags),
    .ld_data (ld_data), .ls (ls),
    .we (vrd_we), .wdata (vrd_wdata), .fwe (vrd_fwe), .fdata (vrd_fdata)
  );

endmodule
