// vcu: the VIREMENT control unit of one core.
//
// It runs one BXV from start to end:
//   1. IDLE    the decode stage hands over the BXV's context address
//              (bxv_valid/bxv_addr); the host registers and flags are
//              latched as the operands of the datapath.
//   2. LOOKUP  the context cache is searched. On a hit the entry becomes
//              most recently used and execution starts next cycle.
//   3. DMA_REQ on a miss the least recently used entry is invalidated and
//              a transfer of CTX_WORDS words from byte address bxv_addr*4 is
//              posted to the DMA;
//      FILL    the words are written into the entry as they arrive; with
//              the last one the entry is installed and made most recent.
//   4. EXEC    the datapath is combinational, so only its memory accesses
//              take time. Rows are visited top to bottom, one per cycle at
//              least. The load/store PEs of the current row use the data
//              cache bank selected by address bit 2 (word interleaving);
//              two accesses to one bank go one after the other, lower
//              column first, and a port whose ready stays low (a miss)
//              holds the row. Loaded words are kept in ld_data, which feeds
//              the datapath, until the BXV ends.
//   5. WB      the datapath's write-back outputs are passed to the host
//              register file and flags for one cycle, and done is pulsed
//              so that the decode stage releases its stall.
// With a context hit and no waiting on memory, done comes ROWS + 2 cycles
// after bxv_valid. The step order follows the architecture; the cycle-level
// sequencing, the bank mapping and the operand latch are this design's own.
module vcu
  import vrm_pkg::*;
#(
  parameter int unsigned ROWS        = 4,
  parameter int unsigned COLS        = 4,
  parameter int unsigned NLS         = 2,
  parameter int unsigned NBANKS      = 2,
  parameter int unsigned CTX_ENTRIES = 4,
  parameter int unsigned CTX_WORDS   = ctx_words(ROWS, COLS),
  parameter int unsigned LENW        = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // decode stage
  input  logic            bxv_valid,
  input  logic [CTX_AW-1:0] bxv_addr,
  output logic            done,
  // host register file and flags
  input  logic [XLEN-1:0] rf_regs   [NREG],
  input  flags_t          rf_flags,
  output logic            rf_we     [NREG],
  output logic [XLEN-1:0] rf_wdata  [NREG],
  output logic            rf_fwe,
  output flags_t          rf_fdata,
  // datapath
  output logic [XLEN-1:0] ctx       [CTX_WORDS],
  output logic [XLEN-1:0] op_regs   [NREG],
  output flags_t          op_flags,
  output logic [XLEN-1:0] ld_data   [ROWS][NLS],
  input  ls_req_t         ls        [ROWS][NLS],
  input  logic            vrd_we    [NREG],
  input  logic [XLEN-1:0] vrd_wdata [NREG],
  input  logic            vrd_fwe,
  input  flags_t          vrd_fdata,
  // DMA channel
  output logic            dma_req,
  output logic [XLEN-1:0] dma_addr,
  output logic [LENW-1:0] dma_len,
  input  logic            dma_gnt,
  input  logic            dma_wvalid,
  input  logic [LENW-1:0] dma_widx,
  input  logic [XLEN-1:0] dma_wdata,
  input  logic            dma_done,
  // data cache, one port per bank
  output logic            dc_req    [NBANKS],
  output logic            dc_we     [NBANKS],
  output logic [XLEN-1:0] dc_addr   [NBANKS],
  output logic [XLEN-1:0] dc_wdata  [NBANKS],
  input  logic [XLEN-1:0] dc_rdata  [NBANKS],
  input  logic            dc_ready  [NBANKS],
  // events
  output vcu_ev_t         ev
);

  localparam int unsigned EW  = (CTX_ENTRIES > 1) ? $clog2(CTX_ENTRIES) : 1;
  localparam int unsigned WIW = (CTX_WORDS > 1) ? $clog2(CTX_WORDS) : 1;
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned BW  = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned SW  = (NLS > 1) ? $clog2(NLS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_DMA_REQ, S_FILL, S_EXEC, S_WB
  } state_e;

  state_e            state;
  logic [CTX_AW-1:0] cur_addr;
  logic [EW-1:0]     way;         // entry in use
  logic [RW-1:0]     row;
  logic [NLS-1:0]    served;      // accesses of the current row already done

  // context cache
  logic              c_hit;
  logic [EW-1:0]     c_hit_way;
  logic [EW-1:0]     c_victim;
  logic              c_victim_valid;

  vcu_ctx_cache #(
    .ENTRIES (CTX_ENTRIES),
    .WORDS   (CTX_WORDS),
    .TAGW    (CTX_AW)
  ) u_cache (
    .clk          (clk),
    .rst_n        (rst_n),
    .lookup_tag   (cur_addr),
    .hit          (c_hit),
    .hit_way      (c_hit_way),
    .victim_way   (c_victim),
    .victim_valid (c_victim_valid),
    .alloc        (state == S_LOOKUP && !c_hit),
    .alloc_way    (c_victim),
    .fill_we      (state == S_FILL && dma_wvalid),
    .fill_way     (way),
    .fill_word    (WIW'(dma_widx)),
    .fill_data    (dma_wdata),
    .install      (state == S_FILL && dma_done),
    .install_way  (way),
    .install_tag  (cur_addr),
    .touch        ((state == S_LOOKUP && c_hit) || (state == S_FILL && dma_done)),
    .touch_way    ((state == S_LOOKUP) ? c_hit_way : way),
    .rd_way       (way),
    .rd_ctx       (ctx)
  );

  // ---------------------------------------------------------------------
  // Memory sequencing of the current row
  // ---------------------------------------------------------------------
  logic [NLS-1:0] pend;                 // still to be done in this row
  logic [BW-1:0]  bank     [NLS];
  logic           port_on  [NBANKS];
  logic [SW-1:0]  port_slot[NBANKS];
  logic [NLS-1:0] served_now;
  logic           row_done;
  logic           conflict;
  logic           stall;

  always_comb begin
    for (int s = 0; s < NLS; s++) begin
      pend[s] = (state == S_EXEC) && ls[row][s].req && !served[s];
      bank[s] = (NBANKS > 1) ? BW'(ls[row][s].addr >> 2) : '0;
    end
    served_now = '0;
    conflict   = 1'b0;
    stall      = 1'b0;
    for (int b = 0; b < NBANKS; b++) begin
      port_on[b]   = 1'b0;
      port_slot[b] = '0;
      for (int s = 0; s < NLS; s++)
        if (pend[s] && 32'(bank[s]) == b) begin
          if (!port_on[b]) begin
            port_on[b]   = 1'b1;
            port_slot[b] = SW'(s);
          end else
            conflict = 1'b1;
        end
      dc_req[b]   = port_on[b];
      dc_we[b]    = port_on[b] && ls[row][port_slot[b]].we;
      dc_addr[b]  = ls[row][port_slot[b]].addr;
      dc_wdata[b] = ls[row][port_slot[b]].wdata;
      if (port_on[b]) begin
        if (dc_ready[b]) served_now[port_slot[b]] = 1'b1;
        else             stall = 1'b1;
      end
    end
    row_done = ((pend & ~served_now) == '0);
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_addr <= '0;
      way      <= '0;
      row      <= '0;
      served   <= '0;
      op_flags <= '0;
      for (int i = 0; i < NREG; i++) op_regs[i] <= '0;
      for (int r = 0; r < ROWS; r++)
        for (int s = 0; s < NLS; s++) ld_data[r][s] <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (bxv_valid) begin
            cur_addr <= bxv_addr;
            op_regs  <= rf_regs;
            op_flags <= rf_flags;
            for (int r = 0; r < ROWS; r++)
              for (int s = 0; s < NLS; s++) ld_data[r][s] <= '0;
            state <= S_LOOKUP;
          end
        S_LOOKUP: begin
          row    <= '0;
          served <= '0;
          if (c_hit) begin
            way   <= c_hit_way;
            state <= S_EXEC;
          end else begin
            way   <= c_victim;
            state <= S_DMA_REQ;
          end
        end
        S_DMA_REQ:
          if (dma_gnt) state <= S_FILL;
        S_FILL:
          if (dma_done) state <= S_EXEC;
        S_EXEC: begin
          for (int b = 0; b < NBANKS; b++)
            if (port_on[b] && dc_ready[b] && !ls[row][port_slot[b]].we)
              ld_data[row][port_slot[b]] <= dc_rdata[b];
          if (row_done) begin
            served <= '0;
            if (32'(row) == ROWS - 1) state <= S_WB;
            else                      row   <= row + 1'b1;
          end else
            served <= served | served_now;
        end
        S_WB:
          state <= S_IDLE;
        default:
          state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    done     = (state == S_WB);
    dma_req  = (state == S_DMA_REQ);
    dma_addr = XLEN'({cur_addr, 2'b00});
    dma_len  = LENW'(CTX_WORDS);
    for (int i = 0; i < NREG; i++) begin
      rf_we[i]    = (state == S_WB) && vrd_we[i];
      rf_wdata[i] = vrd_wdata[i];
    end
    rf_fwe   = (state == S_WB) && vrd_fwe;
    rf_fdata = vrd_fdata;

    ev               = '0;
    ev.ctx_hit       = (state == S_LOOKUP) && c_hit;
    ev.ctx_miss      = (state == S_LOOKUP) && !c_hit;
    ev.ctx_evict     = (state == S_LOOKUP) && !c_hit && c_victim_valid;
    ev.bank_conflict = conflict;
    ev.mem_stall     = stall;
    ev.done          = done;
    for (int b = 0; b < NBANKS; b++) begin
      if (port_on[b] && dc_ready[b] && !dc_we[b]) ev.load  = 1'b1;
      if (port_on[b] && dc_ready[b] &&  dc_we[b]) ev.store = 1'b1;
    end
  end

  // A new BXV may only arrive while the unit is idle.
  a_bxv_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    bxv_valid |-> state == S_IDLE);
  // The DMA delivers exactly one context.
  a_fill_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FILL && dma_wvalid) |-> 32'(dma_widx) < CTX_WORDS);

endmodule
