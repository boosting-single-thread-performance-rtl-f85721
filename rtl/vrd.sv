// vrd: the reconfigurable datapath, a ROWS x COLS array of ALU processing
// elements (4 x 4 by default, two load/store PEs per row).
//
// Computation flows from the top row to the bottom. In front of every row
// a data switch and a flag switch route the previous row's outputs, the
// host registers, the host flags and per-PE immediates to the PE inputs;
// after the last row a result switch picks the values written back to the
// host. The array holds no state: it is one combinational network set up by
// the configuration context `ctx`.
//
// Memory: the PEs in columns 0..NLS-1 of each row may load or store. Each
// asks for its access through ls[row][col]; the VCU performs the accesses
// row by row and returns loaded words through ld_data[row][col], which the
// load PE then drives to the next row. The VCU also decides when the
// write-back outputs (we/wdata/fwe/fdata) take effect.
//
// Context layout (32-bit words): word 2p is PE p's control word, word 2p+1
// its immediate (p = row*COLS + col); then NREG/4 words of register
// write-back selects, register r in byte r%4 of word r/4; then one word
// whose low byte is the flag write-back select. The layout is this design's
// own choice.
module vrd
  import vrm_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned NLS       = 2,
  parameter int unsigned CTX_WORDS = ctx_words(ROWS, COLS)
) (
  input  logic [XLEN-1:0] ctx       [CTX_WORDS],
  input  logic [XLEN-1:0] regs      [NREG],
  input  flags_t          cpu_flags,
  input  logic [XLEN-1:0] ld_data   [ROWS][NLS],
  output ls_req_t         ls        [ROWS][NLS],
  output logic            we        [NREG],
  output logic [XLEN-1:0] wdata     [NREG],
  output logic            fwe,
  output flags_t          fdata
);

  localparam int unsigned NPE     = ROWS * COLS;
  localparam int unsigned WB_BASE = 2 * NPE;

  pe_cfg_t         cfg  [ROWS][COLS];
  logic [XLEN-1:0] pe_y [NPE];
  flags_t          pe_f [NPE];
  wb_sel_t         wb   [NREG];
  wb_sel_t         fwb;

  // Unpack the context.
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        cfg[r][c] = pe_cfg_t'({ctx[2*(r*COLS+c)+1], ctx[2*(r*COLS+c)]});
    for (int i = 0; i < NREG; i++)
      wb[i] = wb_sel_t'(ctx[WB_BASE + i/4][8*(i%4) +: 8]);
    fwb = wb_sel_t'(ctx[WB_BASE + NREG/4][7:0]);
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [XLEN-1:0] prev_y [COLS];
    flags_t          prev_f [COLS];
    logic [XLEN-1:0] opa    [COLS];
    logic [XLEN-1:0] opb    [COLS];
    logic            fin    [COLS];
    logic [XLEN-1:0] y      [COLS];   // this row's PE results
    flags_t          f      [COLS];   // this row's PE flags
    ls_req_t         lsq    [COLS];
    logic [XLEN-1:0] ldin   [COLS];

    if (r == 0) begin : g_top
      always_comb
        for (int c = 0; c < COLS; c++) begin
          prev_y[c] = '0;
          prev_f[c] = '0;
        end
    end else begin : g_inner
      always_comb
        for (int c = 0; c < COLS; c++) begin
          prev_y[c] = g_row[r-1].y[c];
          prev_f[c] = g_row[r-1].f[c];
        end
    end

    vrd_data_switch #(.COLS(COLS), .FIRST_ROW(r == 0)) u_dsw (
      .cfg  (cfg[r]),
      .regs (regs),
      .prev (prev_y),
      .opa  (opa),
      .opb  (opb)
    );

    vrd_flag_switch #(.COLS(COLS), .FIRST_ROW(r == 0)) u_fsw (
      .cfg       (cfg[r]),
      .cpu_flags (cpu_flags),
      .prev      (prev_f),
      .fin       (fin)
    );

    for (genvar c = 0; c < COLS; c++) begin : g_col
      if (c < NLS) begin : g_ldin
        assign ldin[c] = ld_data[r][c];
      end else begin : g_noldin
        assign ldin[c] = '0;
      end

      vrd_pe #(.LS_CAPABLE(c < NLS)) u_pe (
        .cfg     (cfg[r][c]),
        .opa     (opa[c]),
        .opb     (opb[c]),
        .fin     (fin[c]),
        .ld_data (ldin[c]),
        .y       (y[c]),
        .f       (f[c]),
        .ls      (lsq[c])
      );

      assign pe_y[r*COLS+c] = y[c];
      assign pe_f[r*COLS+c] = f[c];
    end

    for (genvar s = 0; s < NLS; s++) begin : g_ls
      assign ls[r][s] = lsq[s];
    end
  end

  vrd_result_switch #(.NPE(NPE)) u_rsw (
    .wb    (wb),
    .fwb   (fwb),
    .pe_y  (pe_y),
    .pe_f  (pe_f),
    .we    (we),
    .wdata (wdata),
    .fwe   (fwe),
    .fdata (fdata)
  );

endmodule
