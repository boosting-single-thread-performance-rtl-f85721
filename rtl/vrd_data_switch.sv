// vrd_data_switch: the data switch box in front of one row of the
// reconfigurable datapath.
//
// For each PE of the row it selects the two 32-bit operands. A source is
// one of the host registers r0..r15, any output of the previous row, or the
// PE's own immediate (select codes in vrm_pkg). Connecting only the
// previous row to the next, as the architecture does, keeps placement and
// routing trivial for the run-time compiler. Offering the host registers
// to every row and giving each PE one immediate are this design's own
// choices: a value that is live on entry then needs no PE to carry it down. In the first
// row (FIRST_ROW = 1) there is no previous row and such selects give zero,
// as do unused codes. Purely combinational.
module vrd_data_switch
  import vrm_pkg::*;
#(
  parameter int unsigned COLS      = 4,
  parameter bit          FIRST_ROW = 1'b0
) (
  input  pe_cfg_t         cfg  [COLS],
  input  logic [XLEN-1:0] regs [NREG],
  input  logic [XLEN-1:0] prev [COLS],
  output logic [XLEN-1:0] opa  [COLS],
  output logic [XLEN-1:0] opb  [COLS]
);

  function automatic logic [XLEN-1:0] pick(logic [7:0] sel, logic [XLEN-1:0] imm,
                                           logic [XLEN-1:0] r [NREG],
                                           logic [XLEN-1:0] p [COLS]);
    logic [XLEN-1:0] v;
    v = '0;
    if (sel == SRC_IMM)
      v = imm;
    for (int i = 0; i < NREG; i++)
      if (sel == SRC_REG0 + 8'(i))
        v = r[i];
    if (!FIRST_ROW)
      for (int c = 0; c < COLS; c++)
        if (sel == SRC_PREV0 + 8'(c))
          v = p[c];
    return v;
  endfunction

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      opa[c] = pick(cfg[c].srca, cfg[c].imm, regs, prev);
      opb[c] = pick(cfg[c].srcb, cfg[c].imm, regs, prev);
    end
  end

endmodule
