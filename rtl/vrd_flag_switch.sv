// vrd_flag_switch: the flag switch box in front of one row of the
// reconfigurable datapath.
//
// Each PE has a 1-bit flag operand (the carry of ADC, SBC, shifts ...).
// The switch selects it from the host's N, Z, C, V flags, from any of the
// four flags of any PE of the previous row, or from a constant 0 or 1
// (select codes in vrm_pkg). In the first row (FIRST_ROW = 1) previous-row
// selects give zero. Purely combinational. A flag switch beside each data
// switch follows the architecture; host flags reaching every row, the
// constants and the select codes are this design's own.
module vrd_flag_switch
  import vrm_pkg::*;
#(
  parameter int unsigned COLS      = 4,
  parameter bit          FIRST_ROW = 1'b0
) (
  input  pe_cfg_t    cfg       [COLS],
  input  flags_t     cpu_flags,
  input  flags_t     prev      [COLS],
  output logic       fin       [COLS]
);

  function automatic logic pick(logic [7:0] sel, flags_t cpu, flags_t p [COLS]);
    logic v;
    v = (sel == FSEL_ONE);
    if (sel < FSEL_PREV0)
      v = flag_bit(cpu, sel[1:0]);
    if (!FIRST_ROW)
      for (int c = 0; c < COLS; c++)
        if (sel[7:2] == 6'(32'(FSEL_PREV0) / 4 + c))
          v = flag_bit(p[c], sel[1:0]);
    return v;
  endfunction

  always_comb begin
    for (int c = 0; c < COLS; c++)
      fin[c] = pick(cfg[c].fsel, cpu_flags, prev);
  end

endmodule
