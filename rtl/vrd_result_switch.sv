// vrd_result_switch: the output switch at the bottom of the reconfigurable
// datapath, which hands results back to the host register file.
//
// For each of the 16 host registers the context holds a write-back select
// (enable bit and source PE index); one more select chooses the PE whose
// N, Z, C, V flags are written to the host flags. Any PE of any row may be
// a source, since a value defined high in the array can be live out of the
// basic block; reaching every PE, not only the last row, is this design's
// own choice. A select naming a PE that does not exist writes nothing.
// Purely combinational; the VCU decides when the writes take effect.
module vrd_result_switch
  import vrm_pkg::*;
#(
  parameter int unsigned NPE = 16
) (
  input  wb_sel_t         wb    [NREG],
  input  wb_sel_t         fwb,
  input  logic [XLEN-1:0] pe_y  [NPE],
  input  flags_t          pe_f  [NPE],
  output logic            we    [NREG],
  output logic [XLEN-1:0] wdata [NREG],
  output logic            fwe,
  output flags_t          fdata
);

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      we[r]    = wb[r].en && (32'(wb[r].pe) < NPE);
      wdata[r] = '0;
      for (int p = 0; p < NPE; p++)
        if (wb[r].pe == 7'(p))
          wdata[r] = pe_y[p];
    end
    fwe   = fwb.en && (32'(fwb.pe) < NPE);
    fdata = '0;
    for (int p = 0; p < NPE; p++)
      if (fwb.pe == 7'(p))
        fdata = pe_f[p];
  end

endmodule
