// tb_vrd_result_switch: random write-back selects; each register write and
// the flag write must carry the value of the selected PE, and a select that
// is disabled or names a missing PE must write nothing.
module tb_vrd_result_switch;
  import vrm_pkg::*;

  localparam int NPE = 12;     // not a power of two: out-of-range selects exist
  wb_sel_t     wb [NREG];
  wb_sel_t     fwb;
  logic [31:0] pe_y [NPE];
  flags_t      pe_f [NPE];
  logic        we [NREG];
  logic [31:0] wdata [NREG];
  logic        fwe;
  flags_t      fdata;
  int checks = 0, failures = 0;

  vrd_result_switch #(.NPE(NPE)) dut (
    .wb(wb), .fwb(fwb), .pe_y(pe_y), .pe_f(pe_f),
    .we(we), .wdata(wdata), .fwe(fwe), .fdata(fdata));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int p = 0; p < NPE; p++) begin pe_y[p] = $urandom; pe_f[p] = flags_t'($urandom); end
      for (int i = 0; i < NREG; i++) wb[i] = wb_sel_t'({1'($urandom), 7'($urandom % 16)});
      fwb = wb_sel_t'({1'($urandom), 7'($urandom % 16)});
      #1;
      for (int i = 0; i < NREG; i++) begin
        bit ok;
        ok = wb[i].en && wb[i].pe < NPE;
        checks++;
        if (we[i] !== ok || (ok && wdata[i] !== pe_y[wb[i].pe])) failures++;
      end
      checks++;
      if (fwe !== (fwb.en && fwb.pe < NPE) || (fwe && fdata !== pe_f[fwb.pe])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
