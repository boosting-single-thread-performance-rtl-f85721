// tb_vrd_data_switch: random source selects for an inner row and for the
// first row of the datapath; every operand is compared with the value the
// select code names.
module tb_vrd_data_switch;
  import vrm_pkg::*;

  localparam int COLS = 4;
  pe_cfg_t     cfg  [COLS];
  logic [31:0] regs [NREG];
  logic [31:0] prev [COLS];
  logic [31:0] opa [COLS], opb [COLS], opa0 [COLS], opb0 [COLS];
  int checks = 0, failures = 0;

  vrd_data_switch #(.COLS(COLS), .FIRST_ROW(1'b0)) dut (
    .cfg(cfg), .regs(regs), .prev(prev), .opa(opa), .opb(opb));
  vrd_data_switch #(.COLS(COLS), .FIRST_ROW(1'b1)) dut0 (
    .cfg(cfg), .regs(regs), .prev(prev), .opa(opa0), .opb(opb0));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_v(int sel, logic [31:0] imm, bit first);
    if (sel == 255) return imm;
    if (sel <= 15) return regs[sel];
    if (!first && sel >= 16 && sel <= 19) return prev[sel - 16];
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NREG; i++) regs[i] = $urandom;
      for (int c = 0; c < COLS; c++) begin
        int s;
        prev[c] = $urandom;
        cfg[c] = pe_cfg_t'({$urandom, $urandom});
        s = $urandom % 6;
        cfg[c].srca = (s == 0) ? 8'd255 : (s < 3) ? 8'($urandom % 16) : (s < 5) ? 8'(16 + $urandom % 4) : 8'($urandom);
        cfg[c].srcb = 8'($urandom % 22);
      end
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks += 4;
        if (opa[c]  !== expect_v(cfg[c].srca, cfg[c].imm, 0)) failures++;
        if (opb[c]  !== expect_v(cfg[c].srcb, cfg[c].imm, 0)) failures++;
        if (opa0[c] !== expect_v(cfg[c].srca, cfg[c].imm, 1)) failures++;
        if (opb0[c] !== expect_v(cfg[c].srcb, cfg[c].imm, 1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
