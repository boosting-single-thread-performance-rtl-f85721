// tb_vrd_flag_switch: random flag selects for an inner row and the first
// row; every flag operand is compared with the flag the select code names.
module tb_vrd_flag_switch;
  import vrm_pkg::*;

  localparam int COLS = 4;
  pe_cfg_t cfg  [COLS];
  flags_t  cpu;
  flags_t  prev [COLS];
  logic    fin [COLS], fin0 [COLS];
  int checks = 0, failures = 0;

  vrd_flag_switch #(.COLS(COLS), .FIRST_ROW(1'b0)) dut (
    .cfg(cfg), .cpu_flags(cpu), .prev(prev), .fin(fin));
  vrd_flag_switch #(.COLS(COLS), .FIRST_ROW(1'b1)) dut0 (
    .cfg(cfg), .cpu_flags(cpu), .prev(prev), .fin(fin0));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flag f of a NZCV nibble: 0 = N (bit 3) ... 3 = V (bit 0).
  function automatic bit nth(logic [3:0] nz, int f);
    return nz[3 - f];
  endfunction

  function automatic bit expect_f(int sel, bit first);
    if (sel == 255) return 1;
    if (sel == 254) return 0;
    if (sel < 4) return nth(cpu, sel);
    if (!first && sel < 20) return nth(prev[(sel - 4) / 4], (sel - 4) % 4);
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      cpu = flags_t'($urandom);
      for (int c = 0; c < COLS; c++) begin
        int s;
        prev[c] = flags_t'($urandom);
        cfg[c] = pe_cfg_t'({$urandom, $urandom});
        s = $urandom % 5;
        cfg[c].fsel = (s == 0) ? 8'(254 + $urandom % 2) : (s == 1) ? 8'($urandom % 4) :
                      (s < 4) ? 8'(4 + $urandom % 16) : 8'($urandom);
      end
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks += 2;
        if (fin[c]  !== expect_f(cfg[c].fsel, 0)) failures++;
        if (fin0[c] !== expect_f(cfg[c].fsel, 1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
