// tb_vrd: the datapath with random contexts and the example block.
//
// The testbench plays the control unit's part: it applies a context and
// operands, then walks the rows top to bottom, serving each row's loads and
// stores from a sparse word memory and feeding loaded words back through
// ld_data. The write-backs at the end, the stored memory and the number of
// memory operations are compared with ref_exec from vrm_tb_pkg.
module tb_vrd;
  import vrm_pkg::*;
  import vrm_tb_pkg::*;

  localparam int ROWS = 4, COLS = 4, NLS = 2;
  localparam int CW = 2 * ROWS * COLS + 5;

  logic [31:0] ctx [CW];
  logic [31:0] regs [NREG];
  flags_t      cpu_flags;
  logic [31:0] ld_data [ROWS][NLS];
  ls_req_t     ls [ROWS][NLS];
  logic        we [NREG];
  logic [31:0] wdata [NREG];
  logic        fwe;
  flags_t      fdata;
  int checks = 0, failures = 0;
  int n_mem_blocks = 0;

  vrd #(.ROWS(ROWS), .COLS(COLS), .NLS(NLS)) dut (
    .ctx(ctx), .regs(regs), .cpu_flags(cpu_flags), .ld_data(ld_data), .ls(ls),
    .we(we), .wdata(wdata), .fwe(fwe), .fdata(fdata));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ctx(word_t c [], string name);
    word_t  r [16];
    mem_t   mem, ref_mem;
    bit     ewe [16];
    word_t  ewd [16];
    bit     efwe;
    flags_t efd;
    int     nl, ns, gl, gs;
    for (int i = 0; i < 16; i++) r[i] = $urandom;
    r[15] = 32'h0001_0000 + ($urandom % 16) * 32'h1000;
    for (int i = 0; i < 512; i++) mem[(r[15] >> 2) + i] = $urandom;
    ref_mem = mem;
    for (int i = 0; i < CW; i++) ctx[i] = c[i];
    for (int i = 0; i < 16; i++) regs[i] = r[i];
    cpu_flags = flags_t'($urandom);
    for (int a = 0; a < ROWS; a++) for (int s = 0; s < NLS; s++) ld_data[a][s] = 0;
    gl = 0; gs = 0;
    for (int row = 0; row < ROWS; row++) begin
      #1;
      for (int s = 0; s < NLS; s++)
        if (ls[row][s].req) begin
          if (ls[row][s].we) begin mem[ls[row][s].addr >> 2] = ls[row][s].wdata; gs++; end
          else begin ld_data[row][s] = mem_rd(mem, ls[row][s].addr); gl++; end
        end
    end
    #1;
    ref_exec(c, ROWS, COLS, NLS, r, cpu_flags, ref_mem, ewe, ewd, efwe, efd, nl, ns);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (we[i] !== ewe[i] || (ewe[i] && wdata[i] !== ewd[i])) begin
        failures++;
        if (failures < 10) $display("%s: r%0d got %0b %h expected %0b %h", name, i, we[i], wdata[i], ewe[i], ewd[i]);
      end
    end
    checks++;
    if (fwe !== efwe || (efwe && fdata !== efd)) failures++;
    checks++;
    if (gl != nl || gs != ns || mem != ref_mem) begin
      failures++;
      $display("%s: memory differs (loads %0d/%0d stores %0d/%0d)", name, gl, nl, gs, ns);
    end
    if (nl + ns > 0) n_mem_blocks++;
  endtask

  initial begin
    word_t c [];
    // Example block: r5 = r4 + r3; r3 = r2 + r5 + C; r4 = mem[r3 - r0].
    ctx_example(c, ROWS, COLS);
    for (int i = 0; i < CW; i++) ctx[i] = c[i];
    for (int i = 0; i < 16; i++) regs[i] = 0;
    regs[4] = 32'hffff_fff0; regs[3] = 32'h20; regs[2] = 32'h100; regs[0] = 32'h4;
    cpu_flags = '0;
    for (int a = 0; a < ROWS; a++) for (int s = 0; s < NLS; s++) ld_data[a][s] = 0;
    #1;
    // r5 = 0x10 with carry out; r3 = 0x100 + 0x10 + 1 = 0x111; address 0x10d
    checks++; if (!ls[3][0].req || ls[3][0].we || ls[3][0].addr !== 32'h10d) failures++;
    ld_data[3][0] = 32'hcafe_f00d;
    #1;
    checks++; if (!we[5] || wdata[5] !== 32'h10) failures++;
    checks++; if (!we[3] || wdata[3] !== 32'h111) failures++;
    checks++; if (!we[4] || wdata[4] !== 32'hcafe_f00d) failures++;
    checks++; if (!fwe || fdata !== 4'b0000) failures++;   // flags of the adc: no N, Z, C, V
    checks++; if (we[0] || we[1] || we[2]) failures++;
    run_ctx(c, "example");
    for (int n = 0; n < 2000; n++) begin
      ctx_random(c, ROWS, COLS, NLS, 40);
      run_ctx(c, "random");
    end
    checks++;
    if (n_mem_blocks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
