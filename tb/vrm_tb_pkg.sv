// vrm_tb_pkg: reference models and context builders shared by the
// testbenches of the reconfigurable unit.
//
// ref_alu is written independently of the RTL ALU: results and flags are
// computed with 64-bit integer arithmetic rather than from an adder's
// carry chain. ref_exec evaluates a whole configuration context row by row
// with a sparse word memory, in the order the control unit performs the
// accesses (top row first, lower column first within a row), and gives
// the register and flag write-backs the host should see.
package vrm_tb_pkg;
  import vrm_pkg::*;

  typedef logic [31:0] word_t;
  typedef word_t       mem_t [word_t];    // word address -> data

  function automatic void ref_alu(input int op, input word_t a, input word_t b, input bit fin,
                                  output word_t y, output flags_t f);
    longint signed   sres;
    longint signed   ures;
    longint unsigned ext;
    int unsigned n, k;
    bit c, v;
    c = fin; v = 0;
    n = b[7:0];
    case (op)
      0, 1: begin  // ADD, ADC
        ures = longint'(a) + longint'(b) + ((op == 1) ? longint'(fin) : 0);
        sres = longint'($signed(a)) + longint'($signed(b)) + ((op == 1) ? longint'(fin) : 0);
        y = ures[31:0]; c = (ures >= 64'h1_0000_0000);
        v = (sres > 64'sd2147483647) || (sres < -64'sd2147483648);
      end
      2, 3, 4, 5: begin  // SUB, SBC, RSB, RSC
        word_t x, z;
        longint borrow;
        x = (op <= 3) ? a : b;
        z = (op <= 3) ? b : a;
        borrow = (op == 2 || op == 4) ? 0 : (fin ? 0 : 1);
        ures = longint'(x) - longint'(z) - borrow;
        sres = longint'($signed(x)) - longint'($signed(z)) - borrow;
        y = ures[31:0]; c = (ures >= 0);
        v = (sres > 64'sd2147483647) || (sres < -64'sd2147483648);
      end
      6:  y = a & b;
      7:  y = a | b;
      8:  y = a ^ b;
      9:  y = a & ~b;
      10: y = b;
      11: y = ~b;
      12: begin  // LSL
        if (n == 0) y = a;
        else begin ext = (n >= 64) ? 0 : ({32'd0, a} << n); y = ext[31:0]; c = ext[32]; end
      end
      13: begin  // LSR
        if (n == 0) y = a;
        else begin ext = (n >= 64) ? 0 : ({a, 32'd0} >> n); y = ext[63:32]; c = ext[31]; end
      end
      14: begin  // ASR
        if (n == 0) y = a;
        else if (n >= 32) begin y = {32{a[31]}}; c = a[31]; end
        else begin ext = longint'($signed({a, 32'd0})) >>> n; y = ext[63:32]; c = ext[31]; end
      end
      default: begin  // ROR
        if (n == 0) y = a;
        else begin k = n % 32; y = (k == 0) ? a : ((a >> k) | (a << (32 - k))); c = y[31]; end
      end
    endcase
    f.n = y[31]; f.z = (y == 0); f.c = c; f.v = v;
  endfunction

  // Control word of a PE.
  function automatic word_t pe_ctl(int mode, int op, int srca, int srcb, int fsel);
    return word_t'((fsel & 8'hff) << 22) | word_t'((srcb & 8'hff) << 14) |
           word_t'((srca & 8'hff) << 6) | word_t'((op & 4'hf) << 2) | word_t'(mode & 3);
  endfunction

  // Empty context: all PEs idle, nothing written back.
  function automatic void ctx_clear(ref word_t ctx [], input int rows, input int cols);
    ctx = new[2 * rows * cols + 5];
    foreach (ctx[i]) ctx[i] = '0;
  endfunction

  function automatic void ctx_set_pe(ref word_t ctx [], input int cols, input int r, input int c,
                                     input int mode, input int op, input int srca, input int srcb,
                                     input int fsel, input word_t imm);
    ctx[2 * (r * cols + c)]     = pe_ctl(mode, op, srca, srcb, fsel);
    ctx[2 * (r * cols + c) + 1] = imm;
  endfunction

  function automatic void ctx_set_wb(ref word_t ctx [], input int rows, input int cols,
                                     input int reg_i, input int pe);
    int w;
    w = 2 * rows * cols + reg_i / 4;
    ctx[w][8 * (reg_i % 4) +: 8] = 8'h80 | 8'(pe);
  endfunction

  function automatic void ctx_set_fwb(ref word_t ctx [], input int rows, input int cols, input int pe);
    ctx[2 * rows * cols + 4][7:0] = 8'h80 | 8'(pe);
  endfunction

  function automatic word_t mem_rd(ref mem_t m, input word_t addr);
    word_t wa;
    wa = addr >> 2;
    return m.exists(wa) ? m[wa] : 32'h0;
  endfunction

  // Reference execution of one context. Updates mem with the stores.
  function automatic void ref_exec(input word_t ctx [], input int rows, input int cols, input int nls,
                                   input word_t regs [16], input flags_t cf, ref mem_t mem,
                                   output bit we [16], output word_t wd [16],
                                   output bit fwe, output flags_t fd,
                                   output int nloads, output int nstores);
    word_t  py [], cy [];
    flags_t pf [], cf_ [];
    word_t  ally [];
    flags_t allf [];
    py = new[cols]; cy = new[cols]; pf = new[cols]; cf_ = new[cols];
    ally = new[rows * cols]; allf = new[rows * cols];
    nloads = 0; nstores = 0;
    foreach (py[i]) begin py[i] = 0; pf[i] = '0; end
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < cols; c++) begin
        word_t ctl, imm, a, b;
        int mode, op, sa, sb, fs;
        bit fin;
        ctl = ctx[2 * (r * cols + c)]; imm = ctx[2 * (r * cols + c) + 1];
        mode = ctl[1:0]; op = ctl[5:2]; sa = ctl[13:6]; sb = ctl[21:14]; fs = ctl[29:22];
        a = (sa == 255) ? imm : (sa < 16) ? regs[sa] : (r > 0 && sa - 16 < cols) ? py[sa - 16] : 0;
        b = (sb == 255) ? imm : (sb < 16) ? regs[sb] : (r > 0 && sb - 16 < cols) ? py[sb - 16] : 0;
        if (fs == 255) fin = 1;
        else if (fs == 254) fin = 0;
        else if (fs < 4) fin = cf[3 - fs];
        else if (r > 0 && (fs - 4) / 4 < cols) fin = pf[(fs - 4) / 4][3 - (fs % 4)];
        else fin = 0;
        cy[c] = 0; cf_[c] = '0;
        if (mode == 1) ref_alu(op, a, b, fin, cy[c], cf_[c]);
        else if (mode == 2 && c < nls) begin cy[c] = mem_rd(mem, a); nloads++; end
        else if (mode == 3 && c < nls) begin mem[a >> 2] = b; nstores++; end
        ally[r * cols + c] = cy[c]; allf[r * cols + c] = cf_[c];
      end
      foreach (py[i]) begin py[i] = cy[i]; pf[i] = cf_[i]; end
    end
    for (int i = 0; i < 16; i++) begin
      logic [7:0] s;
      s = ctx[2 * rows * cols + i / 4][8 * (i % 4) +: 8];
      we[i] = s[7] && (s[6:0] < rows * cols);
      wd[i] = (s[6:0] < rows * cols) ? ally[s[6:0]] : 0;
    end
    begin
      logic [7:0] s;
      s = ctx[2 * rows * cols + 4][7:0];
      fwe = s[7] && (s[6:0] < rows * cols);
      fd  = (s[6:0] < rows * cols) ? allf[s[6:0]] : '0;
    end
  endfunction

  // Listing-style example block, placed as the greedy placer would on a
  // 4 x 4 array:  r5 = add r4,r3 (row 0, sets flags);  r3 = adc r2,r5,f1
  // (row 1);  t1 = sub r3,r0 (row 2);  r4 = ldr [t1] (row 3, column 0).
  function automatic void ctx_example(ref word_t ctx [], input int rows, input int cols);
    ctx_clear(ctx, rows, cols);
    ctx_set_pe(ctx, cols, 0, 0, 1, 0, 4, 3, 254, 0);          // add r4, r3
    ctx_set_pe(ctx, cols, 1, 0, 1, 1, 2, 16, 4 + 2, 0);       // adc r2, PE(0,0), C of PE(0,0)
    ctx_set_pe(ctx, cols, 2, 0, 1, 2, 16, 0, 254, 0);         // sub PE(1,0), r0
    ctx_set_pe(ctx, cols, 3, 0, 2, 0, 16, 0, 254, 0);         // ldr [PE(2,0)]
    ctx_set_wb(ctx, rows, cols, 5, 0 * cols + 0);
    ctx_set_wb(ctx, rows, cols, 3, 1 * cols + 0);
    ctx_set_wb(ctx, rows, cols, 4, 3 * cols + 0);
    ctx_set_fwb(ctx, rows, cols, 1 * cols + 0);
  endfunction

  // Random context. Operands come from registers, the previous row or the
  // immediate; load/store PEs take their address from an ALU in the row
  // above, which adds a register-held base to a small offset so that the
  // addresses stay inside [base, base + 256) words.
  function automatic void ctx_random(ref word_t ctx [], input int rows, input int cols, input int nls,
                                     input int mem_pct);
    ctx_clear(ctx, rows, cols);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int sa, sb, fs, mode;
        sa = ($urandom % 3 == 0 || r == 0) ? $urandom % 16 : 16 + $urandom % cols;
        sb = ($urandom % 4 == 0) ? 255 : ($urandom % 2 == 0 || r == 0) ? $urandom % 16 : 16 + $urandom % cols;
        fs = ($urandom % 3 == 0) ? $urandom % 4 : (r > 0) ? 4 + $urandom % (4 * cols) : 254 + $urandom % 2;
        mode = ($urandom % 8 == 0) ? 0 : 1;
        ctx_set_pe(ctx, cols, r, c, mode, $urandom % 16, sa, sb, fs, $urandom);
      end
    // Memory operations: row r >= 1, column c < nls; address from PE (r-1, c)
    // set to  ADD r15 + (imm & 0xfc) - so r15 holds the data area's base.
    for (int r = 1; r < rows; r++)
      for (int c = 0; c < nls; c++)
        if (($urandom % 100) < mem_pct) begin
          ctx_set_pe(ctx, cols, r - 1, c, 1, 0, 15, 255, 254, $urandom & 32'h3fc);
          ctx_set_pe(ctx, cols, r, c, ($urandom % 2) ? 2 : 3, 0, 16 + c, $urandom % 15, 254, 0);
        end
    for (int i = 0; i < 16; i++)
      if ($urandom % 2) ctx_set_wb(ctx, rows, cols, i, $urandom % (rows * cols));
    if ($urandom % 2) ctx_set_fwb(ctx, rows, cols, $urandom % (rows * cols));
  endfunction

endpackage
