// tb_virement_kernels: two small programs run on the four-core part, with
// their hot basic blocks on the reconfigurable units and their branches on
// the host side.
//
// Cores 0 and 2 compute a Fibonacci number iteratively. The loop body
// (a' = b, b' = a + b, count - 1 with flags) is one context that sits in a
// single row. Cores 1 and 3 bubble-sort a signed array in their data
// cache. The inner loop is split at its branches into three contexts:
//   CMPL  addresses in row 0, two loads in row 1 (one per bank), compare
//         in row 2; writes r4, r5 and the flags.
//   SWAP  addresses in row 0, two stores in row 1.
//   STEP  pointer + 4 in row 0, compare with the end pointer in row 1.
// The host model for each core plays the CPU: it issues a BXV, holds it in
// decode while the stall is high, takes the register and flag write-backs,
// then spends one cycle on an ordinary branch instruction. It decides the
// branch from the flags it got back (NE for fib, GT and LT for the sort).
// It sets up r2 and r6 for each sort pass.
//
// Checks: each BXV stalls decode; the final Fibonacci pair equals the value
// computed here; each sorted array is in order and is a permutation of the
// data it started from. The cycle count per BXV is printed for reference.
module tb_virement_kernels;
  import vrm_pkg::*;
  import vrm_tb_pkg::*;

  localparam int NCORES = 4, ROWS = 4, COLS = 4, NBANKS = 2;
  localparam int NSORT = 12;

  logic clk = 0, rst_n = 0;
  logic id_valid [NCORES], id_arm_state [NCORES], id_stall [NCORES];
  logic [31:0] id_instr [NCORES];
  logic [31:0] rf_regs [NCORES][NREG];
  flags_t rf_flags [NCORES];
  logic rf_we [NCORES][NREG];
  logic [31:0] rf_wdata [NCORES][NREG];
  logic rf_fwe [NCORES];
  flags_t rf_fdata [NCORES];
  logic dc_req [NCORES][NBANKS], dc_we [NCORES][NBANKS], dc_ready [NCORES][NBANKS];
  logic [31:0] dc_addr [NCORES][NBANKS], dc_wdata [NCORES][NBANKS], dc_rdata [NCORES][NBANKS];
  logic mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  vcu_ev_t ev [NCORES];
  int checks = 0, failures = 0, cycles = 0;
  int miss_pct = 10;

  virement_top dut (.*);

  tb_mem_model #(.LAT(6)) u_mem (
    .clk(clk), .grant_pct(80), .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt),
    .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata));

  for (genvar k = 0; k < NCORES; k++) begin : g_dc
    tb_dcache_model #(.NBANKS(NBANKS)) u_dc (
      .clk(clk), .miss_pct(miss_pct), .dc_req(dc_req[k]), .dc_we(dc_we[k]), .dc_addr(dc_addr[k]),
      .dc_wdata(dc_wdata[k]), .dc_rdata(dc_rdata[k]), .dc_ready(dc_ready[k]));
  end

  always #5 clk = ~clk;

  int n_hit = 0, n_miss = 0, n_load = 0, n_store = 0;
  always @(posedge clk) begin
    cycles++;
    for (int k = 0; k < NCORES; k++) begin
      if (ev[k].ctx_hit) n_hit++;
      if (ev[k].ctx_miss) n_miss++;
      if (ev[k].load) n_load++;
      if (ev[k].store) n_store++;
    end
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Context word addresses in main memory (the BXV address field).
  localparam logic [23:0] A_FIB = 24'h8000, A_CMPL = 24'h8040, A_SWAP = 24'h8080,
                          A_STEP = 24'h80C0;

  word_t regs_m [NCORES][16];
  flags_t flags_m [NCORES];
  int n_bxv [NCORES], bxv_cycles [NCORES];

  always_comb
    for (int k = 0; k < NCORES; k++) begin
      for (int i = 0; i < 16; i++) rf_regs[k][i] = regs_m[k][i];
      rf_flags[k] = flags_m[k];
    end

  // One BXV on core k followed by one ordinary (branch) instruction.
  task automatic run_bxv(int k, logic [23:0] a);
    int waitc;
    @(negedge clk);
    id_valid[k] = 1; id_arm_state[k] = 1; id_instr[k] = {8'hF7, a};
    #1;
    checks++;
    if (!id_stall[k]) failures++;
    waitc = 1;
    while (id_stall[k] && waitc < 5000) begin @(negedge clk); #1; waitc++; end
    for (int i = 0; i < 16; i++) if (rf_we[k][i]) regs_m[k][i] = rf_wdata[k][i];
    if (rf_fwe[k]) flags_m[k] = rf_fdata[k];
    n_bxv[k]++;
    bxv_cycles[k] += waitc;
    @(negedge clk);
    id_instr[k] = 32'hEAFF_FFF0;    // the branch that closes the block
    #1;
    checks++;
    if (id_stall[k]) failures++;
  endtask

  task automatic run_fib(int k, int n);
    word_t a, b, t;
    regs_m[k][0] = 0; regs_m[k][1] = 1; regs_m[k][3] = n;
    do run_bxv(k, A_FIB); while (!flags_m[k].z);
    a = 0; b = 1;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    checks += 2;
    if (regs_m[k][0] !== a) begin failures++; $display("core %0d fib(%0d) = %0d, expected %0d", k, n, regs_m[k][0], a); end
    if (regs_m[k][1] !== b) failures++;
    $display("core %0d: fib(%0d) = %0d in %0d BXVs", k, n, regs_m[k][0], n_bxv[k]);
  endtask

  // Word of core k's data memory, for the checks.
  function automatic word_t dc_word(int k, word_t wa);
    case (k)
      0: return g_dc[0].u_dc.mem.exists(wa) ? g_dc[0].u_dc.mem[wa] : 0;
      1: return g_dc[1].u_dc.mem.exists(wa) ? g_dc[1].u_dc.mem[wa] : 0;
      2: return g_dc[2].u_dc.mem.exists(wa) ? g_dc[2].u_dc.mem[wa] : 0;
      default: return g_dc[3].u_dc.mem.exists(wa) ? g_dc[3].u_dc.mem[wa] : 0;
    endcase
  endfunction

  task automatic run_sort(int k, word_t base);
    int orig [NSORT], got [NSORT];
    for (int i = 0; i < NSORT; i++) orig[i] = int'(dc_word(k, (base >> 2) + i));
    regs_m[k][6] = base + 4 * (NSORT - 1);
    for (int pass = 0; pass < NSORT - 1; pass++) begin
      regs_m[k][2] = base;
      do begin
        run_bxv(k, A_CMPL);
        if (!flags_m[k].z && flags_m[k].n == flags_m[k].v) run_bxv(k, A_SWAP);   // GT
        run_bxv(k, A_STEP);
      end while (flags_m[k].n != flags_m[k].v);                                    // LT
    end
    for (int i = 0; i < NSORT; i++) got[i] = int'(dc_word(k, (base >> 2) + i));
    for (int i = 0; i + 1 < NSORT; i++) begin
      checks++;
      if (got[i] > got[i+1]) begin failures++; $display("core %0d: a[%0d]=%0d > a[%0d]=%0d", k, i, got[i], i + 1, got[i+1]); end
    end
    for (int i = 1; i < NSORT; i++)                 // reference: signed insertion sort
      for (int j = i; j > 0 && orig[j-1] > orig[j]; j--) begin
        int t;
        t = orig[j]; orig[j] = orig[j-1]; orig[j-1] = t;
      end
    checks++;
    if (orig != got) begin failures++; $display("core %0d: sorted array is not a permutation of the input", k); end
    $display("core %0d: sorted %0d words in %0d BXVs", k, NSORT, n_bxv[k]);
  endtask

  initial begin
    word_t c [];
    for (int k = 0; k < NCORES; k++) begin
      id_valid[k] = 0; id_arm_state[k] = 1; id_instr[k] = 0; flags_m[k] = '0;
      n_bxv[k] = 0; bxv_cycles[k] = 0;
      for (int i = 0; i < 16; i++) regs_m[k][i] = 0;
    end
    // FIB: r0 <- r1, r1 <- r0 + r1, r3 <- r3 - 1 with flags.
    ctx_clear(c, ROWS, COLS);
    ctx_set_pe(c, COLS, 0, 0, 1, OP_ADD, 0, 1, 254, 0);
    ctx_set_pe(c, COLS, 0, 1, 1, OP_SUB, 3, 255, 254, 1);
    ctx_set_pe(c, COLS, 0, 2, 1, OP_MOV, 0, 1, 254, 0);
    ctx_set_wb(c, ROWS, COLS, 0, 2);
    ctx_set_wb(c, ROWS, COLS, 1, 0);
    ctx_set_wb(c, ROWS, COLS, 3, 1);
    ctx_set_fwb(c, ROWS, COLS, 1);
    foreach (c[w]) u_mem.mem[32'(A_FIB) + w] = c[w];
    // CMPL: r4 <- [r2], r5 <- [r2 + 4], flags <- r4 - r5.
    ctx_clear(c, ROWS, COLS);
    ctx_set_pe(c, COLS, 0, 0, 1, OP_ADD, 2, 255, 254, 0);
    ctx_set_pe(c, COLS, 0, 1, 1, OP_ADD, 2, 255, 254, 4);
    ctx_set_pe(c, COLS, 1, 0, 2, 0, 16, 0, 254, 0);
    ctx_set_pe(c, COLS, 1, 1, 2, 0, 17, 0, 254, 0);
    ctx_set_pe(c, COLS, 2, 0, 1, OP_SUB, 16, 17, 254, 0);
    ctx_set_wb(c, ROWS, COLS, 4, 1 * COLS + 0);
    ctx_set_wb(c, ROWS, COLS, 5, 1 * COLS + 1);
    ctx_set_fwb(c, ROWS, COLS, 2 * COLS + 0);
    foreach (c[w]) u_mem.mem[32'(A_CMPL) + w] = c[w];
    // SWAP: [r2] <- r5, [r2 + 4] <- r4.
    ctx_clear(c, ROWS, COLS);
    ctx_set_pe(c, COLS, 0, 0, 1, OP_ADD, 2, 255, 254, 0);
    ctx_set_pe(c, COLS, 0, 1, 1, OP_ADD, 2, 255, 254, 4);
    ctx_set_pe(c, COLS, 1, 0, 3, 0, 16, 5, 254, 0);
    ctx_set_pe(c, COLS, 1, 1, 3, 0, 17, 4, 254, 0);
    foreach (c[w]) u_mem.mem[32'(A_SWAP) + w] = c[w];
    // STEP: r2 <- r2 + 4, flags <- (r2 + 4) - r6.
    ctx_clear(c, ROWS, COLS);
    ctx_set_pe(c, COLS, 0, 0, 1, OP_ADD, 2, 255, 254, 4);
    ctx_set_pe(c, COLS, 1, 0, 1, OP_SUB, 16, 6, 254, 0);
    ctx_set_wb(c, ROWS, COLS, 2, 0);
    ctx_set_fwb(c, ROWS, COLS, 1 * COLS + 0);
    foreach (c[w]) u_mem.mem[32'(A_STEP) + w] = c[w];
    // Arrays to sort: signed values, some repeated.
    for (int i = 0; i < NSORT; i++) begin
      g_dc[1].u_dc.mem[(32'h0020_0000 >> 2) + i] = word_t'(int'($urandom % 200) - 100);
      g_dc[3].u_dc.mem[(32'h0040_0100 >> 2) + i] = word_t'(int'($urandom % 8) - 4);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_fib(0, 30);
      run_sort(1, 32'h0020_0000);
      run_fib(2, 45);
      run_sort(3, 32'h0040_0100);
    join
    for (int k = 0; k < NCORES; k++)
      $display("core %0d: %0d BXVs, %0d.%02d decode cycles per BXV", k, n_bxv[k],
               bxv_cycles[k] / n_bxv[k], (100 * bxv_cycles[k] / n_bxv[k]) % 100);
    $display("context hits %0d misses %0d, loads %0d, stores %0d", n_hit, n_miss, n_load, n_store);
    checks++;
    if (g_dc[1].u_dc.bank_errors + g_dc[3].u_dc.bank_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
