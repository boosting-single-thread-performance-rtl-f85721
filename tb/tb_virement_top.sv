// tb_virement_top: the four-core reconfigurable part end to end, at its
// default parameters.
//
// Each core has its own decode-stage driver, register file and flags, and
// two-bank data-cache model with random misses; the four cores share the
// context DMA and one main-memory model holding a pool of contexts. Each
// core runs a random instruction stream: ordinary ARM instructions, a BXV
// pattern in Thumb state (must be ignored) and BXVs of random contexts.
// For a BXV the driver holds the instruction in decode while id_stall is
// high; in the cycle the stall drops it compares the register and flag
// write-backs with ref_exec and applies them to its register file, which
// then feeds the next BXV. Data memories are compared at the end.
//
// Mechanisms that must each happen at least once: decode stall, context
// hit, context miss (DMA fetch), LRU eviction, two cores waiting for the
// DMA at once, data-cache bank conflict, data-cache miss stall, load,
// store, Thumb-state pass-through.
module tb_virement_top;
  import vrm_pkg::*;
  import vrm_tb_pkg::*;

  localparam int NCORES = 4, ROWS = 4, COLS = 4, NLS = 2, NBANKS = 2, ENTRIES = 4;
  localparam int NCTX = 10;
  localparam int NINSTR = 150;

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
  int miss_pct = 20;

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

  // Event counters.
  int n_stall = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_dma_wait = 0, n_conflict = 0;
  int n_mstall = 0, n_load = 0, n_store = 0, n_thumb = 0, n_bxv = 0, n_plain = 0;
  always @(posedge clk) begin
    int nreq;
    cycles++;
    nreq = 0;
    for (int k = 0; k < NCORES; k++) begin
      if (id_stall[k]) n_stall++;
      if (ev[k].ctx_hit) n_hit++;
      if (ev[k].ctx_miss) n_miss++;
      if (ev[k].ctx_evict) n_evict++;
      if (ev[k].bank_conflict) n_conflict++;
      if (ev[k].mem_stall) n_mstall++;
      if (ev[k].load) n_load++;
      if (ev[k].store) n_store++;
      if (dut.dma_req[k]) nreq++;
    end
    if (nreq > 1) n_dma_wait++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  word_t pool [NCTX][];
  mem_t  ref_mem [NCORES];
  int    done_cores = 0;

  function automatic logic [23:0] ctx_waddr(int t);
    return 24'h8000 + 24'(t * 64);
  endfunction

  // Register file of core k; r15 always points into the core's data area.
  word_t regs_m [NCORES][16];
  flags_t flags_m [NCORES];

  always_comb
    for (int k = 0; k < NCORES; k++) begin
      for (int i = 0; i < 16; i++) rf_regs[k][i] = regs_m[k][i];
      rf_flags[k] = flags_m[k];
    end

  task automatic core_run(int k);
    for (int n = 0; n < NINSTR; n++) begin
      int kind;
      kind = $urandom % 6;
      @(negedge clk);
      if (kind == 0) begin          // ordinary instruction
        id_valid[k] = 1; id_arm_state[k] = 1; id_instr[k] = {8'hE0, 24'($urandom)};
        #1; checks++; if (id_stall[k]) failures++;
        n_plain++;
      end else if (kind == 1) begin // BXV pattern in Thumb state
        id_valid[k] = 1; id_arm_state[k] = 0; id_instr[k] = {8'hF7, ctx_waddr(1)};
        #1; checks++; if (id_stall[k]) failures++;
        n_thumb++;
      end else begin                // BXV
        int t, waitc;
        bit ewe [16];
        word_t ewd [16];
        bit efwe;
        flags_t efd;
        int nl, ns;
        t = (k + $urandom % 7) % NCTX;
        regs_m[k][15] = 32'h0010_0000 * (k + 1) + ($urandom % 4) * 32'h1000;
        if ($urandom % 3 == 0) for (int i = 0; i < 15; i++) regs_m[k][i] = $urandom;
        ref_exec(pool[t], ROWS, COLS, NLS, regs_m[k], flags_m[k], ref_mem[k], ewe, ewd, efwe, efd, nl, ns);
        id_valid[k] = 1; id_arm_state[k] = 1; id_instr[k] = {8'hF7, ctx_waddr(t)};
        #1;
        checks++;
        if (!id_stall[k]) failures++;
        waitc = 0;
        while (id_stall[k] && waitc < 5000) begin @(negedge clk); #1; waitc++; end
        // stall has dropped: this is the write-back cycle
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (rf_we[k][i] !== ewe[i] || (ewe[i] && rf_wdata[k][i] !== ewd[i])) begin
            failures++;
            if (failures < 10) $display("core %0d ctx %0d r%0d: got %0b %h expected %0b %h",
                                        k, t, i, rf_we[k][i], rf_wdata[k][i], ewe[i], ewd[i]);
          end
        end
        checks++;
        if (rf_fwe[k] !== efwe || (efwe && rf_fdata[k] !== efd)) failures++;
        for (int i = 0; i < 16; i++) if (ewe[i]) regs_m[k][i] = ewd[i];
        if (efwe) flags_m[k] = efd;
        n_bxv++;
      end
    end
    @(negedge clk);
    id_valid[k] = 0;
    done_cores++;
  endtask

  initial begin
    for (int k = 0; k < NCORES; k++) begin
      id_valid[k] = 0; id_arm_state[k] = 1; id_instr[k] = 0; flags_m[k] = '0;
      for (int i = 0; i < 16; i++) regs_m[k][i] = $urandom;
    end
    ctx_example(pool[0], ROWS, COLS);
    for (int t = 1; t < NCTX; t++) ctx_random(pool[t], ROWS, COLS, NLS, 50);
    for (int t = 0; t < NCTX; t++)
      for (int w = 0; w < pool[t].size(); w++) u_mem.mem[32'(ctx_waddr(t)) + w] = pool[t][w];
    for (int a = 0; a < 4 * 1024; a++) begin
      g_dc[0].u_dc.mem[(32'h0010_0000 >> 2) + a] = $urandom;
      g_dc[1].u_dc.mem[(32'h0020_0000 >> 2) + a] = $urandom;
      g_dc[2].u_dc.mem[(32'h0030_0000 >> 2) + a] = $urandom;
      g_dc[3].u_dc.mem[(32'h0040_0000 >> 2) + a] = $urandom;
    end
    ref_mem[0] = g_dc[0].u_dc.mem;
    ref_mem[1] = g_dc[1].u_dc.mem;
    ref_mem[2] = g_dc[2].u_dc.mem;
    ref_mem[3] = g_dc[3].u_dc.mem;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      core_run(0);
      core_run(1);
      core_run(2);
      core_run(3);
    join
    checks += 4;
    if (g_dc[0].u_dc.mem != ref_mem[0]) failures++;
    if (g_dc[1].u_dc.mem != ref_mem[1]) failures++;
    if (g_dc[2].u_dc.mem != ref_mem[2]) failures++;
    if (g_dc[3].u_dc.mem != ref_mem[3]) failures++;
    checks++;
    if (g_dc[0].u_dc.bank_errors + g_dc[1].u_dc.bank_errors + g_dc[2].u_dc.bank_errors +
        g_dc[3].u_dc.bank_errors != 0) failures++;
    $display("BXVs %0d, plain %0d, thumb %0d, stall cycles %0d", n_bxv, n_plain, n_thumb, n_stall);
    $display("context hits %0d misses %0d evictions %0d, cycles with several DMA requests %0d",
             n_hit, n_miss, n_evict, n_dma_wait);
    $display("bank conflicts %0d, data-cache stall cycles %0d, loads %0d, stores %0d",
             n_conflict, n_mstall, n_load, n_store);
    begin
      int counts [11];
      counts = '{n_stall, n_hit, n_miss, n_evict, n_dma_wait, n_conflict, n_mstall,
                          n_load, n_store, n_thumb, n_plain};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
