// tb_vrfu: one reconfigurable functional unit (control unit + datapath)
// with the context DMA, a main-memory model and a two-bank data-cache model.
//
// A pool of eight contexts (the example block and seven random ones) sits
// in main memory. The testbench issues BXVs for random contexts with random
// register and flag operands, as the decode stage would, and at the done
// pulse compares the register and flag write-backs and afterwards the data
// memory with ref_exec. A reference LRU list predicts context-cache hits and
// misses. The latency from bxv_valid to done is checked: ROWS + 2 cycles for
// a cached context when no access waits on the data cache.
module tb_vrfu;
  import vrm_pkg::*;
  import vrm_tb_pkg::*;

  localparam int ROWS = 4, COLS = 4, NLS = 2, NBANKS = 2, ENTRIES = 4, LENW = 8;
  localparam int NCTX = 8;

  logic clk = 0, rst_n = 0;
  logic bxv_valid = 0;
  logic [23:0] bxv_addr = 0;
  logic done;
  logic [31:0] rf_regs [NREG];
  flags_t rf_flags;
  logic rf_we [NREG];
  logic [31:0] rf_wdata [NREG];
  logic rf_fwe;
  flags_t rf_fdata;
  logic dma_req, dma_gnt_v [1], dma_wvalid_v [1], dma_done_v [1];
  logic [31:0] dma_addr;
  logic [LENW-1:0] dma_len, dma_widx;
  logic [31:0] dma_wdata;
  logic dc_req [NBANKS], dc_we [NBANKS], dc_ready [NBANKS];
  logic [31:0] dc_addr [NBANKS], dc_wdata [NBANKS], dc_rdata [NBANKS];
  vcu_ev_t ev;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  int miss_pct = 0;
  int grant_pct = 70;
  int checks = 0, failures = 0, cycles = 0;

  vrfu #(.ROWS(ROWS), .COLS(COLS), .NLS(NLS), .NBANKS(NBANKS), .CTX_ENTRIES(ENTRIES), .LENW(LENW)) dut (
    .clk(clk), .rst_n(rst_n), .bxv_valid(bxv_valid), .bxv_addr(bxv_addr), .done(done),
    .rf_regs(rf_regs), .rf_flags(rf_flags), .rf_we(rf_we), .rf_wdata(rf_wdata),
    .rf_fwe(rf_fwe), .rf_fdata(rf_fdata),
    .dma_req(dma_req), .dma_addr(dma_addr), .dma_len(dma_len), .dma_gnt(dma_gnt_v[0]),
    .dma_wvalid(dma_wvalid_v[0]), .dma_widx(dma_widx), .dma_wdata(dma_wdata), .dma_done(dma_done_v[0]),
    .dc_req(dc_req), .dc_we(dc_we), .dc_addr(dc_addr), .dc_wdata(dc_wdata),
    .dc_rdata(dc_rdata), .dc_ready(dc_ready), .ev(ev));

  logic        ch_req [1];
  logic [31:0] ch_addr [1];
  logic [LENW-1:0] ch_len [1];
  always_comb begin ch_req[0] = dma_req; ch_addr[0] = dma_addr; ch_len[0] = dma_len; end

  cfg_dma #(.NCH(1), .LENW(LENW)) u_dma (
    .clk(clk), .rst_n(rst_n), .ch_req(ch_req), .ch_addr(ch_addr), .ch_len(ch_len),
    .ch_gnt(dma_gnt_v), .ch_wvalid(dma_wvalid_v), .ch_widx(dma_widx), .ch_wdata(dma_wdata),
    .ch_done(dma_done_v), .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt),
    .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata));

  tb_mem_model #(.LAT(4)) u_mem (
    .clk(clk), .grant_pct(grant_pct), .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt),
    .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata));

  tb_dcache_model #(.NBANKS(NBANKS)) u_dc (
    .clk(clk), .miss_pct(miss_pct), .dc_req(dc_req), .dc_we(dc_we), .dc_addr(dc_addr),
    .dc_wdata(dc_wdata), .dc_rdata(dc_rdata), .dc_ready(dc_ready));

  always #5 clk = ~clk;

  int n_hit = 0, n_miss = 0, n_evict = 0, n_conflict = 0, n_stall = 0, n_load = 0, n_store = 0;
  always @(posedge clk) begin
    cycles++;
    if (ev.ctx_hit) n_hit++;
    if (ev.ctx_miss) n_miss++;
    if (ev.ctx_evict) n_evict++;
    if (ev.bank_conflict) n_conflict++;
    if (ev.mem_stall) n_stall++;
    if (ev.load) n_load++;
    if (ev.store) n_store++;
    if (cycles > 400000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  word_t pool [NCTX][];
  int    lru [$];

  function automatic logic [23:0] ctx_waddr(int t);
    return 24'h4000 + 24'(t * 64);
  endfunction

  // Run one BXV of context t; returns the cycles from bxv_valid to done.
  task automatic run_bxv(int t, output int lat);
    word_t  r [16];
    flags_t fl;
    mem_t   ref_mem;
    bit     ewe [16];
    word_t  ewd [16];
    bit     efwe;
    flags_t efd;
    int     nl, ns, idx[$];
    bit     exp_hit;
    for (int i = 0; i < 16; i++) r[i] = $urandom;
    r[15] = 32'h0002_0000 + ($urandom % 8) * 32'h1000;
    if (t == 0) begin r[0] = 32'h10000 + (($urandom % 64) << 2); r[2] = 32'h0; r[4] = 32'h0; r[3] = 32'h0; end
    fl = flags_t'($urandom);
    ref_mem = u_dc.mem;
    ref_exec(pool[t], ROWS, COLS, NLS, r, fl, ref_mem, ewe, ewd, efwe, efd, nl, ns);
    idx = lru.find_first_index(x) with (x == t);
    exp_hit = (idx.size() != 0);
    if (exp_hit) lru.delete(idx[0]);
    else if (lru.size() == ENTRIES) void'(lru.pop_back());
    lru.push_front(t);

    @(negedge clk);
    for (int i = 0; i < 16; i++) rf_regs[i] = r[i];
    rf_flags  = fl;
    bxv_valid = 1;
    bxv_addr  = ctx_waddr(t);
    @(negedge clk);
    bxv_valid = 0;
    for (int i = 0; i < 16; i++) rf_regs[i] = $urandom;   // operands were latched
    lat = 1;
    checks++;
    if (ev.ctx_hit !== exp_hit || ev.ctx_miss !== !exp_hit) begin
      failures++;
      $display("context %0d: hit=%0b expected %0b", t, ev.ctx_hit, exp_hit);
    end
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 2000) break;
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (rf_we[i] !== ewe[i] || (ewe[i] && rf_wdata[i] !== ewd[i])) begin
        failures++;
        if (failures < 10) $display("ctx %0d r%0d: got %0b %h expected %0b %h", t, i, rf_we[i], rf_wdata[i], ewe[i], ewd[i]);
      end
    end
    checks++;
    if (rf_fwe !== efwe || (efwe && rf_fdata !== efd)) failures++;
    @(negedge clk);
    checks++;
    if (u_dc.mem != ref_mem) begin failures++; $display("ctx %0d: data memory differs", t); end
  endtask

  initial begin
    int lat;
    for (int i = 0; i < 16; i++) rf_regs[i] = 0;
    rf_flags = '0;
    ctx_example(pool[0], ROWS, COLS);
    for (int t = 1; t < NCTX; t++) ctx_random(pool[t], ROWS, COLS, NLS, 50);
    for (int t = 0; t < NCTX; t++)
      for (int w = 0; w < pool[t].size(); w++) u_mem.mem[32'(ctx_waddr(t)) + w] = pool[t][w];
    for (int a = 0; a < 16 * 1024; a++) u_dc.mem[(32'h10000 >> 2) + a] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Latency: first use misses, second use hits in ROWS + 2 cycles.
    run_bxv(0, lat);
    run_bxv(0, lat);
    checks++;
    if (lat != ROWS + 2) begin failures++; $display("hit latency %0d, expected %0d", lat, ROWS + 2); end

    // Random stream with data-cache misses.
    miss_pct = 30;
    for (int n = 0; n < 400; n++) run_bxv($urandom % 6 + ((n % 50 == 49) ? 2 : 0), lat);

    checks++;
    if (u_dc.bank_errors != 0) failures++;
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_evict == 0 || n_conflict == 0 || n_stall == 0 ||
        n_load == 0 || n_store == 0) failures++;
    $display("hits %0d misses %0d evictions %0d bank conflicts %0d stall cycles %0d loads %0d stores %0d",
             n_hit, n_miss, n_evict, n_conflict, n_stall, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
