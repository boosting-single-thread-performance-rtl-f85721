// tb_vcu_ctx_cache: drives the context cache the way the control unit does
// (lookup; on a miss allocate the victim, fill every word, install; touch on
// use) for a random stream of context addresses drawn from a set larger
// than the cache. A reference LRU list predicts hits and victims; every
// word of every context read back is compared with what was filled.
module tb_vcu_ctx_cache;
  import vrm_pkg::*;

  localparam int ENTRIES = 4, WORDS = 37, TAGW = 24;
  localparam int EW = 2, WIW = 6;

  logic clk = 0, rst_n = 0;
  logic [TAGW-1:0] lookup_tag;
  logic hit, victim_valid;
  logic [EW-1:0] hit_way, victim_way;
  logic alloc = 0, fill_we = 0, install = 0, touch = 0;
  logic [EW-1:0] alloc_way = 0, fill_way = 0, install_way = 0, touch_way = 0, rd_way = 0;
  logic [WIW-1:0] fill_word = 0;
  logic [31:0] fill_data = 0;
  logic [TAGW-1:0] install_tag = 0;
  logic [31:0] rd_ctx [WORDS];
  int checks = 0, failures = 0, cycles = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0;

  vcu_ctx_cache #(.ENTRIES(ENTRIES), .WORDS(WORDS), .TAGW(TAGW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Content of context t, word w.
  function automatic logic [31:0] content(int t, int w);
    return 32'(t) * 32'h9e3779b1 ^ 32'(w) * 32'h85ebca6b;
  endfunction

  int lru [$];        // tags, most recent first
  int way_of [int];   // tag -> way held by the reference

  initial begin
    lookup_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      int t, ew, idx[$];
      t = $urandom % 7;
      @(negedge clk);
      lookup_tag = TAGW'(t);
      #1;
      idx = lru.find_first_index(x) with (x == t);
      checks++;
      if (hit !== (idx.size() != 0)) begin
        failures++;
        $display("tag %0d: hit=%0b expected %0b", t, hit, idx.size() != 0);
      end
      if (idx.size() != 0) begin
        n_hit++;
        checks++;
        if (hit_way !== EW'(way_of[t])) failures++;
        ew = way_of[t];
        lru.delete(idx[0]);
        touch = 1; touch_way = EW'(ew);
        @(negedge clk);
        touch = 0;
      end else begin
        n_miss++;
        if (lru.size() < ENTRIES) begin
          checks++;
          if (victim_valid !== 1'b0 || victim_way !== EW'(lru.size())) failures++;
          ew = lru.size();
        end else begin
          int old;
          n_evict++;
          old = lru.pop_back();
          checks++;
          if (victim_valid !== 1'b1 || victim_way !== EW'(way_of[old])) begin
            failures++;
            $display("victim %0d expected way %0d (tag %0d)", victim_way, way_of[old], old);
          end
          ew = way_of[old];
          way_of.delete(old);
        end
        alloc = 1; alloc_way = EW'(ew);
        @(negedge clk);
        alloc = 0;
        for (int w = 0; w < WORDS; w++) begin
          fill_we = 1; fill_way = EW'(ew); fill_word = WIW'(w); fill_data = content(t, w);
          @(negedge clk);
        end
        fill_we = 0;
        install = 1; install_way = EW'(ew); install_tag = TAGW'(t);
        touch = 1; touch_way = EW'(ew);
        @(negedge clk);
        install = 0; touch = 0;
        way_of[t] = ew;
      end
      lru.push_front(t);
      rd_way = EW'(ew);
      #1;
      for (int w = 0; w < WORDS; w++) begin
        checks++;
        if (rd_ctx[w] !== content(t, w)) failures++;
      end
    end
    checks++;
    if (n_hit < 50 || n_evict < 50) failures++;
    $display("hits %0d misses %0d evictions %0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
