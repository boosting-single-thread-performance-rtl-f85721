// vcu_ctx_cache: the context cache of the VIREMENT control unit.
//
// A small fully associative store of ENTRIES configuration contexts, each
// WORDS 32-bit words, tagged with the context address carried by a BXV.
// Because all contexts have the same size there is no fragmentation:
// an entry is simply replaced. Replacement is least recently used, kept
// exactly with one age counter per entry (0 = most recent); an invalid
// entry is always chosen before a valid one.
//
// Interface and timing:
//   lookup_tag -> hit, hit_way           combinational
//   victim_way, victim_valid             combinational: entry to replace and
//                                        whether it holds a valid context
//   alloc/alloc_way                      clocked: invalidate an entry before a fill
//   fill_we/fill_way/fill_word/fill_data clocked: write one word (from the DMA)
//   install/install_way/install_tag      clocked: mark a filled entry valid
//   touch/touch_way                      clocked: make an entry most recent
//   rd_way -> rd_ctx                     combinational: the whole context, so
//                                        the datapath is configured at once
// The storage is written as a register array; a single-word-per-cycle
// write port matches the DMA. Entry count and associativity are this
// design's own choice (the architecture asks only for a small SRAM with
// LRU replacement).
module vcu_ctx_cache
  import vrm_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned WORDS   = ctx_words(4, 4),
  parameter int unsigned TAGW    = CTX_AW,
  localparam int unsigned EW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned WIW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAGW-1:0] lookup_tag,
  output logic            hit,
  output logic [EW-1:0]   hit_way,
  output logic [EW-1:0]   victim_way,
  output logic            victim_valid,
  input  logic            alloc,
  input  logic [EW-1:0]   alloc_way,
  input  logic            fill_we,
  input  logic [EW-1:0]   fill_way,
  input  logic [WIW-1:0]  fill_word,
  input  logic [XLEN-1:0] fill_data,
  input  logic            install,
  input  logic [EW-1:0]   install_way,
  input  logic [TAGW-1:0] install_tag,
  input  logic            touch,
  input  logic [EW-1:0]   touch_way,
  input  logic [EW-1:0]   rd_way,
  output logic [XLEN-1:0] rd_ctx [WORDS]
);

  logic [XLEN-1:0] mem   [ENTRIES][WORDS];
  logic [TAGW-1:0] tag   [ENTRIES];
  logic            valid [ENTRIES];
  logic [EW-1:0]   age   [ENTRIES];

  // Lookup.
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (valid[e] && tag[e] == lookup_tag) begin
        hit     = 1'b1;
        hit_way = EW'(e);
      end
  end

  // Victim: lowest invalid entry, else the oldest.
  always_comb begin
    logic found;
    found        = 1'b0;
    victim_way   = '0;
    victim_valid = 1'b1;
    for (int e = 0; e < ENTRIES; e++)
      if (!found && !valid[e]) begin
        found        = 1'b1;
        victim_way   = EW'(e);
        victim_valid = 1'b0;
      end
    if (!found)
      for (int e = 0; e < ENTRIES; e++)
        if (age[e] == EW'(ENTRIES - 1))
          victim_way = EW'(e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid[e] <= 1'b0;
        tag[e]   <= '0;
        age[e]   <= EW'(e);
      end
    end else begin
      if (alloc)
        valid[alloc_way] <= 1'b0;
      if (install) begin
        valid[install_way] <= 1'b1;
        tag[install_way]   <= install_tag;
      end
      if (touch)
        for (int e = 0; e < ENTRIES; e++)
          if (EW'(e) == touch_way)
            age[e] <= '0;
          else if (age[e] < age[touch_way])
            age[e] <= age[e] + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (fill_we)
      mem[fill_way][fill_word] <= fill_data;

  always_comb
    for (int w = 0; w < WORDS; w++)
      rd_ctx[w] = mem[rd_way][w];

endmodule
