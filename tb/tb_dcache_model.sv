// tb_dcache_model: behavioural model of a core's two-bank L1 data cache as
// the reconfigurable unit sees it (not synthesizable, testbench only).
//
// One port per bank. A request is answered in the same cycle (ready high,
// read data combinational) unless the model decides the access misses: each
// cycle each port is ready with probability 100 - miss_pct percent, so a
// miss lasts a random number of cycles. Writes take effect at the clock
// edge of the cycle in which ready is high. The backing store is a sparse
// word memory (mem, indexed by word address) that the testbench can read
// and write directly. The model also checks that each port only sees
// addresses of its own bank (address bit 2).
module tb_dcache_model
  import vrm_pkg::*;
#(
  parameter int NBANKS = 2
) (
  input  logic        clk,
  input  int          miss_pct,
  input  logic        dc_req   [NBANKS],
  input  logic        dc_we    [NBANKS],
  input  logic [31:0] dc_addr  [NBANKS],
  input  logic [31:0] dc_wdata [NBANKS],
  output logic [31:0] dc_rdata [NBANKS],
  output logic        dc_ready [NBANKS]
);

  logic [31:0] mem [logic [31:0]];
  logic        lucky [NBANKS];
  int          bank_errors = 0;
  int          reads = 0, writes = 0, miss_cycles = 0;

  initial for (int b = 0; b < NBANKS; b++) lucky[b] = 1'b1;

  always_comb
    for (int b = 0; b < NBANKS; b++) begin
      dc_ready[b] = dc_req[b] && lucky[b];
      dc_rdata[b] = mem.exists(dc_addr[b] >> 2) ? mem[dc_addr[b] >> 2] : 32'h0;
    end

  always @(posedge clk) begin
    for (int b = 0; b < NBANKS; b++) begin
      if (dc_req[b]) begin
        if (NBANKS > 1 && int'((dc_addr[b] >> 2) % NBANKS) != b) bank_errors++;
        if (dc_ready[b]) begin
          if (dc_we[b]) begin mem[dc_addr[b] >> 2] = dc_wdata[b]; writes++; end
          else reads++;
        end else
          miss_cycles++;
      end
      lucky[b] <= (($urandom % 100) >= miss_pct);
    end
  end
endmodule
