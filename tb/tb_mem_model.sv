// tb_mem_model: behavioural main memory for the context DMA (testbench
// only). Read requests are granted at random (grant_pct percent of cycles)
// and answered in order LAT cycles later. The contents are a sparse word
// memory (mem, indexed by word address) that the testbench fills directly.
module tb_mem_model #(
  parameter int LAT = 4
) (
  input  logic        clk,
  input  int          grant_pct,
  input  logic        mem_req,
  input  logic [31:0] mem_addr,
  output logic        mem_gnt,
  output logic        mem_rvalid,
  output logic [31:0] mem_rdata
);
  logic [31:0] mem [logic [31:0]];
  logic [31:0] pipe_a [LAT];
  logic        pipe_v [LAT];
  int          reads = 0;

  initial begin
    for (int i = 0; i < LAT; i++) begin pipe_a[i] = 0; pipe_v[i] = 0; end
    mem_gnt = 0;
  end

  always_comb begin
    mem_rvalid = pipe_v[LAT-1];
    mem_rdata  = mem.exists(pipe_a[LAT-1] >> 2) ? mem[pipe_a[LAT-1] >> 2] : 32'h0;
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin pipe_v[i] <= pipe_v[i-1]; pipe_a[i] <= pipe_a[i-1]; end
    pipe_v[0] <= mem_req && mem_gnt;
    pipe_a[0] <= mem_addr;
    if (mem_req && mem_gnt) reads++;
    mem_gnt   <= (($urandom % 100) < grant_pct);
  end
endmodule
