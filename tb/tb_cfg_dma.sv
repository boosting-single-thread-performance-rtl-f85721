// tb_cfg_dma: four requesters post transfers at random times against a
// main-memory model with random grant and a three-cycle read latency.
// Every delivered word must equal the memory word at base + 4*index, words
// must arrive in index order with done on the last, and when several
// requesters wait the grant must go round robin.
module tb_cfg_dma;
  import vrm_pkg::*;

  localparam int NCH = 4, LENW = 8, LAT = 3;

  logic clk = 0, rst_n = 0;
  logic ch_req [NCH];
  logic [31:0] ch_addr [NCH];
  logic [LENW-1:0] ch_len [NCH];
  logic ch_gnt [NCH], ch_wvalid [NCH], ch_done [NCH];
  logic [LENW-1:0] ch_widx;
  logic [31:0] ch_wdata;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  int checks = 0, failures = 0, cycles = 0;

  cfg_dma #(.NCH(NCH), .LENW(LENW)) dut (.*);

  always #5 clk = ~clk;

  // Memory model: word = address * 3 + 1; fixed latency, in order.
  logic [31:0] pipe_a [LAT];
  logic        pipe_v [LAT];
  always_comb mem_rvalid = pipe_v[LAT-1];
  always_comb mem_rdata  = pipe_a[LAT-1] * 3 + 1;
  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin pipe_v[i] <= pipe_v[i-1]; pipe_a[i] <= pipe_a[i-1]; end
    pipe_v[0] <= mem_req && mem_gnt;
    pipe_a[0] <= mem_addr;
    mem_gnt   <= ($urandom % 4) != 0;
  end

  int expect_idx [NCH];
  int transfers [NCH];
  int last_gnt = -1;
  int rr_checked = 0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Requesters.
  for (genvar i = 0; i < NCH; i++) begin : g_req
    initial begin
      ch_req[i] = 0; ch_addr[i] = 0; ch_len[i] = 0;
      @(posedge rst_n);
      repeat (30) begin
        repeat ($urandom % 20) @(posedge clk);
        @(negedge clk);
        ch_req[i]  = 1;
        ch_addr[i] = 32'h1000 * (i + 1) + (($urandom % 64) << 2);
        ch_len[i]  = LENW'(1 + $urandom % 40);
        expect_idx[i] = 0;
        #2;
        while (!ch_gnt[i]) begin @(negedge clk); #2; end
        @(negedge clk);
        ch_req[i] = 0;
        #2;
        while (!ch_done[i]) begin @(negedge clk); #2; end
        @(negedge clk);
        transfers[i]++;
      end
    end
  end

  // Checker.
  always @(negedge clk) if (rst_n) begin
    int ng, waiting[$];
    #1;
    ng = 0;
    for (int i = 0; i < NCH; i++) begin
      if (ch_req[i]) waiting.push_back(i);
      if (ch_gnt[i]) begin
        ng++;
        // round robin: the granted channel is the first waiting one after the last grant
        begin
          int first;
          first = -1;
          for (int k = 1; k <= NCH; k++) begin
            int c;
            c = (last_gnt + k + NCH) % NCH;
            if (first < 0 && ch_req[c]) first = c;
          end
          checks++;
          if (first != i) begin failures++; $display("grant to %0d, expected %0d", i, first); end
          last_gnt = i;
        end
      end
      if (ch_wvalid[i]) begin
        checks++;
        if (ch_widx != LENW'(expect_idx[i]) ||
            ch_wdata != (ch_addr[i] + 4 * expect_idx[i]) * 3 + 1) begin
          failures++;
          if (failures < 10) $display("ch %0d word %0d: got idx %0d data %h", i, expect_idx[i], ch_widx, ch_wdata);
        end
        checks++;
        if (ch_done[i] != (expect_idx[i] == ch_len[i] - 1)) failures++;
        expect_idx[i]++;
      end
    end
    if (waiting.size() > 1 && ng > 0) rr_checked++;
    checks++;
    if (ng > 1) failures++;
  end

  initial begin
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 0; pipe_a[i] = 0; end
    mem_gnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (transfers[0] == 30 && transfers[1] == 30 && transfers[2] == 30 && transfers[3] == 30);
    checks++;
    if (rr_checked < 10) begin failures++; $display("too few contended grants: %0d", rr_checked); end
    $display("contended grants %0d", rr_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
