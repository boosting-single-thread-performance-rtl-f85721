// cfg_dma: the DMA through which the VIREMENT control units fetch
// configuration contexts from main memory.
//
// NCH requesters (one per core) each post a transfer: a word-aligned byte
// address and a length in words. The DMA serves one transfer at a time,
// choosing between waiting requesters round robin, starting after the last
// one served. It issues word reads back to back (mem_req/mem_addr, taken
// when mem_gnt is high) and accepts in-order read data (mem_rvalid/
// mem_rdata), handing each word to the requester with its index
// (ch_wvalid/ch_widx/ch_wdata); ch_done is high with the last word.
// ch_gnt pulses for one cycle when a request is taken; the requester keeps
// ch_req high until then. Sharing one DMA between the cores and the
// round-robin order are this design's own choice.
module cfg_dma
  import vrm_pkg::*;
#(
  parameter int unsigned NCH  = 4,
  parameter int unsigned LENW = 8,
  localparam int unsigned CW  = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ch_req   [NCH],
  input  logic [XLEN-1:0] ch_addr  [NCH],
  input  logic [LENW-1:0] ch_len   [NCH],
  output logic            ch_gnt   [NCH],
  output logic            ch_wvalid[NCH],
  output logic [LENW-1:0] ch_widx,
  output logic [XLEN-1:0] ch_wdata,
  output logic            ch_done  [NCH],
  output logic            mem_req,
  output logic [XLEN-1:0] mem_addr,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [XLEN-1:0] mem_rdata
);

  logic            busy;
  logic [CW-1:0]   cur;        // channel being served
  logic [CW-1:0]   rr;         // first channel to consider next time
  logic [XLEN-1:0] base;
  logic [LENW-1:0] len;
  logic [LENW-1:0] issued;
  logic [LENW-1:0] recvd;
  logic            pick_ok;
  logic [CW-1:0]   pick;

  // Round-robin choice among waiting channels.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 0; k < NCH; k++) begin
      int unsigned ch;
      ch = (32'(rr) + k) % NCH;
      if (!pick_ok && ch_req[ch]) begin
        pick_ok = 1'b1;
        pick    = CW'(ch);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      ch_gnt[i]    = !busy && pick_ok && (CW'(i) == pick);
      ch_wvalid[i] = busy && mem_rvalid && (CW'(i) == cur);
      ch_done[i]   = busy && mem_rvalid && (CW'(i) == cur) && (recvd == len - 1'b1);
    end
    ch_widx  = recvd;
    ch_wdata = mem_rdata;
    mem_req  = busy && (issued != len);
    mem_addr = base + XLEN'({issued, 2'b00});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cur    <= '0;
      rr     <= '0;
      base   <= '0;
      len    <= '0;
      issued <= '0;
      recvd  <= '0;
    end else if (!busy) begin
      if (pick_ok && ch_len[pick] != '0) begin
        busy   <= 1'b1;
        cur    <= pick;
        rr     <= CW'((32'(pick) + 1) % NCH);
        base   <= {ch_addr[pick][XLEN-1:2], 2'b00};
        len    <= ch_len[pick];
        issued <= '0;
        recvd  <= '0;
      end
    end else begin
      if (mem_req && mem_gnt)
        issued <= issued + 1'b1;
      if (mem_rvalid) begin
        recvd <= recvd + 1'b1;
        if (recvd == len - 1'b1)
          busy <= 1'b0;
      end
    end
  end

  // Read data may only come back for a read that was issued.
  a_rvalid_issued: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> busy && (recvd < issued));

endmodule
