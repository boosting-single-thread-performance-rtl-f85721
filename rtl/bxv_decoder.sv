// bxv_decoder: the addition to a host CPU's decode stage that hands a
// Branch-to-Virement (BXV) instruction to the reconfigurable unit.
//
// A BXV carries only the address of one configuration context. When the
// instruction in decode (id_valid, ARM state) is a BXV, the decoder stalls
// the pipeline, passes the address to the VRFU with a one-cycle bxv_valid,
// and keeps the stall until the VRFU's done pulse; in that cycle the stall
// is already low, so the BXV leaves decode on the same clock edge.
//
// Encoding (this design's own choice, the architecture leaves it open):
// bits [31:24] = 8'hF7, an unconditional encoding that ARMv5 leaves
// undefined, and bits [23:0] = the context's word address. Thumb state has
// no BXV. The decoder assumes the instruction stays in decode while the
// VRFU works, which the stall guarantees.
module bxv_decoder
  import vrm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              id_valid,
  input  logic [31:0]       id_instr,
  input  logic              id_arm_state,
  input  logic              vrfu_done,
  output logic              stall,
  output logic              bxv_valid,
  output logic [CTX_AW-1:0] bxv_addr
);

  localparam logic [7:0] BXV_OPC = 8'hF7;

  logic is_bxv;
  logic busy;     // the VRFU is working on the BXV in decode

  always_comb begin
    is_bxv    = id_valid && id_arm_state && (id_instr[31:24] == BXV_OPC);
    bxv_valid = is_bxv && !busy;
    bxv_addr  = id_instr[CTX_AW-1:0];
    stall     = is_bxv && !vrfu_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      busy <= 1'b0;
    else if (vrfu_done)
      busy <= 1'b0;
    else if (bxv_valid)
      busy <= 1'b1;
  end

  // While the VRFU works the BXV must stay in decode.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> is_bxv);
  // Completion only comes for a BXV that was handed over.
  a_done_busy: assert property (@(posedge clk) disable iff (!rst_n)
    vrfu_done |-> busy);

endmodule
