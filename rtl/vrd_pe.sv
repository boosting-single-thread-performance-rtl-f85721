// vrd_pe: one processing element of the reconfigurable datapath.
//
// An ALU PE (mode ALU) outputs the ALU result and flags. In a load/store
// column (LS_CAPABLE = 1) the PE can instead issue a memory operation:
// operand A is the word address, which the compiler computes in the row
// above, and operand B is the store data. A load PE outputs the word the
// VCU fetched for it (ld_data) with all flags 0; a store or idle PE outputs
// zero. LOAD/STORE in a column without memory access behave as idle.
// Purely combinational.
module vrd_pe
  import vrm_pkg::*;
#(
  parameter bit LS_CAPABLE = 1'b0
) (
  input  pe_cfg_t         cfg,
  input  logic [XLEN-1:0] opa,
  input  logic [XLEN-1:0] opb,
  input  logic            fin,
  input  logic [XLEN-1:0] ld_data,
  output logic [XLEN-1:0] y,
  output flags_t          f,
  output ls_req_t         ls
);

  logic [XLEN-1:0] alu_y;
  flags_t          alu_f;

  vrd_alu u_alu (
    .op   (cfg.op),
    .a    (opa),
    .b    (opb),
    .fin  (fin),
    .y    (alu_y),
    .fout (alu_f)
  );

  always_comb begin
    y        = '0;
    f        = '0;
    ls.req   = 1'b0;
    ls.we    = 1'b0;
    ls.addr  = opa;
    ls.wdata = opb;
    unique case (cfg.mode)
      PE_ALU: begin
        y = alu_y;
        f = alu_f;
      end
      PE_LOAD: if (LS_CAPABLE) begin
        ls.req = 1'b1;
        y      = ld_data;
      end
      PE_STORE: if (LS_CAPABLE) begin
        ls.req = 1'b1;
        ls.we  = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
