// vrd_alu: the arithmetic and logic unit of one datapath processing element.
//
// Purely combinational. Every operation takes two 32-bit operands and a
// 1-bit flag operand and produces a 32-bit result and the four flags
// N (sign), Z (zero), C (carry out) and V (overflow), as the architecture
// specifies. Only integer operations exist. The operation list and the flag
// rules are this design's own choice, made to match the ARM host:
//   ADD/ADC/SUB/SBC/RSB/RSC  C = carry out (not borrow for subtraction),
//                            V = signed overflow; ADC/SBC/RSC use fin as carry.
//   AND/ORR/EOR/BIC/MOV/MVN  C = fin, V = 0.
//   LSL/LSR/ASR/ROR          amount = b[7:0]; C = last bit shifted out
//                            (fin when the amount is 0), V = 0.
// N and Z always come from the result.
module vrd_alu
  import vrm_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  input  logic             fin,
  output logic [XLEN-1:0]  y,
  output flags_t           fout
);

  logic [XLEN:0]   sum;       // adder result with carry out
  logic [XLEN-1:0] add_x;     // adder operands after inversion
  logic [XLEN-1:0] add_y;
  logic            add_cin;
  logic            is_arith;
  logic [7:0]      amt;
  logic [4:0]      amt5;      // amount modulo 32
  logic            sh_c;
  logic [XLEN-1:0] sh_y;

  // One adder serves all six arithmetic operations.
  always_comb begin
    is_arith = 1'b1;
    add_x    = a;
    add_y    = b;
    add_cin  = 1'b0;
    unique case (op)
      OP_ADD: begin add_x = a;  add_y = b;  add_cin = 1'b0; end
      OP_ADC: begin add_x = a;  add_y = b;  add_cin = fin;  end
      OP_SUB: begin add_x = a;  add_y = ~b; add_cin = 1'b1; end
      OP_SBC: begin add_x = a;  add_y = ~b; add_cin = fin;  end
      OP_RSB: begin add_x = b;  add_y = ~a; add_cin = 1'b1; end
      OP_RSC: begin add_x = b;  add_y = ~a; add_cin = fin;  end
      default: is_arith = 1'b0;
    endcase
    sum = {1'b0, add_x} + {1'b0, add_y} + {{XLEN{1'b0}}, add_cin};
  end

  // Shifter: register-specified ARM shifts, amount in b[7:0]. One
  // five-stage right shifter serves all four; LSL runs it on the
  // bit-reversed operand. The carry is the bit at position s-1 before the
  // last stage that shifts by s, which is the last bit shifted out.
  function automatic logic [XLEN-1:0] bitrev(logic [XLEN-1:0] v);
    for (int i = 0; i < XLEN; i++) bitrev[i] = v[XLEN-1-i];
  endfunction

  always_comb begin
    logic [XLEN-1:0] x;
    logic [XLEN-1:0] xs;     // value before the current stage
    logic            c;
    logic            sign;
    amt  = b[7:0];
    amt5 = b[4:0];
    sign = (op == OP_ASR) && a[XLEN-1];
    x    = (op == OP_LSL) ? bitrev(a) : a;
    c    = fin;
    for (int k = 0; k < 5; k++) begin
      xs = x;
      if (amt5[k]) begin
        c = xs[(1 << k) - 1];
        for (int i = 0; i < XLEN; i++)
          if (i + (1 << k) < XLEN)
            x[i] = xs[i + (1 << k)];
          else if (op == OP_ROR)
            x[i] = xs[i + (1 << k) - XLEN];
          else
            x[i] = sign;
      end
    end
    if (op == OP_LSL) x = bitrev(x);
    sh_y = x;
    sh_c = c;
    if (amt == 8'd0) begin
      sh_y = a;
      sh_c = fin;
    end else if (op == OP_ROR) begin
      sh_c = x[XLEN-1];
    end else if (amt >= 8'd32) begin
      // whole operand shifted out
      sh_y = {XLEN{sign}};
      if (op == OP_ASR)      sh_c = a[XLEN-1];
      else if (amt != 8'd32) sh_c = 1'b0;
      else if (op == OP_LSL) sh_c = a[0];
      else                   sh_c = a[XLEN-1];
    end
  end

  always_comb begin
    fout.c = fin;
    fout.v = 1'b0;
    unique case (op)
      OP_AND: y = a & b;
      OP_ORR: y = a | b;
      OP_EOR: y = a ^ b;
      OP_BIC: y = a & ~b;
      OP_MOV: y = b;
      OP_MVN: y = ~b;
      OP_LSL, OP_LSR, OP_ASR, OP_ROR: begin
        y      = sh_y;
        fout.c = sh_c;
      end
      default: y = sum[XLEN-1:0];
    endcase
    if (is_arith) begin
      fout.c = sum[XLEN];
      fout.v = (add_x[XLEN-1] == add_y[XLEN-1]) && (sum[XLEN-1] != add_x[XLEN-1]);
    end
    fout.n = y[XLEN-1];
    fout.z = (y == '0);
  end

endmodule
