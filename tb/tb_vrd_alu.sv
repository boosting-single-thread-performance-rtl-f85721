// tb_vrd_alu: checks every ALU operation against the reference model in
// vrm_tb_pkg with corner-case and random operands and both flag inputs.
module tb_vrd_alu;
  import vrm_pkg::*;
  import vrm_tb_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        fin;
  flags_t      f;
  int checks = 0, failures = 0;

  vrd_alu dut (.op(op), .a(a), .b(b), .fin(fin), .y(y), .fout(f));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int o, word_t va, word_t vb, bit vf);
    word_t  ey;
    flags_t ef;
    op = alu_op_e'(o); a = va; b = vb; fin = vf;
    #1;
    ref_alu(o, va, vb, vf, ey, ef);
    checks++;
    if (y !== ey || f !== ef) begin
      failures++;
      if (failures < 10)
        $display("op=%0d a=%h b=%h fin=%0b: got %h %b, expected %h %b", o, va, vb, vf, y, f, ey, ef);
    end
  endtask

  word_t corner [8] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff,
                        32'h20, 32'h21, 32'h1f};

  initial begin
    for (int o = 0; o < 16; o++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          for (int c = 0; c < 2; c++)
            check_one(o, corner[i] ^ ((o > 11 && i > 4) ? 32'h5a5a0000 : 0), corner[j], c[0]);
    for (int n = 0; n < 20000; n++) begin
      word_t vb;
      vb = $urandom;
      if (n % 3 == 0) vb = $urandom % 70;
      check_one($urandom % 16, $urandom, vb, $urandom % 2);
    end
    // A few hand-worked values, independent of the reference model.
    op = OP_ADD; a = 32'hffffffff; b = 32'h1; fin = 0; #1;
    checks++; if (y !== 0 || f !== 4'b0110) failures++;          // Z and C
    op = OP_SUB; a = 32'h80000000; b = 32'h1; fin = 0; #1;
    checks++; if (y !== 32'h7fffffff || f !== 4'b0011) failures++; // C and V
    op = OP_LSR; a = 32'h80000001; b = 32'h1; fin = 0; #1;
    checks++; if (y !== 32'h40000000 || f.c !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
