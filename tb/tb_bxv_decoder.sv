// tb_bxv_decoder: a BXV in ARM state must raise the stall at once, hand the
// address over exactly once and drop the stall in the cycle of done; other
// instructions, and a BXV pattern in Thumb state, must pass untouched.
module tb_bxv_decoder;
  import vrm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic id_valid = 0, id_arm_state = 1, vrfu_done = 0;
  logic [31:0] id_instr = 0;
  logic stall, bxv_valid;
  logic [23:0] bxv_addr;
  int checks = 0, failures = 0, cycles = 0;

  bxv_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_sig(logic s, logic v, string what);
    checks++;
    if (stall !== s || bxv_valid !== v) begin
      failures++;
      $display("%s: stall=%0b valid=%0b expected %0b %0b", what, stall, bxv_valid, s, v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int kind, lat;
      logic [23:0] addr;
      kind = $urandom % 3;
      addr = 24'($urandom);
      @(negedge clk);
      id_valid = 1;
      id_arm_state = (kind != 2);
      id_instr = (kind == 0) ? {8'hE0, 24'($urandom)} : {8'hF7, addr};
      #1;
      if (kind != 1) begin
        expect_sig(0, 0, "ordinary");
        continue;
      end
      expect_sig(1, 1, "bxv first cycle");
      checks++;
      if (bxv_addr !== addr) failures++;
      lat = 1 + $urandom % 8;
      repeat (lat - 1) begin
        @(negedge clk); #1;
        expect_sig(1, 0, "bxv waiting");
      end
      @(negedge clk);
      vrfu_done = 1;
      #1;
      expect_sig(0, 0, "done cycle");
      @(negedge clk);
      vrfu_done = 0;
      // a second BXV directly behind the first is taken again
      if ($urandom % 2) begin
        #1;
        expect_sig(1, 1, "back-to-back bxv");
        @(negedge clk);
        vrfu_done = 1;
        #1;
        expect_sig(0, 0, "back-to-back done");
        @(negedge clk);
        vrfu_done = 0;
      end
      id_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
