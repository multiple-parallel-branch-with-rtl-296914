// tb_fp_add: self-checking testbench for fp_add, the fp32 adder.
//
// Applies directed corner cases and random operands (narrow, medium and wide
// exponent spreads, so that cancellation, alignment beyond the guard bits,
// overflow, underflow, zeros, subnormals, infinities and NaNs all occur),
// operands with short significands that make exact rounding ties frequent, and
// compares every result bit for bit with fp32_ref_pkg, which computes a+b
// in double precision and rounds once. A watchdog ends the run if it hangs.
module tb_fp_add;
  import fp32_ref_pkg::*;

  logic [31:0] a, b, c, dut_r, exp_r;
  int checks = 0;
  int failures = 0;

  fp_add dut (.a(a), .b(b), .s(dut_r));

  task automatic check_one();
    #1;
    exp_r = ref_add(a, b);
    checks++;
    if (dut_r !== exp_r) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH a=%08h b=%08h c=%08h dut=%08h ref=%08h", a, b, c, dut_r, exp_r);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 32'h0;
    // directed cases
    a = 32'h3F80_0000; b = 32'h3F80_0000; c = 32'h3F80_0000; check_one();  // 1,1,1
    a = 32'h3F80_0000; b = 32'hBF80_0000; c = 32'h3F80_0000; check_one();  // cancellation
    a = 32'h4000_0000; b = 32'h3FC0_0000; c = 32'hC040_0000; check_one();  // 2*1.5-3
    a = 32'h3F80_0001; b = 32'h3F7F_FFFF; c = 32'hBF80_0000; check_one();
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; c = 32'h7F7F_FFFF; check_one();  // overflow
    a = 32'h0080_0000; b = 32'h0080_0000; c = 32'h8080_0000; check_one();  // underflow
    a = 32'h7F80_0000; b = 32'h0000_0000; c = 32'h3F80_0000; check_one();  // inf*0
    a = 32'h7F80_0000; b = 32'hFF80_0000; c = 32'h7F80_0000; check_one();  // inf-inf
    a = 32'h8000_0000; b = 32'h8000_0000; c = 32'h8000_0000; check_one();  // signed zeros
    a = 32'h3F80_0000; b = 32'h3380_0000; c = 32'h3380_0000; check_one();  // tie cases
    a = 32'h3F80_0001; b = 32'h3380_0000; c = 32'h3380_0000; check_one();
    a = 32'h4B00_0001; b = 32'h3F00_0000; c = 32'h3F00_0000; check_one();
    a = 32'h3F80_0003; b = 32'h3FC0_0000; c = 32'h0000_0000; check_one();  // product tie, round to even
    // operands with short significands, so exact ties of the rounding occur often
    for (int i = 0; i < 5000; i++) begin
      a = rand_fp(20);
      b = {1'($urandom), 8'($urandom_range(110, 140)), 3'($urandom), 20'd0};
      c = {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)};
      check_one();
    end
    // random cases
    for (int i = 0; i < 60000; i++) begin
      int sp;
      sp = (i % 3 == 0) ? 2 : ((i % 3 == 1) ? 30 : 126);
      a = rand_fp(sp);
      b = rand_fp(sp);
      c = rand_fp(sp);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
