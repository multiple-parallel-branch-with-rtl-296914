// tb_delay_ram: self-checking testbench for delay_ram.
//
// Uses a depth that is not a power of two (200, the default tap count of the
// design). Clears the memory, then for many cycles writes and reads random
// addresses, comparing rdata with a testbench copy of the memory one clock
// after the read address was given (one-cycle read latency). Same-address
// write and read on one edge must return the new word (write-first); those
// collisions are forced regularly and counted.
module tb_delay_ram;
  localparam int DEPTH = 200;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   model [DEPTH];
  logic [31:0]   expect_q;
  logic          expect_v;
  int checks = 0, failures = 0, collisions = 0;

  delay_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0; expect_v = 1'b0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // rdata now holds the word for the previous cycle's read
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures <= 10) $display("MISMATCH cycle %0d got %08h expected %08h", i, rdata, expect_q);
        end
      end
      we    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = $urandom;
      raddr = (i % 5 == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      if (we && raddr == waddr) begin
        expect_q = wdata;
        collisions++;
      end else begin
        expect_q = model[raddr];
      end
      expect_v = 1'b1;
      if (we) model[waddr] = wdata;
    end
    if (collisions == 0) failures++;
    $display("write-first collisions exercised: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
