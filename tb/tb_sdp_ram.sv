// Self-checking testbench of the simple dual-port RAM (trace store geometry, 40 x 1024):
// random writes and reads against a reference array, one clock read latency, and
// read-first behaviour when reading and writing one address in the same clock.
module tb_sdp_ram;
  localparam int W = 40, D = 1024;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [9:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [D];
  logic [W-1:0] expect_q;
  logic         pend = 1'b0;
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < D; a++) begin
      we <= 1; waddr <= 10'(a); wdata <= {8'($urandom), $urandom};
      @(posedge clk);
      ref_mem[a] = wdata;
    end
    we <= 0;
    for (int i = 0; i < 5000; i++) begin
      logic [9:0] ra, wa;
      logic [W-1:0] wd;
      ra = 10'($urandom);
      wa = ($urandom_range(0, 3) == 0) ? ra : 10'($urandom);
      wd = {8'($urandom), $urandom};
      we <= $urandom_range(0, 1) != 0; waddr <= wa; wdata <= wd;
      re <= 1; raddr <= ra;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != ref_mem[ra]) begin
        failures++;
        if (failures < 10) $display("MISMATCH addr %0d got %h exp %h", ra, rdata, ref_mem[ra]);
      end
      if (we) ref_mem[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
