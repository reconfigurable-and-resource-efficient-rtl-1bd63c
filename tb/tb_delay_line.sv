// Self-checking testbench of the delay buffer: random data and valid bits must reappear
// exactly DELAY clocks later, and valid must be low after reset.
module tb_delay_line;
  localparam int W = 15, DLY = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  logic [W:0] hist [0:63];
  int cyc = 0;

  delay_line #(.WIDTH(W), .DELAY(DLY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("valid not cleared by reset"); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      #1;
      if (i >= DLY) begin
        checks++;
        if (out_valid != hist[(i - DLY) % 64][W] || (out_valid && out_data != hist[(i - DLY) % 64][W-1:0])) begin
          failures++;
          if (failures < 10) $display("MISMATCH at %0d", i);
        end
      end
      in_valid = $urandom_range(0, 1) != 0;
      in_data  = W'($urandom);
      hist[i % 64] = {in_valid, in_data};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
