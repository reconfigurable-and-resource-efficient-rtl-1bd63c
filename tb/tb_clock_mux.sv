// Self-checking testbench of the glitch-free clock multiplexer. clk0 has an 8-unit period,
// clk1 a 4-unit period (the 2x clock). The output's rising edges are counted over windows
// after each switch settles and must match the selected clock; every high and low phase
// of the output must be at least as long as half a period of the faster clock (no glitch).
module tb_clock_mux;
  logic clk0 = 1'b0, clk1 = 1'b0, settled = 1'b0, sel = 1'b0, clk_out;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime last_change = 0;

  clock_mux dut (.*);

  initial forever #4 clk0 = ~clk0;
  initial forever #2 clk1 = ~clk1;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_out) edges++;
  always @(clk_out) begin
    if (settled && $realtime - last_change < 1.9 && last_change > 0) begin
      failures++;
      $display("glitch: output phase of %0t", $realtime - last_change);
    end
    last_change = $realtime;
  end

  task automatic window(input int exp_edges);
    int e0;
    e0 = edges;
    #200;
    checks++;
    if (edges - e0 < exp_edges - 1 || edges - e0 > exp_edges + 1) begin
      failures++;
      $display("selected clock not on output: %0d edges, expected %0d", edges - e0, exp_edges);
    end
  endtask

  initial begin
    #23 settled = 1;
    #50;
    window(25);          // clk0: 200 / 8
    for (int i = 0; i < 6; i++) begin
      #($urandom_range(1, 9)) sel = ~sel;
      #60;
      window(sel ? 50 : 25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
