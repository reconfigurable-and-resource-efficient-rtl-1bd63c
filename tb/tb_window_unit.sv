// Self-checking testbench of the windowing stage at a reduced RAM size (64 words).
// Loads random coefficients (including 0, 1.0 and the saturating maximum), streams random
// samples with gaps for several 16-point frames, and checks every output against
// round(x * c / 2**17) saturated to 24 bits, with the coefficient chosen by the sample's
// position in its frame, and the two-clock latency. With win_en low samples pass unchanged.
module tb_window_unit;
  import fft_pkg::*;
  localparam int LOG2N = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] log2n = 4'd4;
  logic win_en = 1'b1;
  logic coef_we = 1'b0;
  logic [LOG2N-1:0] coef_addr;
  logic [WIN_W-1:0] coef_data;
  logic in_valid = 1'b0, out_valid;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  int coef [64];
  cplx_t exp_q [$];
  int t_q [$];
  int cyc = 0, pos = 0;

  window_unit #(.LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scale(input int x, input int c);
    longint p;
    p = (longint'(x) * c + (1 << 16)) >>> 17;
    if (p > 2**23 - 1) p = 2**23 - 1;
    if (p < -(2**23)) p = -(2**23);
    return int'(p);
  endfunction

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      cplx_t e;
      e.re = win_en ? DATA_W'(scale(in_data.re, coef[pos])) : in_data.re;
      e.im = win_en ? DATA_W'(scale(in_data.im, coef[pos])) : in_data.im;
      exp_q.push_back(e);
      t_q.push_back(cyc);
      pos = (pos + 1) % (1 << log2n);
    end
    if (out_valid) begin
      cplx_t e; int t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      checks++;
      if (out_data != e || cyc - t != 2) begin
        failures++;
        if (failures < 10) $display("MISMATCH got %h exp %h latency %0d", out_data, e, cyc - t);
      end
    end
  end

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      in_data.re <= DATA_W'($urandom);
      in_data.im <= DATA_W'($urandom);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin
      coef[a] = (a == 0) ? 0 : (a == 1) ? 2**17 : (a == 2) ? 2**18 - 1 : int'($urandom_range(0, 2**18 - 1));
      coef_we <= 1; coef_addr <= LOG2N'(a); coef_data <= WIN_W'(coef[a]);
      @(posedge clk);
    end
    coef_we <= 0;
    rst <= 0;
    @(posedge clk);
    stream(300);
    win_en <= 0;
    @(posedge clk);
    stream(100);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
