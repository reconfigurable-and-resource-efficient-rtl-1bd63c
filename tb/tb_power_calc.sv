// Self-checking testbench of the power calculation: random and corner-case (re, im)
// pairs, one per clock; each result must equal floor(sqrt(re^2 + im^2)) (computed here
// with 64-bit integers and a floating-point estimate corrected by one step) and must
// leave exactly POWER_LAT clocks after its input.
module tb_power_calc;
  import fft_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [FFT_W-1:0] in_re, in_im;
  logic out_valid;
  logic [MAG_W-1:0] out_mag;
  int checks = 0, failures = 0;

  power_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];
  int     t_in  [$];
  int     cyc = 0;
  always @(posedge clk) cyc++;

  function automatic longint isqrt(input longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  always @(posedge clk) begin
    if (in_valid) begin
      exp_q.push_back(isqrt(longint'(in_re) * in_re + longint'(in_im) * in_im));
      t_in.push_back(cyc);
    end
    if (out_valid) begin
      longint e; int t;
      e = exp_q.pop_front();
      t = t_in.pop_front();
      checks++;
      if (longint'(out_mag) != ((e > 2**24 - 1) ? 2**24 - 1 : e) || (cyc - t) != POWER_LAT) begin
        failures++;
        if (failures < 10) $display("MISMATCH got %0d exp %0d latency %0d", out_mag, e, cyc - t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      in_valid <= ($urandom_range(0, 7) != 0);
      case (i)
        0: begin in_re <= '0; in_im <= '0; end
        1: begin in_re <= -(2**23); in_im <= -(2**23); end
        2: begin in_re <= 2**23 - 1; in_im <= 0; end
        3: begin in_re <= -(2**24); in_im <= 0; end
        default: begin
          in_re <= FFT_W'(int'($urandom_range(0, 2**24)) - 2**23);
          in_im <= FFT_W'(int'($urandom_range(0, 2**24)) - 2**23);
        end
      endcase
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (POWER_LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
