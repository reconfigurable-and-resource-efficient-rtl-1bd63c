// Self-checking testbench of the FFT output RAM at 16 bins: writes several frames in
// bit-reversed bin order (as the FFT delivers them) and reads every bin back: the word
// must hold the frame's magnitude and a toggle bit that flips from frame to frame
// (starting from whatever the array held at power-up).
module tb_fft_output_ram;
  import fft_pkg::*;
  localparam int LOG2N = 4;
  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [LOG2N-1:0] wr_addr, rd_addr;
  logic [MAG_W-1:0] wr_mag;
  mag_word_t rd_word;
  int checks = 0, failures = 0;
  int mags [16];
  bit par0 [16];

  fft_output_ram #(.LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      for (int j = 0; j < 16; j++) begin
        logic [3:0] b;
        b = {<<{4'(j)}};
        mags[b] = int'($urandom_range(0, 2**24 - 1));
        wr_en <= ($urandom_range(0, 2) != 0) ? 1'b1 : 1'b0;
        wr_addr <= b; wr_mag <= MAG_W'(mags[b]);
        @(posedge clk);
        while (!wr_en) begin
          wr_en <= 1;
          @(posedge clk);
        end
      end
      wr_en <= 0;
      for (int k = 0; k < 16; k++) begin
        rd_addr <= 4'(k);
        @(posedge clk);
        #1;
        checks++;
        if (f == 0) par0[k] = rd_word.par;
        if (rd_word.mag != MAG_W'(mags[k]) || rd_word.par != (par0[k] ^ (f % 2 == 1))) begin
          failures++;
          if (failures < 10) $display("MISMATCH frame %0d bin %0d got %h/%0d exp %h", f, k, rd_word.mag, rd_word.par, mags[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
