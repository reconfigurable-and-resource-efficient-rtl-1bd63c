// Self-checking testbench of one channel's input FIFO block at a reduced FIFO depth (16).
// Beats of four complex samples are announced by toggling beat_tgl on FPGA_CLK.
// Part 1: write clock = 2xFPGA_CLK, bursts of one beat per FPGA_CLK.
// Part 2: write clock = FPGA_CLK, one beat every other FPGA_CLK.
// In both, the samples must leave in their original order (lane 0 first), one per FPGA_CLK
// at most, with no loss and no overflow flag. Part 3 overfills the FIFOs on purpose and
// the overflow flag must rise.
module tb_input_fifo_block;
  import fft_pkg::*;
  logic clk = 1'b0, clk2 = 1'b0, use2x = 1'b1;
  logic wr_rst = 1'b1, rd_rst = 1'b1;
  logic beat_tgl = 1'b0;
  beat_t beat_data;
  logic out_valid, overflow;
  cplx_t out_data;
  logic wr_clk;
  int checks = 0, failures = 0;
  cplx_t q [$];

  assign wr_clk = use2x ? clk2 : clk;
  input_fifo_block #(.DEPTH(16)) dut (
    .wr_clk(wr_clk), .wr_rst(wr_rst), .beat_tgl(beat_tgl), .beat_data(beat_data),
    .rd_clk(clk), .rd_rst(rd_rst), .out_valid(out_valid), .out_data(out_data), .overflow(overflow));

  initial forever #4 clk = ~clk;
  initial forever #2 clk2 = ~clk2;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit checking = 1;
  always @(posedge clk) begin
    if (!rd_rst && out_valid && checking) begin
      cplx_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_data != e) begin
          failures++;
          if (failures < 10) $display("MISMATCH got %h exp %h", out_data, e);
        end
      end
    end
  end

  task automatic send_beat();
    beat_t b;
    for (int l = 0; l < LANES; l++) begin
      b[l].re = DATA_W'($urandom);
      b[l].im = DATA_W'($urandom);
      q.push_back(b[l]);
    end
    beat_data <= b;
    beat_tgl  <= !beat_tgl;
  endtask

  task automatic do_reset();
    wr_rst = 1; rd_rst = 1;
    repeat (4) @(posedge clk);
    wr_rst = 0; rd_rst = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    // part 1: 2x write clock, bursts at one beat per clock
    use2x = 1;
    do_reset();
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 6; i++) begin send_beat(); @(posedge clk); end
      repeat (24) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0 || overflow) begin failures++; $display("part 1: %0d samples lost, overflow %0d", q.size(), overflow); end
    // part 2: 1x write clock, one beat every other clock
    use2x = 0;
    do_reset();
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 4; i++) begin send_beat(); @(posedge clk); @(posedge clk); end
      repeat (16) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0 || overflow) begin failures++; $display("part 2: %0d samples lost, overflow %0d", q.size(), overflow); end
    // part 3: overfill
    use2x = 1;
    do_reset();
    checking = 0;
    for (int i = 0; i < 30; i++) begin send_beat(); @(posedge clk); end
    repeat (10) @(posedge clk);
    checks++;
    if (!overflow) begin failures++; $display("part 3: overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
