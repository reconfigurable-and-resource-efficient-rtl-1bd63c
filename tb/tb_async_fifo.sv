// Self-checking testbench of the dual-clock FIFO at a reduced depth (16 words).
// Write clock 7 units, read clock 10 units, random write and read requests. Every word read
// must match a reference queue in order, full and empty must never let a word be lost or
// invented, a write while full must raise wr_overflow, and the FIFO must fill to its depth.
module tb_async_fifo;
  localparam int W = 24, D = 16;
  logic wr_clk = 1'b0, rd_clk = 1'b0, wr_rst = 1'b1, rd_rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data, rd_data;
  logic full, empty, wr_overflow;
  int checks = 0, failures = 0, ovf_seen = 0, max_fill = 0, reads = 0;
  logic [W-1:0] q [$];
  logic rd_pend = 1'b0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial forever #3.5 wr_clk = ~wr_clk;
  initial forever #5 rd_clk = ~rd_clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = 0;   // 0: writer fast, 1: reader fast
  always @(posedge wr_clk) begin
    if (wr_rst) wr_en <= 0;
    else begin
      if (wr_en && !full) q.push_back(wr_data);
      if (wr_en && full) ovf_seen++;
      if (q.size() > max_fill) max_fill = q.size();
      wr_en   <= (phase == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      wr_data <= W'($urandom);
    end
  end

  always @(posedge rd_clk) begin
    if (rd_rst) begin rd_en <= 0; rd_pend <= 0; end
    else begin
      if (rd_pend) begin
        logic [W-1:0] e;
        checks++;
        if (q.size() == 0) begin failures++; $display("read from an empty FIFO"); end
        else begin
          e = q.pop_front();
          if (rd_data != e) begin
            failures++;
            if (failures < 10) $display("MISMATCH got %h exp %h", rd_data, e);
          end
        end
        reads++;
      end
      rd_pend <= rd_en && !empty;
      rd_en   <= (phase == 1) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 5) == 0);
    end
  end

  logic ovf_flag = 0;
  always @(posedge wr_clk) if (wr_overflow) ovf_flag <= 1;

  initial begin
    #30 wr_rst = 0; rd_rst = 0;
    for (int r = 0; r < 6; r++) begin
      phase = r % 2;
      #20000;
    end
    phase = 1;
    #20000;
    checks++;
    if (max_fill != D) begin failures++; $display("FIFO never reached its depth: %0d", max_fill); end
    checks++;
    if (ovf_seen > 0 && !ovf_flag) begin failures++; $display("write while full not flagged"); end
    checks++;
    if (reads < 1000) begin failures++; $display("too few reads %0d", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
