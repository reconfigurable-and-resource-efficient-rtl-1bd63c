// Dual-clock FIFO, DEPTH x WIDTH (8K x 24 bits in the input FIFO blocks).
// The write side runs on the selected input FIFO clock (FPGA_CLK or 2xFPGA_CLK), the read
// side on FPGA_CLK. Pointers are one bit wider than the address and cross between the
// domains in Gray code through two-flop synchronisers, so `full` and `empty` are
// conservative: they assert at once and release two clocks of the other side late.
// Interface: write when wr_en and not full; read data appears on rd_data one clock after
// rd_en is taken while not empty (registered RAM read). An accepted write into a full FIFO
// cannot happen: wr_en while full is dropped and reported on wr_overflow for one clock.
// The 8K depth and the dual-clock use follow the document; the Gray-pointer scheme is
// this design's choice. Each reset input is synchronous to its own clock.
module async_fifo #(
  parameter int WIDTH = 24,
  parameter int DEPTH = 8192,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             wr_overflow,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + (AW+1)'(1);
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin        <= '0;
      wgray       <= '0;
      rgray_w1    <= '0;
      rgray_w2    <= '0;
      wr_overflow <= 1'b0;
    end else begin
      rgray_w1    <= rgray;
      rgray_w2    <= rgray_w1;
      wr_overflow <= wr_en && full;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  // read side
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + (AW+1)'(1);
  assign empty  = (rgray == wgray_r2);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

  always_ff @(posedge rd_clk)
    if (rd_en && !empty) rd_data <= mem[rbin[AW-1:0]];
endmodule
