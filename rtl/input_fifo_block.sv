// Input FIFO block of one FFT channel: four 8K x 24-bit dual-clock FIFOs holding the real
// and imaginary parts of the odd lanes (RE/IM[n-3], RE/IM[n-1]) and of the even lanes
// (RE/IM[n-2], RE/IM[n]) of the 4-sample DATA beats routed to this channel.
//
// Write side (wr_clk, the output of the input-clock multiplexer): each new beat is signalled
// by a change of beat_tgl, which is driven from the FPGA_CLK domain together with
// beat_data. wr_clk is FPGA_CLK or a phase-aligned 2xFPGA_CLK, so both are sampled
// directly. A beat is written in two wr_clk cycles: lanes 0 (odd FIFOs) and 1 (even FIFOs)
// first, lanes 2 and 3 second. With the 2x clock a beat can therefore arrive on every
// FPGA_CLK; with FPGA_CLK as write clock at most every other FPGA_CLK.
//
// Read side (rd_clk = FPGA_CLK): as soon as the FIFO pair holding the next sample is not
// empty it is read, alternating odd and even FIFOs (the two multiplexers of the block), so
// samples leave in their original order at up to one complex sample per clock.
// out_valid/out_data lag the read by one clock.
//
// The FIFO split, the 2-samples-per-write scheme and reading as soon as data is present
// follow the document. The beat toggle handshake and the sticky overflow flag (a lost
// sample for any reason, brought into rd_clk through two flops) are this design's choices.
module input_fifo_block
  import fft_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic  wr_clk,
  input  logic  wr_rst,
  input  logic  beat_tgl,
  input  beat_t beat_data,
  input  logic  rd_clk,
  input  logic  rd_rst,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  overflow
);
  // ---------------- write side ----------------
  logic  tgl_seen, pend_b, lost;
  cplx_t hold2, hold3;
  logic  wr_en;
  cplx_t wr_odd, wr_even;
  logic  [3:0] full, ovf;

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      tgl_seen <= 1'b0;
      pend_b   <= 1'b0;
      lost     <= 1'b0;
    end else begin
      if (pend_b) begin
        pend_b <= 1'b0;
      end else if (beat_tgl != tgl_seen) begin
        tgl_seen <= beat_tgl;
        pend_b   <= 1'b1;
      end
      if ((|ovf) || (wr_en && (|full))) lost <= 1'b1;
    end
  end

  always_ff @(posedge wr_clk)
    if (!pend_b && beat_tgl != tgl_seen) begin
      hold2 <= beat_data[2];
      hold3 <= beat_data[3];
    end

  always_comb begin
    wr_en   = pend_b || (beat_tgl != tgl_seen);
    wr_odd  = pend_b ? hold2 : beat_data[0];
    wr_even = pend_b ? hold3 : beat_data[1];
  end

  // The read side stays in reset until the write side has been reset too, so that no
  // stale write pointer is synchronised into a freshly reset read side.
  logic wr_rst_r1, wr_rst_r2, rd_rst_all;
  always_ff @(posedge rd_clk) begin
    wr_rst_r1 <= wr_rst;
    wr_rst_r2 <= wr_rst_r1;
  end
  assign rd_rst_all = rd_rst || wr_rst_r2;

  // FIFO order: 0 = RE even, 1 = IM even, 2 = RE odd, 3 = IM odd
  logic [DATA_W-1:0] fifo_wdata [4];
  logic [DATA_W-1:0] fifo_rdata [4];
  logic [3:0]        fifo_empty;
  logic [3:0]        fifo_rd;

  assign fifo_wdata[0] = wr_even.re;
  assign fifo_wdata[1] = wr_even.im;
  assign fifo_wdata[2] = wr_odd.re;
  assign fifo_wdata[3] = wr_odd.im;

  for (genvar f = 0; f < 4; f++) begin : g_fifo
    async_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
      .wr_clk     (wr_clk),
      .wr_rst     (wr_rst),
      .wr_en      (wr_en),
      .wr_data    (fifo_wdata[f]),
      .full       (full[f]),
      .wr_overflow(ovf[f]),
      .rd_clk     (rd_clk),
      .rd_rst     (rd_rst_all),
      .rd_en      (fifo_rd[f]),
      .rd_data    (fifo_rdata[f]),
      .empty      (fifo_empty[f])
    );
  end

  // ---------------- read side ----------------
  logic rd_phase;      // 0: next sample is in the odd FIFOs, 1: in the even FIFOs
  logic rd_go, sel_q;
  assign rd_go   = rd_phase ? !(fifo_empty[0] || fifo_empty[1])
                            : !(fifo_empty[2] || fifo_empty[3]);
  assign fifo_rd = rd_go ? (rd_phase ? 4'b0011 : 4'b1100) : 4'b0000;

  always_ff @(posedge rd_clk) begin
    if (rd_rst_all) begin
      rd_phase  <= 1'b0;
      out_valid <= 1'b0;
      sel_q     <= 1'b0;
    end else begin
      out_valid <= rd_go;
      sel_q     <= rd_phase;
      if (rd_go) rd_phase <= ~rd_phase;
    end
  end

  assign out_data.re = sel_q ? fifo_rdata[0] : fifo_rdata[2];
  assign out_data.im = sel_q ? fifo_rdata[1] : fifo_rdata[3];

  // overflow flag into the read clock domain
  logic lost_s1, lost_s2;
  always_ff @(posedge rd_clk) begin
    if (rd_rst_all) begin
      lost_s1 <= 1'b0;
      lost_s2 <= 1'b0;
    end else begin
      lost_s1 <= lost;
      lost_s2 <= lost_s1;
    end
  end
  assign overflow = lost_s2;
endmodule
