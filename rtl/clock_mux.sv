// Glitch-free two-input clock multiplexer, the function of the controlled global clock
// buffer that picks the input FIFO write clock: FPGA_CLK for analysis bandwidths below
// 1200 MHz, 2xFPGA_CLK at 1200 MHz.
// Each input has an enable flop clocked on that input's falling edge; an input is enabled
// only after the other one has been disabled, so the output never carries a shortened
// pulse. After a change of `sel` the output stays low for about one period of each clock.
// The select-by-bandwidth function follows the document, which uses a vendor clock
// buffer; this enable handshake (one flop per side; a second synchroniser flop per side
// can be added for fully unrelated clocks) is this design's generic equivalent.
// There is deliberately no reset: the write clock must keep
// running while the rest of the core is reset, so that the write-side reset can be
// synchronised. From any power-up state the enables settle within two clock periods.
module clock_mux (
  input  logic clk0,
  input  logic clk1,
  input  logic sel,       // 0: clk0, 1: clk1
  output logic clk_out
);
  logic en0, en1;

  always_ff @(negedge clk0) en0 <= !sel && !en1;
  always_ff @(negedge clk1) en1 <= sel && !en0;

  assign clk_out = (clk0 && en0) || (clk1 && en1);
endmodule
