// Fixed-latency delay buffer: a chain of DELAY registers of WIDTH bits.
// Used to delay FFT_BIN_INDEX and FFT_DATA_VALID by the latency of the power
// calculation, so that the magnitude and its write address/enable reach the FFT output
// RAM in the same clock. The valid bits in the chain are reset; data bits are not.
// DELAY = 0 gives a plain wire.
module delay_line #(
  parameter int WIDTH = 16,
  parameter int DELAY = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);
  if (DELAY == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [DELAY-1:0] v;
    logic [WIDTH-1:0] d [DELAY];
    always_ff @(posedge clk) begin
      if (rst) v <= '0;
      else     v <= DELAY'({v, in_valid});
    end
    always_ff @(posedge clk) begin
      d[0] <= in_data;
      for (int i = 1; i < DELAY; i++) d[i] <= d[i-1];
    end
    assign out_valid = v[DELAY-1];
    assign out_data  = d[DELAY-1];
  end
endmodule
