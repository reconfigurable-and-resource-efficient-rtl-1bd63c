// Simple dual-port block RAM: one synchronous write port, one synchronous read port.
// Used for the window coefficient RAMs, the FFT output RAMs and the two trace stores.
// Read data appears one clock after the address (read-first on a same-address write).
// Contents are not reset; the users of this RAM never rely on its power-up contents.
module sdp_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 32768,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
