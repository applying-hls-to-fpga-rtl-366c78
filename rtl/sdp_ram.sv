// sdp_ram: simple dual-port RAM with one write port and one registered read
// port, the shape of an FPGA block RAM.
//
// The preprocessing kernel keeps two working arrays in such memories: the
// sample rows of the current packet (256 x 16 ADC values) and the pedestal-
// subtracted results (256 x 16 signed values). A read issued with re in cycle
// t presents rdata in cycle t+1; rdata holds its value while re is low. A read
// of the address being written in the same cycle returns the old contents.
// Contents are not reset: users write every location before reading it.
module sdp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
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
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
