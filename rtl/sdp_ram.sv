// sdp_ram: simple dual-port block RAM, one write port and one read port on
// the same clock. The read is synchronous: rdata shows the word at raddr one
// clock after a cycle with re high, and keeps its value while re is low, so a
// consumer that stalls sees a stable word. A read of an address written in
// the same cycle returns the old word. There is no reset of the contents.
module sdp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
