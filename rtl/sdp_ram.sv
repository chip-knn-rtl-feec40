// sdp_ram: simple dual-port on-chip RAM, one write port and one read port,
// both on the same clock. The read is synchronous: rdata holds mem[raddr]
// one cycle after raddr is presented. A read and a write to the same address
// in the same cycle return the old contents. It models the BRAM/URAM blocks
// that hold the ping-pong tile buffers; contents are not reset.
module sdp_ram #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
