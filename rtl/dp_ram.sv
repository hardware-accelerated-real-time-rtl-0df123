// dp_ram: simple dual-port RAM used for the data caches.
//
// Port A is the engine's synchronous read port (data one cycle after a_en),
// port B the host's write port. The two ports share one clock. Contents are
// not initialised: the host loads them before the engine reads them.
module dp_ram #(
  parameter int DEPTH = 256,
  parameter int W     = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
