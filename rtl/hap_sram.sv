// hap_sram: simple dual-port synchronous buffer (one write port, one read
// port), used for the activation, weight, precision-metadata and output
// buffers of HAP.
//
// A write stores wdata at waddr on the rising edge when we is high. A read
// with re high returns mem[raddr] on rdata one cycle later; while re is low,
// rdata keeps its last value, which the address generators rely on to hold
// a fetched precision until it is taken. A read and a write of the same
// address in one cycle return the old contents. The memory is not reset;
// rdata resets to zero.
//
// The buffers and their total capacity follow the design description; the
// port structure, read latency and the split of capacity between buffers are
// this implementation's choice.
module hap_sram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
