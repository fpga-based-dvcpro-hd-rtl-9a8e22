// bank_ram: simple dual-port RAM used for every buffer between processing
// elements (the design passes all bulk data between PEs through block RAM).
// One write port and one read port on the same clock; the read is registered,
// so rdata shows mem[raddr] one cycle after raddr is applied. A read of the
// address being written returns the old contents. Callers put the bank
// (segment-index bits) in the upper address bits, which turns one instance into
// a ping-pong or multi-bank buffer. Contents are not reset.
module bank_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
