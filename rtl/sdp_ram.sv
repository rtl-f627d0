// sdp_ram: simple dual-port synchronous RAM (one write port, one read port).
//
// Used for the two memories of the joint CFO/SCO estimator: the shared
// 171 x 24 memory (sign bits, later continual pilot values) and the 101 x 26
// correlation-result memory. The read is registered: rdata shows the word at
// raddr one clock after re is high, and holds it otherwise. A read and a write
// to the same address in one cycle return the old word. The port arrangement
// is a choice of this design; only the word counts and widths come from the
// estimator's hardware budget. Contents are not reset.
module sdp_ram #(
  parameter int DEPTH = 171,
  parameter int WIDTH = 24,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
