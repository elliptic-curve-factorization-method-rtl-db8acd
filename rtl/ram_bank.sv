// ram_bank: simple dual-port RAM, one write port and one registered read port.
//
// Used for every memory of the phase-1 processor: the working banks A, B, C
// and D (two locations per curve), the per-curve constant banks n, n' and
// ns~, and the load/unload buffer.  A write takes effect at the clock edge;
// rdata shows mem[raddr] one cycle after raddr is presented (a read of the
// address being written returns the old contents).  Held as one wide array;
// an FPGA mapping splits it into 34-bit block RAMs.
module ram_bank #(
  parameter int unsigned WIDTH = 136,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
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
