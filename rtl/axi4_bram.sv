// axi4_bram: the block RAM that stores the slave's data.
//
// DEPTH locations of DATA_W bits (256 x 8 by default, the size the design
// specifies), with one write port and one read port on the same clock, the
// way an FPGA simple-dual-port block RAM is used.
//
// Timing: a write with we=1 lands at the rising edge. The read is
// synchronous: rdata shows mem[raddr] one clock after raddr is presented
// (read-before-write if both ports hit the same address in one cycle).
// The contents are not reset, as with a real block RAM. The synchronous read
// port is this design's own choice, made so the array maps onto block RAM.
module axi4_bram #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  // write port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  // read port
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
