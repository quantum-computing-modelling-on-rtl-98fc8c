// circuit_buffer: the gate list of the quantum circuit being emulated.
//
// A simple dual-port memory: the host writes instruction words through the
// write port before a run; the gate sequencer reads them through the read
// port, whose data appear one clock after the address (synchronous read, as
// an FPGA block RAM does). The width and depth are parameters; the
// document behind this design does not size the circuit store, so the depth
// of 1024 gates is this design's choice.
module circuit_buffer #(
  parameter int unsigned W     = 19,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
