// styx_ns_ram: the RAM that holds the hardware namespace (the "RAM-based
// filesystem").
//
// DEPTH bytes (512 by default, the size of the block-RAM namespace) with two
// synchronous ports, as a block RAM offers: port A reads and writes and is
// used by the namespace control logic; port B only reads and is used by the
// packet encoder to stream file data into Rread replies. Both ports return
// the byte of the address presented in the previous cycle. Contents are not
// reset; the namespace control logic keeps a free pointer and only reads
// what it has written.
module styx_ns_ram #(
  parameter int DEPTH = 512,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [7:0]    b_rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
