// styx_fifo: register-based byte FIFO used for the IP-core's input and
// output buffers.
//
// The storage is a flip-flop array of DEPTH words (64 bytes by default, the
// minimum buffer length of the core), with a write pointer, a read pointer
// and an occupancy counter. The head word is presented combinationally on
// rd_data whenever empty is low; asserting rd_en pops it at the clock edge.
// A write while full and a read while empty are ignored. A push and a pop in
// the same cycle are both taken, so one byte per cycle flows through.
// WIDTH is a parameter so that a tagged word can be stored as well.
// Reset is synchronous and active low; it empties the FIFO.
module styx_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= wr_data;
        wp      <= inc(wp);
      end
      if (do_rd) rp <= inc(rp);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

`ifndef SYNTHESIS
  // a well-behaved producer never pushes into a full buffer
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
`endif
endmodule
