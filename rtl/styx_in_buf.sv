// styx_in_buf: input buffer of the Styx IP-core.
//
// Two byte FIFOs of DEPTH bytes each (64 by default): one for Styx messages
// arriving from the network side (written through the message data
// register) and one for instructions from a CPU or device (written through
// the instruction register). Keeping them apart lets an instruction be
// written while a message is still arriving byte by byte from a slow serial
// line without the two interleaving. The consumer selects a FIFO with `sel`
// (0 messages, 1 instructions) and pops its head with rd_en; rd_valid and
// rd_data show the head of the selected FIFO. Separate FIFOs are this
// design's reading of the "control registers within the input buffer".
module styx_in_buf #(
  parameter int DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       msg_wr,
  input  logic       inst_wr,
  input  logic [7:0] wdata,
  output logic       msg_full,
  output logic       inst_full,
  output logic       msg_empty,
  output logic       inst_empty,
  input  logic       sel,
  input  logic       rd_en,
  output logic       rd_valid,
  output logic [7:0] rd_data
);
  logic [7:0] m_data, i_data;
  logic [$clog2(DEPTH+1)-1:0] m_cnt, i_cnt;

  styx_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_msg (
    .clk, .rst_n, .wr_en(msg_wr), .wr_data(wdata), .rd_en(rd_en && !sel),
    .rd_data(m_data), .empty(msg_empty), .full(msg_full), .count(m_cnt)
  );
  styx_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_inst (
    .clk, .rst_n, .wr_en(inst_wr), .wr_data(wdata), .rd_en(rd_en && sel),
    .rd_data(i_data), .empty(inst_empty), .full(inst_full), .count(i_cnt)
  );

  assign rd_valid = sel ? !inst_empty : !msg_empty;
  assign rd_data  = sel ? i_data : m_data;

  wire unused_cnt = ^{m_cnt, i_cnt};
endmodule
