// styx_top: a Styx node on one FPGA: the combined client/server Styx
// IP-core, a UART on the serial line and the system bus controller.
//
// A remote Styx client on the serial line can mount this node's namespace
// and control the board's devices by writing and reading files; the local
// CPU (an external master on the cpu_* bus port) can give the core
// instructions, both to manage the namespace and users and to send Styx
// requests to a remote server over the same serial line. Replies that the
// client side receives are reported on the cl_* signals, and in the core's
// status registers. Without a CPU (cpu_req tied low) the node is a
// stand-alone Styx server for its LEDs, switches, seven-segment display
// and bell.
// Timing: CLKS_PER_BIT clocks per serial bit (217 = 115200 baud at 25 MHz).
// All registers reset synchronously on rst_n low.
module styx_top
  import styx_pkg::*;
#(
  parameter int          CLKS_PER_BIT = 217,
  parameter int          BUF_DEPTH    = 64,
  parameter int          NS_BYTES     = 512,
  parameter int          NFID         = 4,
  parameter int          NUSERS       = 4,
  parameter logic [31:0] MSIZE        = 32'd512
) (
  input  logic        clk,
  input  logic        rst_n,
  // serial line
  input  logic        uart_rx,
  output logic        uart_tx,
  // CPU bus port
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [1:0]  cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic        cpu_gnt,
  output logic [7:0]  cpu_rdata,
  // client results
  output logic        cl_rsp_valid,
  output logic [7:0]  cl_rsp_type,
  output logic [15:0] cl_rsp_tag,
  output logic        cl_rsp_err,
  output logic        cl_dat_valid,
  output logic [7:0]  cl_dat,
  // devices
  output logic [7:0]  leds,
  input  logic [7:0]  switches,
  output logic [6:0]  seg_lo,
  output logic [6:0]  seg_hi,
  output logic        bell,
  output logic [7:0]  verif_mode,
  output logic        rx_overrun
);
  logic       rx_valid, rx_ack, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  logic [1:0] bus_addr;
  logic       bus_we, bus_re, msg_ready, out_avail;
  logic [7:0] bus_wdata, bus_rdata;

  styx_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rx(uart_rx), .tx(uart_tx),
    .rx_valid, .rx_data, .rx_ack, .rx_overrun,
    .tx_valid, .tx_data, .tx_ready
  );

  styx_busctl u_bus (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_gnt, .cpu_rdata,
    .rx_valid, .rx_data, .rx_ack, .tx_valid, .tx_data, .tx_ready,
    .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .msg_ready, .out_avail
  );

  styx_core #(
    .BUF_DEPTH(BUF_DEPTH), .NS_BYTES(NS_BYTES), .NFID(NFID), .NUSERS(NUSERS),
    .MSIZE(MSIZE), .PRELOAD(1'b1)
  ) u_core (
    .clk, .rst_n,
    .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .msg_ready, .out_avail,
    .cl_rsp_valid, .cl_rsp_type, .cl_rsp_tag, .cl_rsp_err, .cl_dat_valid, .cl_dat,
    .leds, .switches, .seg_lo, .seg_hi, .bell, .verif_mode
  );
endmodule
