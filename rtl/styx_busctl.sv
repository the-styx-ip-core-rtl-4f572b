// styx_busctl: system bus controller.
//
// The Styx core is a slave on a simple byte-wide system bus. Two masters
// share it: the CPU (or any other device) through the cpu_* port, and a
// bridge inside this block that moves bytes between the UART and the core,
// so that Styx messages flow between the serial line and the core without
// a CPU. The bridge writes each received UART byte into the core's message
// register when the core can take it (msg_ready), and when the core has
// output (out_avail) and the UART transmitter is free it reads the output
// register and hands the byte to the UART. One transfer happens per cycle;
// when both masters want the bus they take turns. cpu_gnt tells the CPU
// its access was performed in this cycle; cpu_rdata is valid with it.
// The bus protocol and the arbitration are this design's choices.
module styx_busctl (
  input  logic       clk,
  input  logic       rst_n,
  // CPU master
  input  logic       cpu_req,
  input  logic       cpu_we,
  input  logic [1:0] cpu_addr,
  input  logic [7:0] cpu_wdata,
  output logic       cpu_gnt,
  output logic [7:0] cpu_rdata,
  // UART
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       rx_ack,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  input  logic       tx_ready,
  // Styx core slave
  output logic [1:0] bus_addr,
  output logic       bus_we,
  output logic       bus_re,
  output logic [7:0] bus_wdata,
  input  logic [7:0] bus_rdata,
  input  logic       msg_ready,
  input  logic       out_avail
);
  logic last_cpu;   // the CPU had the bus last time both wanted it

  wire br_rx  = rx_valid && msg_ready;
  wire br_tx  = out_avail && tx_ready;
  wire br_req = br_rx || br_tx;
  wire to_cpu = cpu_req && (!br_req || !last_cpu);

  always_comb begin
    cpu_gnt   = 1'b0;
    rx_ack    = 1'b0;
    tx_valid  = 1'b0;
    tx_data   = bus_rdata;
    cpu_rdata = bus_rdata;
    bus_addr  = 2'd0;
    bus_we    = 1'b0;
    bus_re    = 1'b0;
    bus_wdata = rx_data;
    if (to_cpu) begin
      cpu_gnt   = 1'b1;
      bus_addr  = cpu_addr;
      bus_we    = cpu_we;
      bus_re    = !cpu_we;
      bus_wdata = cpu_wdata;
    end else if (br_rx) begin
      bus_we = 1'b1;
      rx_ack = 1'b1;
    end else if (br_tx) begin
      bus_re   = 1'b1;
      tx_valid = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) last_cpu <= 1'b0;
    else if (cpu_req && br_req) last_cpu <= to_cpu;
  end
endmodule
