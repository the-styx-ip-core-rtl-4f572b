// tb_styx_busctl: the bus controller moves received UART bytes into the
// core's message register, moves output bytes to the UART transmitter,
// passes CPU accesses through, and alternates between CPU and bridge when
// both want the bus. The core side is a small model with an output queue.
module tb_styx_busctl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       cpu_req = 0, cpu_we = 0, cpu_gnt, rx_valid = 0, rx_ack, tx_valid, tx_ready = 0;
  logic [1:0] cpu_addr = 0, bus_addr;
  logic [7:0] cpu_wdata = 0, cpu_rdata, rx_data = 0, tx_data, bus_wdata, bus_rdata;
  logic       bus_we, bus_re, msg_ready = 1, out_avail;
  styx_busctl dut (.*);

  // core model: records writes, serves reads from a queue
  logic [7:0] core_in[$], core_out[$];
  assign out_avail = core_out.size() > 0;
  assign bus_rdata = (bus_addr == 2'd0 && core_out.size() > 0) ? core_out[0] : 8'hEE;
  always @(posedge clk) begin
    if (bus_we) core_in.push_back(bus_wdata);
    if (bus_re && bus_addr == 2'd0 && core_out.size() > 0) void'(core_out.pop_front());
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // bridge: UART byte into the core
    @(posedge clk); #1; rx_valid = 1; rx_data = 8'h5A; #1;
    chk(rx_ack && bus_we && bus_addr == 2'd0 && bus_wdata == 8'h5A, "rx byte written to core");
    @(posedge clk); #1; rx_valid = 0;
    chk(core_in.size() == 1 && core_in[0] == 8'h5A, "core got rx byte");
    // core full: no ack
    msg_ready = 0; rx_valid = 1; #1;
    chk(!rx_ack && !bus_we, "held while core full");
    @(posedge clk); #1; msg_ready = 1; rx_valid = 0;
    // bridge: core output to UART
    core_out = {8'hC1, 8'hC2};
    tx_ready = 1; #1;
    chk(tx_valid && tx_data == 8'hC1 && bus_re, "output byte to UART");
    @(posedge clk); #1; tx_ready = 0; #1;
    chk(!tx_valid && core_out.size() == 1, "one byte moved");
    // CPU access
    cpu_req = 1; cpu_we = 1; cpu_addr = 2'd1; cpu_wdata = 8'h80; #1;
    chk(cpu_gnt && bus_we && bus_addr == 2'd1 && bus_wdata == 8'h80, "CPU write passes");
    @(posedge clk); #1; cpu_we = 0; cpu_addr = 2'd0; #1;
    chk(cpu_gnt && bus_re && cpu_rdata == 8'hC2, "CPU read passes");
    @(posedge clk); #1; cpu_req = 0;
    // conflict: alternate
    begin
      int g_cpu = 0, g_br = 0;
      for (int i = 0; i < 10; i++) begin
        cpu_req = 1; cpu_we = 1; cpu_addr = 2'd1; rx_valid = 1; rx_data = 8'(i); #1;
        chk(cpu_gnt != rx_ack, "exactly one master");
        if (cpu_gnt) g_cpu++; if (rx_ack) g_br++;
        @(posedge clk); #1;
      end
      chk(g_cpu == 5 && g_br == 5, $sformatf("turns alternate %0d/%0d", g_cpu, g_br));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
