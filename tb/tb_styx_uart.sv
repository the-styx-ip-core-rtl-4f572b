// tb_styx_uart: the UART receives bytes sent by a serial model, transmits
// bytes checked by a serial model (including the bit time), loops back, and
// flags an overrun when a byte is not taken before the next one arrives.
module tb_styx_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx = 1, tx, rx_valid, rx_ack = 0, rx_overrun, tx_valid = 0, tx_ready;
  logic [7:0] rx_data, tx_data = 0;
  styx_uart #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic send(logic [7:0] v);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int b = 0; b < 8; b++) begin rx = v[b]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    // receive
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      send(v);
      repeat (3) @(posedge clk);
      chk(rx_valid && rx_data == v, $sformatf("received %02x", v));
      #1 rx_ack = 1; @(posedge clk); #1 rx_ack = 0;
    end
    // transmit
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v, got;
      int t0, t1;
      v = 8'($urandom);
      @(posedge clk); #1; tx_valid = 1; tx_data = v;
      @(posedge clk); #1; tx_valid = 0;
      chk(!tx_ready, "busy while sending");
      wait (tx == 0); t0 = $time;
      #(CPB * 10 / 2);
      for (int b = 0; b < 8; b++) begin #(CPB * 10); got[b] = tx; end
      #(CPB * 10); chk(tx == 1, "stop bit");
      chk(got == v, $sformatf("transmitted %02x", v));
      wait (tx_ready); t1 = $time;
      chk((t1 - t0) >= CPB * 10 * 10 - 20 && (t1 - t0) <= CPB * 10 * 10 + 20, "10 bit times per byte");
    end
    // overrun
    send(8'h11); send(8'h22);
    repeat (3) @(posedge clk);
    chk(rx_overrun && rx_data == 8'h11, "overrun flagged, first byte kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
