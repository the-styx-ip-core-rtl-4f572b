// tb_styx_top_full: the Styx node at its default parameters (115200 baud
// at 25 MHz, 64-byte buffers, 512-byte namespace) taken through one
// complete remote operation over the serial line: mount (Tversion,
// Tattach), walk to the LED file, open it for writing, write a byte that
// lights the LEDs, and close it. The replies are checked byte by byte.
module tb_styx_top_full;
  import styx_tb_pkg::*;

  localparam int CPB = 217;   // the top's default

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        uart_rx = 1, uart_tx;
  logic        cpu_req = 0, cpu_we = 0, cpu_gnt;
  logic [1:0]  cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        cl_rsp_valid, cl_rsp_err, cl_dat_valid, bell, rx_overrun;
  logic [7:0]  cl_rsp_type, cl_dat, leds, switches = 8'h81, verif_mode;
  logic [15:0] cl_rsp_tag;
  logic [6:0]  seg_lo, seg_hi;

  styx_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic chk_q(bq_t got, bq_t exp, string what);
    bit ok = (got.size() == exp.size());
    if (ok) foreach (exp[i]) if (got[i] !== exp[i]) ok = 0;
    if (!ok) begin
      $write("  got:"); foreach (got[i]) $write(" %02x", got[i]); $write("\n");
      $write("  exp:"); foreach (exp[i]) $write(" %02x", exp[i]); $write("\n");
    end
    chk(ok, what);
  endtask

  // ---------------- serial line model ----------------
  task automatic ser_send(bq_t q);
    foreach (q[i]) begin
      uart_rx = 0; repeat (CPB) @(posedge clk);
      for (int b = 0; b < 8; b++) begin uart_rx = q[i][b]; repeat (CPB) @(posedge clk); end
      uart_rx = 1; repeat (CPB) @(posedge clk);
    end
  endtask

  bq_t line_rx;
  initial begin
    forever begin
      logic [7:0] v;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin repeat (CPB) @(posedge clk); v[b] = uart_tx; end
      repeat (CPB) @(posedge clk);
      line_rx.push_back(v);
    end
  end

  task automatic ser_expect(bq_t exp, string what);
    int n = 0;
    bq_t got;
    while (line_rx.size() < exp.size() && n < 400000) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
    got = line_rx; line_rx = {};
    chk_q(got, exp, what);
  endtask

  task automatic rpc(bq_t t, bq_t r, string what);
    fork ser_send(t); join
    ser_expect(r, what);
  endtask

  bq_t qroot, qleds;

  initial begin
    qroot = qid(8'h80, 0, 0);
    qleds = qid(0, 0, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (150) @(posedge clk);
    rpc(tversion(16'hFFFF, 8192, "9P2000"), rversion(16'hFFFF, 512, "9P2000"), "Tversion");
    rpc(tattach(1, 0, -1, "inferno", ""), rattach(1, qroot), "Tattach");
    rpc(twalk(2, 0, 1, "leds"), rwalk(2, qleds), "Twalk leds");
    rpc(topen(3, 1, 1), ropen(3, qleds, 0), "Topen leds");
    rpc(twrite(4, 1, 0, {8'h3C}), rwrite(4, 1), "Twrite leds");
    chk(leds == 8'h3C, "LEDs set over the line");
    rpc(tclunk(5, 1), rclunk(5), "Tclunk leds");
    chk(!rx_overrun, "no serial overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
