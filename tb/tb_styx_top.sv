// tb_styx_top: end-to-end test of a Styx node through its serial line and
// its CPU bus port.
//
// A serial-line model plays a remote Styx client (and, later, a remote
// server); a bus model plays the local CPU. The node is mounted, the LED,
// display and switch files are used, a 255-byte file is added by the CPU
// together with a second 20-byte part and written and read back over the
// line across both parts, Tstat is answered, wrong requests get Rerror, and
// the CPU makes the core's client side send requests whose replies come
// back over the line. Every mechanism of the design is counted and must
// occur at least once: server transactions, Rerror replies, client
// messages sent, client replies received, Rread data delivered to the
// client, stalls on a full output buffer and on a full input buffer, bus
// conflicts between CPU and UART bridge, namespace add and delete, device
// writes, live switch reads, refused authentication, part searches by
// offset and Tstat replies.
// CLKS_PER_BIT is reduced to 4 to keep the run short.
module tb_styx_top;
  import styx_tb_pkg::*;

  localparam int CPB = 4;

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

  styx_top #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
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
    while (line_rx.size() < exp.size() && n < 60000) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
    got = line_rx; line_rx = {};
    chk_q(got, exp, what);
  endtask

  task automatic rpc(bq_t t, bq_t r, string what);
    fork ser_send(t); join
    ser_expect(r, what);
  endtask

  // ---------------- CPU bus model ----------------
  task automatic cpu_access(bit we, logic [1:0] a, logic [7:0] d, output logic [7:0] q);
    @(posedge clk); #1;
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    do @(negedge clk); while (!cpu_gnt);
    q = cpu_rdata;
    @(posedge clk); #1;
    cpu_req = 0;
  endtask
  task automatic cpu_inst(bq_t q);
    logic [7:0] st;
    foreach (q[i]) begin
      do cpu_access(0, 2'd1, 8'h00, st); while (st[2]);   // wait while instruction FIFO full
      cpu_access(1, 2'd1, q[i], st);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_srv, n_rerr, n_cli_msg, n_cli_rsp, n_cli_dat, n_out_full, n_in_full, n_conflict,
      n_add, n_del, n_devwr, n_swrd, n_authfail, n_seek, n_stat;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_sdec.done && !dut.u_core.u_sdec.r_inst) n_srv++;
    if (dut.u_core.u_senc.start && dut.u_core.u_senc.rtype == 8'd107) n_rerr++;
    if (dut.u_core.u_senc.start && dut.u_core.u_senc.rtype == 8'd107 &&
        dut.u_core.u_senc.err == styx_pkg::E_AUTH) n_authfail++;
    if (dut.u_core.u_cenc.done) n_cli_msg++;
    if (cl_rsp_valid) n_cli_rsp++;
    if (cl_dat_valid) n_cli_dat++;
    if (dut.u_core.out_full && (dut.u_core.s_out_valid || dut.u_core.c_out_valid)) n_out_full++;
    if (dut.u_core.inst_full || dut.u_core.msg_full) n_in_full++;
    if (cpu_req && (dut.u_bus.br_rx || dut.u_bus.br_tx)) n_conflict++;
    if (dut.u_core.u_ns.cmd_valid && dut.u_core.u_ns.ready && dut.u_core.u_ns.cmd == styx_pkg::NS_COMMIT) n_add++;
    if (dut.u_core.u_ns.cmd_valid && dut.u_core.u_ns.ready && dut.u_core.u_ns.cmd == styx_pkg::NS_DELETE) n_del++;
    if (dut.u_core.u_ns.u_dev.wr_en) n_devwr++;
    if (dut.u_core.u_ns.cmd_valid && dut.u_core.u_ns.ready && dut.u_core.u_ns.seek_en) n_seek++;
    if (dut.u_core.u_senc.start && dut.u_core.u_senc.rtype == 8'd125) n_stat++;
    if (dut.u_core.u_ns.u_dev.ovr_valid && dut.u_core.u_senc.busy) n_swrd++;
  end

  bq_t qroot, qleds, qbig, data, none, rec;
  logic [7:0] st;

  initial begin
    qroot = qid(8'h80, 0, 0);
    qleds = qid(0, 0, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (150) @(posedge clk);

    // ---- the node as a server over the serial line ----
    rpc(tversion(16'hFFFF, 8192, "9P2000"), rversion(16'hFFFF, 512, "9P2000"), "Tversion");
    rpc(tattach(1, 0, -1, "inferno", ""), rattach(1, qroot), "Tattach");
    rpc(tattach(2, 9, -1, "nobody", ""), rerror(2, "auth"), "Tattach unknown user");
    rpc(twalk(3, 0, 1, "leds"), rwalk(3, qleds), "Twalk leds");
    rpc(topen(4, 1, 1), ropen(4, qleds, 0), "Topen leds");
    rpc(twrite(5, 1, 0, {8'h96}), rwrite(5, 1), "Twrite leds");
    chk(leds == 8'h96, "LEDs set over the line");
    rpc(tclunk(6, 1), rclunk(6), "Tclunk leds");
    rpc(twalk(7, 0, 2, "switches"), rwalk(7, qid(0, 0, 2)), "Twalk switches");
    rpc(topen(8, 2, 0), ropen(8, qid(0, 0, 2), 0), "Topen switches");
    rpc(tread(9, 2, 0, 8), rread(9, {8'h81}), "Tread switches");

    // ---- the CPU adds a 255-byte file; written and read over the line ----
    qbig = qid(0, 1, 77);
    rec = {qbig, raw8("image"), 8'd255};
    for (int i = 0; i < 255; i++) rec.push_back(8'h00);
    cpu_inst(inst(8'h80, rec));
    repeat (400) @(posedge clk);
    // a second part of the same file, 20 bytes
    rec = {qbig, raw8("image"), 8'd20};
    for (int i = 0; i < 20; i++) rec.push_back(8'(i));
    cpu_inst(inst(8'h80, rec));
    repeat (400) @(posedge clk);
    for (int i = 0; i < 255; i++) data.push_back(8'($urandom));
    rpc(twalk(10, 0, 3, "image"), rwalk(10, qbig), "Twalk image");
    rpc(topen(11, 3, 2), ropen(11, qbig, 0), "Topen image");
    rpc(twrite(12, 3, 0, data), rwrite(12, 255), "Twrite 255 bytes");
    rpc(tread(13, 3, 0, 255), rread(13, data), "Tread 255 bytes");
    rpc(tread(13, 3, 256, 4), rread(13, {8'd1, 8'd2, 8'd3, 8'd4}), "Tread in the second part");
    rpc(twrite(13, 3, 270, {8'hAA, 8'hBB}), rwrite(13, 2), "Twrite in the second part");
    rpc(tread(13, 3, 269, 100), rread(13, {8'd14, 8'hAA, 8'hBB, 8'd17, 8'd18, 8'd19}), "Tread to the end of the file");
    rpc(tread(13, 3, 275, 100), rread(13, none), "Tread at the end of the file");
    rpc(frame(124, 13, le32(3)), rstat(13, qbig, 255, "image"), "Tstat image");
    rpc(tclunk(14, 3), rclunk(14), "Tclunk image");
    cpu_inst(inst(8'h81, raw8("image")));
    repeat (400) @(posedge clk);
    rpc(twalk(15, 0, 3, "image"), rerror(15, "no file"), "walk to deleted file");

    // ---- the CPU drives the client side; a remote server answers ----
    cpu_inst(inst(8'h01, none));
    ser_expect(tversion(16'hFFFF, 512, "9P2000"), "client Tversion on the line");
    ser_send(rversion(16'hFFFF, 512, "9P2000"));
    repeat (50) @(posedge clk);
    cpu_access(0, 2'd2, 0, st);
    chk(st == 8'd101, "CPU reads Rversion type");
    for (int i = 0; i < 120; i++) data[i] = 8'(i + 1);
    data = data[0:119];
    cpu_inst(inst(8'h06, data));           // longer than the buffers: stalls
    ser_expect(twrite(0, 1, 0, data), "client Twrite on the line");
    ser_send(rread(0, {8'hDE, 8'hAD}));
    repeat (50) @(posedge clk);

    // ---- counts ----
    $display("mechanisms: srv=%0d rerror=%0d cli_msg=%0d cli_rsp=%0d cli_dat=%0d out_full=%0d in_full=%0d conflict=%0d add=%0d del=%0d devwr=%0d swrd=%0d authfail=%0d seek=%0d stat=%0d",
             n_srv, n_rerr, n_cli_msg, n_cli_rsp, n_cli_dat, n_out_full, n_in_full, n_conflict,
             n_add, n_del, n_devwr, n_swrd, n_authfail, n_seek, n_stat);
    chk(n_srv > 0, "server transactions happened");
    chk(n_rerr > 0, "Rerror replies happened");
    chk(n_cli_msg > 0, "client messages happened");
    chk(n_cli_rsp >= 2, "client replies happened");
    chk(n_cli_dat == 2, "Rread data delivered to the client");
    chk(n_out_full > 0, "output buffer full stall happened");
    chk(n_in_full > 0, "input buffer full stall happened");
    chk(n_conflict > 0, "bus conflict happened");
    chk(n_add == 2, "namespace add of two parts happened");
    chk(n_del == 2, "namespace delete of both parts happened");
    chk(n_seek > 0, "part search by offset happened");
    chk(n_stat > 0, "Tstat happened");
    chk(n_devwr > 0, "device write happened");
    chk(n_swrd > 0, "live switch read happened");
    chk(n_authfail > 0, "authentication refusal happened");
    chk(!rx_overrun, "no serial overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
