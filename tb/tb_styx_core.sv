// tb_styx_core: self-checking test of the combined client/server core,
// driven through its bus registers.
//
// Server side: a mount (Tversion, Tattach), walk/open/write/clunk of the
// LED file, reading the switch file, errors (bad version, unknown user,
// missing file, bad fid, rights), Tauth with a password set by instruction,
// adding a 255-byte file by instruction and writing and reading all of it
// (messages longer than the 64-byte buffers, so the buffers fill and the
// units stall), deleting a file and setting the verification mode.
// Client side: instructions 0x01-0x07 checked against the T messages they
// must produce, and R messages from a server checked on the cl_* outputs.
// Expected bytes come from the protocol-level builders of styx_tb_pkg.
// Turnaround is checked: a reply of N bytes must be complete in the output
// buffer within N + 8 cycles of the request's last byte (no name search).
module tb_styx_core;
  import styx_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  bus_addr = 0;
  logic        bus_we = 0, bus_re = 0;
  logic [7:0]  bus_wdata = 0, bus_rdata;
  logic        msg_ready, out_avail;
  logic        cl_rsp_valid, cl_rsp_err, cl_dat_valid;
  logic [7:0]  cl_rsp_type, cl_dat;
  logic [15:0] cl_rsp_tag;
  logic [7:0]  leds, switches = 8'h3C, verif_mode;
  logic [6:0]  seg_lo, seg_hi;
  logic        bell;

  styx_core dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Send `tx` (to the message or instruction register) and collect `nrx`
  // output bytes. Writes go first; reads fill the other cycles.
  int t_last_in, t_reply_done;
  task automatic xfer(bq_t tx, bit is_inst, int nrx, output bq_t rx);
    int i = 0, idle = 0;
    rx = {};
    t_reply_done = -1;
    while ((i < tx.size() || rx.size() < nrx) && idle < 5000) begin
      @(posedge clk); #1;
      bus_we = 0; bus_re = 0;
      if (i < tx.size() && (is_inst ? !dut.inst_full : msg_ready)) begin
        bus_we = 1; bus_addr = is_inst ? 2'd1 : 2'd0; bus_wdata = tx[i]; i++;
        if (i == tx.size()) t_last_in = cycle;
        idle = 0;
      end else if (i == tx.size() && out_avail && rx.size() < nrx) begin
        if (t_reply_done < 0 && int'(dut.out_cnt) + rx.size() >= nrx) t_reply_done = cycle;
        bus_re = 1; bus_addr = 2'd0; #1; rx.push_back(bus_rdata);
        idle = 0;
      end else idle++;
      if (t_reply_done < 0 && i == tx.size() && int'(dut.out_cnt) + rx.size() >= nrx && nrx > 0)
        t_reply_done = cycle;
    end
    @(posedge clk); #1; bus_we = 0; bus_re = 0;
  endtask

  // a request and its expected reply
  task automatic rpc(bq_t t, bq_t r, string what, bit timed = 0);
    bq_t got;
    xfer(t, 0, r.size(), got);
    chk_q(got, r, what);
    if (timed) chk(t_reply_done - t_last_in <= r.size() + 8,
                   $sformatf("%s turnaround %0d cycles for %0d reply bytes", what,
                             t_reply_done - t_last_in, r.size()));
  endtask

  task automatic wait_idle();
    int n = 0;
    while ((dut.busy || !dut.inst_empty || !dut.msg_empty) && n < 2000) begin @(posedge clk); n++; end
    repeat (3) @(posedge clk);
  endtask

  bq_t got, data, none;
  bq_t qleds, qsw, qroot, qbig;
  int  rsp_n = 0, rsp_err_n = 0, dat_n = 0;
  logic [7:0] rsp_t; logic [15:0] rsp_g;
  bq_t cl_data;
  always @(posedge clk) begin
    if (cl_rsp_valid) begin rsp_n++; rsp_t = cl_rsp_type; rsp_g = cl_rsp_tag; if (cl_rsp_err) rsp_err_n++; end
    if (cl_dat_valid) cl_data.push_back(cl_dat);
  end

  initial begin
    qroot = qid(8'h80, 0, 0);
    qleds = qid(0, 0, 1);
    qsw   = qid(0, 0, 2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (120) @(posedge clk);   // namespace preload

    // ---- mount and write the LEDs ----
    rpc(tversion(16'hFFFF, 8192, "9P2000"), rversion(16'hFFFF, 512, "9P2000"), "Tversion", 1);
    rpc(tattach(1, 0, -1, "inferno", ""), rattach(1, qroot), "Tattach", 1);
    rpc(twalk(2, 0, 1, "leds"), rwalk(2, qleds), "Twalk leds");
    rpc(topen(3, 1, 1), ropen(3, qleds, 0), "Topen leds", 1);
    rpc(twrite(4, 1, 0, {8'hA5}), rwrite(4, 1), "Twrite leds", 1);
    chk(leds == 8'hA5, "LEDs follow the file");
    rpc(twrite(5, 1, 0, {8'h5A, 8'h11}), rwrite(5, 1), "Twrite past end truncated");
    chk(leds == 8'h5A, "LEDs follow second write");
    rpc(tclunk(6, 1), rclunk(6), "Tclunk", 1);
    rpc(tclunk(7, 1), rerror(7, "bad fid"), "Tclunk of closed fid");

    // ---- read the switches ----
    rpc(twalk(8, 0, 2, "switches"), rwalk(8, qsw), "Twalk switches");
    rpc(topen(9, 2, 0), ropen(9, qsw, 0), "Topen switches");
    rpc(tread(10, 2, 0, 10), rread(10, {8'h3C}), "Tread switches", 1);
    switches = 8'hC3; repeat (4) @(posedge clk);
    rpc(tread(11, 2, 0, 10), rread(11, {8'hC3}), "Tread switches live");
    rpc(twrite(12, 2, 0, {8'h00}), rerror(12, "not open"), "Twrite to read-only open");

    // ---- seven segment and bell ----
    rpc(twalk(13, 0, 3, "segment"), rwalk(13, qid(0, 0, 3)), "Twalk segment");
    rpc(topen(14, 3, 2), ropen(14, qid(0, 0, 3), 0), "Topen segment");
    rpc(twrite(15, 3, 0, {8'h42}), rwrite(15, 1), "Twrite segment");
    chk(seg_lo == 7'h5B && seg_hi == 7'h66, "7-segment shows 42");
    rpc(tclunk(16, 3), rclunk(16), "Tclunk segment");

    // ---- errors ----
    rpc(tversion(17, 8192, "9P1999"), rerror(17, "version"), "bad version");
    rpc(twalk(18, 0, 4, "nosuch"), rerror(18, "no file"), "walk to missing file");
    rpc(tattach(19, 5, -1, "mallory", ""), rerror(19, "auth"), "unknown user");
    rpc(frame(124, 20, le32(0)), rstat(20, qroot, 0, "/"), "Tstat of the root");
    rpc(frame(126, 20, le32(0)), rerror(20, "no"), "unsupported message");

    // ---- users and rights by instruction ----
    xfer(inst(8'h83, {8'd1, raw8("bob"), raw8("pw")}), 1, 0, got); wait_idle();
    rpc(tattach(21, 6, -1, "bob", ""), rerror(21, "auth"), "attach before Tauth");
    rpc(tauth(22, 7, "bob", "xx"), rerror(22, "auth"), "Tauth wrong password");
    rpc(tauth(23, 7, "bob", "pw"), rauth(23, qid(8, 0, 0)), "Tauth");
    rpc(tattach(24, 6, 7, "bob", ""), rattach(24, qroot), "attach after Tauth");
    xfer(inst(8'h82, {8'd1, 8'd1}), 1, 0, got); wait_idle();      // leds read-only
    rpc(twalk(25, 0, 1, "leds"), rwalk(25, qleds), "Twalk leds again");
    rpc(topen(26, 1, 1), rerror(26, "perm"), "open for write denied");
    rpc(topen(27, 1, 0), ropen(27, qleds, 0), "open for read allowed");
    rpc(tread(28, 1, 0, 1), rread(28, {8'h5A}), "read LED file");
    rpc(tclunk(29, 1), rclunk(29), "clunk");

    // ---- a 255-byte file added by instruction ----
    qbig = qid(0, 0, 9);
    data = {};
    for (int i = 0; i < 255; i++) data.push_back(8'(i * 7 + 3));
    begin
      bq_t rec;
      rec = {qbig, raw8("big"), 8'd255};
      for (int i = 0; i < 255; i++) rec.push_back(8'h00);
      xfer(inst(8'h80, rec), 1, 0, got); wait_idle();
      chk(dut.inst_err == styx_pkg::E_NONE, "add file accepted");
      xfer(inst(8'h80, rec), 1, 0, got); wait_idle();
      chk(dut.inst_err == styx_pkg::E_NOSPACE, "second add refused: namespace full");
    end
    rpc(twalk(30, 0, 1, "big"), rwalk(30, qbig), "Twalk big");
    rpc(topen(31, 1, 2), ropen(31, qbig, 0), "Topen big");
    rpc(twrite(32, 1, 0, data), rwrite(32, 255), "Twrite 255 bytes");
    chk(t_reply_done - t_last_in <= 11 + 8, $sformatf("255-byte write: reply %0d cycles after the last byte", t_reply_done - t_last_in));
    rpc(tread(33, 1, 0, 255), rread(33, data), "Tread 255 bytes");
    begin
      bq_t tail;
      for (int i = 200; i < 255; i++) tail.push_back(data[i]);
      rpc(tread(34, 1, 200, 100), rread(34, tail), "Tread from offset 200");
    end
    rpc(tclunk(35, 1), rclunk(35), "clunk big");

    // ---- delete and verification mode ----
    xfer(inst(8'h81, raw8("bell")), 1, 0, got); wait_idle();
    rpc(twalk(36, 0, 1, "bell"), rerror(36, "no file"), "walk to deleted file");
    xfer(inst(8'h84, {8'h03}), 1, 0, got); wait_idle();
    chk(verif_mode == 8'h03, "verification mode set");

    // ---- client instructions ----
    xfer(inst(8'h01, none), 1, 19, got);
    chk_q(got, tversion(16'hFFFF, 512, "9P2000"), "client Tversion");
    xfer(inst(8'h02, bytes("eve")), 1, 22, got);
    chk_q(got, tattach(0, 0, -1, "eve", ""), "client Tattach");
    xfer(inst(8'h03, bytes("cam")), 1, 22, got);
    chk_q(got, twalk(1, 0, 1, "cam"), "client Twalk");
    xfer(inst(8'h03, none), 1, 17, got);
    chk_q(got, twalk(2, 0, 1, ""), "client Twalk clone");
    xfer(inst(8'h04, {8'd1, bytes("ctl")}), 1, 22 + 12, got);
    chk_q(got, {twalk(3, 0, 1, "ctl"), topen(4, 1, 1)}, "client Topen with walk");
    xfer(inst(8'h05, {8'd2, 8'd40}), 1, 23, got);
    chk_q(got, tread(5, 1, 2, 40), "client Tread");
    data = {};
    for (int i = 0; i < 100; i++) data.push_back(8'(i ^ 8'h5A));
    xfer(inst(8'h06, data), 1, 123, got);
    chk_q(got, twrite(6, 1, 0, data), "client Twrite 100 bytes");
    xfer(inst(8'h07, none), 1, 11, got);
    chk_q(got, tclunk(7, 1), "client Tclunk");

    // ---- R messages reaching the client ----
    rsp_n = 0;
    xfer(rversion(16'hFFFF, 512, "9P2000"), 0, 0, got); wait_idle();
    chk(rsp_n == 1 && rsp_t == 8'd101 && rsp_g == 16'hFFFF, "client sees Rversion");
    cl_data = {};
    xfer(rread(5, {8'h10, 8'h20, 8'h30}), 0, 0, got); wait_idle();
    chk(rsp_n == 2 && rsp_t == 8'd117 && rsp_g == 16'd5, "client sees Rread");
    chk_q(cl_data, {8'h10, 8'h20, 8'h30}, "client Rread data");
    xfer(rerror(6, "perm"), 0, 0, got); wait_idle();
    chk(rsp_n == 3 && rsp_err_n == 1 && rsp_g == 16'd6, "client sees Rerror");
    bus_addr = 2'd1; #1;
    chk(bus_rdata[5:4] == 2'b11, "status shows pending error response");
    @(posedge clk); #1; bus_addr = 2'd2; bus_re = 1; #1;
    chk(bus_rdata == 8'd107, "response type register");
    @(posedge clk); #1; bus_re = 0; bus_addr = 2'd1; #1;
    chk(bus_rdata[5] == 1'b0, "reading the type clears pending");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
