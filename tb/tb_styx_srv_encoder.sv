// tb_styx_srv_encoder: every reply type is built byte for byte as Styx
// lays it out; an N-byte reply leaves in N cycles when the output buffer
// never fills, and random back-pressure does not lose or repeat a byte.
// Rread data comes from a RAM model with the namespace's one-cycle latency.
module tb_styx_srv_encoder;
  import styx_pkg::*;
  import styx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0, busy, done, out_valid, out_ready = 1;
  logic [7:0]  rtype = 0, rd_base = 0, rd_dev = 0, out_data, ns_rd_off, ns_rd_dev, ns_rd_data;
  logic [15:0] tag = 0;
  err_t        err = E_NONE;
  qid_t        qid = '0;
  logic [31:0] val = 0;
  name_t       name = 0;
  logic [8:0]  rd_rec = 0, ns_rd_rec;
  styx_srv_encoder dut (.*);

  // record data model: byte (rec + off) & 0xFF
  always_ff @(posedge clk) ns_rd_data <= 8'(ns_rd_rec + 9'(ns_rd_off) + 9'd22);

  bq_t got;
  int  stall_pct = 0;
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);
  always @(posedge clk) out_ready <= ($urandom % 100) >= stall_pct;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [7:0] t, int tg, err_t e, logic [31:0] v, bq_t exp, string what);
    int cyc;
    got = {};
    @(posedge clk); #1;
    start = 1; rtype = t; tag = 16'(tg); err = e; val = v;
    @(posedge clk); #1; start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    chk(got == exp, {what, " bytes"});
    if (got != exp) $display("  got %p\n  exp %p", got, exp);
    if (stall_pct == 0) chk(cyc == exp.size(), $sformatf("%s takes N cycles (%0d/%0d)", what, cyc, exp.size()));
  endtask

  initial begin
    bq_t q, d, e;
    e = {};
    repeat (2) @(posedge clk); rst_n = 1;
    qid = '{path: 64'h0102030405060708, vers: 32'hAABBCCDD, qtype: 8'h00};
    q = styx_tb_pkg::qid(0, 32'hAABBCCDD, 64'h0102030405060708);
    for (int pass = 0; pass < 2; pass++) begin
      stall_pct = pass ? 40 : 0;
      send(RVERSION, 16'hFFFF, E_NONE, 512, rversion(16'hFFFF, 512, "9P2000"), "Rversion");
      send(RATTACH, 3, E_NONE, 0, rattach(3, q), "Rattach");
      send(RAUTH, 4, E_NONE, 0, rauth(4, q), "Rauth");
      send(RWALK, 5, E_NONE, 1, rwalk(5, q), "Rwalk 1");
      send(RWALK, 6, E_NONE, 0, rwalk(6, e), "Rwalk 0");
      send(ROPEN, 7, E_NONE, 480, ropen(7, q, 480), "Ropen");
      send(RWRITE, 8, E_NONE, 255, rwrite(8, 255), "Rwrite");
      send(RCLUNK, 9, E_NONE, 0, rclunk(9), "Rclunk");
      name = 64'h73_65_68_63_74_69_77_73;   // "switches"
      send(RSTAT, 13, E_NONE, 200, rstat(13, q, 200, "switches"), "Rstat file");
      qid.qtype = QT_DIR; name = 64'h2F;
      send(RSTAT, 14, E_NONE, 0, rstat(14, styx_tb_pkg::qid(8'h80, 32'hAABBCCDD, 64'h0102030405060708), 0, "/"), "Rstat dir");
      qid.qtype = QT_FILE; name = 0;
      send(RERROR, 10, E_NOFILE, 0, rerror(10, "no file"), "Rerror");
      send(RERROR, 11, E_NOTOPEN, 0, rerror(11, "not open"), "Rerror 8");
      for (int n = 0; n < 256; n += 51) begin
        rd_rec = 9'($urandom % 200); rd_base = 8'($urandom % 4);
        d = {};
        for (int i = 0; i < n; i++) d.push_back(8'(rd_rec + 9'(rd_base) + 9'(i) + 9'd22));
        send(RREAD, 12, E_NONE, n, rread(12, d), $sformatf("Rread %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
